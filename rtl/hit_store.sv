// hit_store: the hits of one event for one event bank.
//
// Holds up to HITS_MAX (200) hits per layer for the eight layers, 1600 in
// all, as the published design sizes its hit storage. Each layer is written
// independently, one hit per clock, at the next free place; hits past the
// 200th of a layer are dropped and raise the sticky overflow flag (what
// happens on overflow is not described, dropping is this design's choice).
//
// For hit recovery each layer is organised as rows of REC_PER_L (4) hits, so
// one read returns 4 hits of every layer, 32 hits per clock, the width of the
// 32 recovered-hit lanes of the described firmware. rd_valid marks the hits
// that were actually written. The read is combinational.
//
// clear forgets all hits of the bank (counts back to zero) in one clock.
module hit_store
  import fhtf_pkg::*;
#(
  parameter  int unsigned DEPTH = HITS_MAX,
  localparam int unsigned ROWS  = (DEPTH + REC_PER_L - 1) / REC_PER_L,
  localparam int unsigned CW    = $clog2(DEPTH+1)
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   clear,
  input  logic [NLAYERS-1:0]                     wr_en,
  input  hit_t [NLAYERS-1:0]                     wr_hit,
  output logic [NLAYERS-1:0][CW-1:0]              count,
  output logic                                   overflow,
  input  logic [$clog2(ROWS)-1:0]                rd_row,
  output hit_t [NLAYERS-1:0][REC_PER_L-1:0]      rd_hits,
  output logic [NLAYERS-1:0][REC_PER_L-1:0]      rd_valid
);

  hit_t mem [NLAYERS][ROWS][REC_PER_L];
  logic [NLAYERS-1:0][CW-1:0] cnt_q;
  logic ovf_q;

  always_ff @(posedge clk) begin
    for (int l = 0; l < int'(NLAYERS); l++)
      if (!clear && wr_en[l] && cnt_q[l] < CW'(DEPTH))
        mem[l][int'(cnt_q[l]) / REC_PER_L][int'(cnt_q[l]) % REC_PER_L] <= wr_hit[l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      ovf_q <= 1'b0;
    end else if (clear) begin
      cnt_q <= '0;
      ovf_q <= 1'b0;
    end else begin
      for (int l = 0; l < int'(NLAYERS); l++) begin
        if (wr_en[l]) begin
          if (cnt_q[l] < CW'(DEPTH)) cnt_q[l] <= cnt_q[l] + 1'b1;
          else                       ovf_q    <= 1'b1;
        end
      end
    end
  end

  assign count    = cnt_q;
  assign overflow = ovf_q;

  always_comb begin
    for (int l = 0; l < int'(NLAYERS); l++) begin
      for (int k = 0; k < int'(REC_PER_L); k++) begin
        if (rd_row < ($clog2(ROWS))'(ROWS)) begin
          rd_hits[l][k]  = mem[l][rd_row][k];
          rd_valid[l][k] = (CW'(rd_row) * CW'(REC_PER_L) + CW'(k)) < cnt_q[l];
        end else begin
          rd_hits[l][k]  = '0;
          rd_valid[l][k] = 1'b0;
        end
      end
    end
  end

endmodule
