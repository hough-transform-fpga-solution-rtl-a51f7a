// accumulator: the Hough space of one detector layer for one event bank.
//
// A 168 x 48 array of single-bit bins (qA/pT rows by phi0 columns), held in
// flip-flops so that all 168 rows can be written in the same clock. Each
// clock, for every row n where set_valid[n] is high and set_bank[n] equals
// this accumulator's BANK, the bin (n, set_bin[n]) is marked as crossed.
// Bins record only whether a line crossed them; counting is done across the
// eight layers by the peak finder (the published design counts crossed
// layers, so one bit per layer suffices -- this storage choice is this
// design's own).
//
// With the phi0-loop line drawer the writes come per phi0 column instead:
// for every column m where col_valid[m] is high and col_bank[m] equals BANK,
// the bin (col_row[m], m) is marked. Both write ports may be used together.
//
// Read: rd_row selects a qA/pT row; rd_bits returns its 48 bins in the same
// clock (combinational read). clear empties the whole array in one clock and
// takes priority over writes in that clock.
module accumulator
  import fhtf_pkg::*;
#(
  parameter bit BANK = 1'b0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic [NQ-1:0]                set_valid,
  input  logic [NQ-1:0]                set_bank,
  input  logic [NQ-1:0][PHI0BIN_W-1:0] set_bin,
  input  logic [NPHI0-1:0]             col_valid,
  input  logic [NPHI0-1:0]             col_bank,
  input  logic [NPHI0-1:0][QBIN_W-1:0] col_row,
  input  logic [QBIN_W-1:0]            rd_row,
  output logic [NPHI0-1:0]             rd_bits
);

  logic [NPHI0-1:0] bins_q [NQ];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < int'(NQ); n++) bins_q[n] <= '0;
    end else if (clear) begin
      for (int n = 0; n < int'(NQ); n++) bins_q[n] <= '0;
    end else begin
      for (int n = 0; n < int'(NQ); n++)
        if (set_valid[n] && set_bank[n] == BANK)
          bins_q[n][set_bin[n]] <= 1'b1;
      for (int m = 0; m < int'(NPHI0); m++)
        if (col_valid[m] && col_bank[m] == BANK && col_row[m] < QBIN_W'(NQ))
          bins_q[col_row[m]][m] <= 1'b1;
    end
  end

  assign rd_bits = (rd_row < QBIN_W'(NQ)) ? bins_q[rd_row] : '0;

endmodule
