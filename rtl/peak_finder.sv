// peak_finder: selects the candidate bins ("roads") of one event.
//
// The eight layer accumulators are read one qA/pT row per clock. For every
// phi0 bin the number of layers whose bin was crossed is counted. A bin is a
// candidate when that count reaches THRESHOLD (7 of 8 layers by default) and
// it is the maximum of the five-bin window formed with its two neighbours on
// each side along phi0. The published design checks five bins to decide
// whether the central one is valid; the exact comparison is this design's
// choice: the centre must be strictly above the two bins on its left and at
// least as high as the two on its right, so that a flat top of equal counts
// yields exactly one candidate. Bins outside the accumulator count as zero.
//
// Flow: start (one clock) begins the scan at row 0. A row without candidates
// takes one clock; a row with c candidates takes 1 + c clocks when road_ready
// stays high, the candidates leaving lowest phi0 bin first through a
// valid/ready handshake. After the last row an end-of-event token
// (road.eoe = 1) is sent, then the block is idle again. A stalled road_ready
// holds the scan.
module peak_finder
  import fhtf_pkg::*;
#(
  parameter int unsigned THRESHOLD = 7
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start,
  input  logic [EVID_W-1:0]                start_evid,
  output logic [QBIN_W-1:0]                rd_row,
  input  logic [NLAYERS-1:0][NPHI0-1:0]    row_bits,
  output logic                             road_valid,
  input  logic                             road_ready,
  output road_t                            road,
  output logic                             busy
);

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_EMIT, S_END} state_e;

  state_e               state_q;
  logic [QBIN_W-1:0]    row_q;
  logic [NPHI0-1:0]     mask_q;
  logic [EVID_W-1:0]    evid_q;

  logic [3:0]           cnt   [NPHI0];
  logic [NPHI0-1:0]     cand;
  logic [PHI0BIN_W-1:0] first;
  logic [NPHI0-1:0]     mask_rest;

  // Layer count per bin, then the five-bin window test.
  always_comb begin
    for (int c = 0; c < int'(NPHI0); c++) begin
      cnt[c] = '0;
      for (int l = 0; l < int'(NLAYERS); l++) cnt[c] = cnt[c] + 4'(row_bits[l][c]);
    end
    for (int c = 0; c < int'(NPHI0); c++) begin
      logic [3:0] lm2, lm1, rp1, rp2;
      lm2 = (c >= 2)              ? cnt[c-2] : 4'd0;
      lm1 = (c >= 1)              ? cnt[c-1] : 4'd0;
      rp1 = (c + 1 < int'(NPHI0)) ? cnt[c+1] : 4'd0;
      rp2 = (c + 2 < int'(NPHI0)) ? cnt[c+2] : 4'd0;
      cand[c] = (cnt[c] >= 4'(THRESHOLD)) && (cnt[c] > lm2) && (cnt[c] > lm1) &&
                (cnt[c] >= rp1) && (cnt[c] >= rp2);
    end
  end

  // Lowest pending candidate of the current row.
  always_comb begin
    first = '0;
    for (int c = int'(NPHI0) - 1; c >= 0; c--)
      if (mask_q[c]) first = PHI0BIN_W'(c);
    mask_rest = mask_q & (mask_q - 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      row_q   <= '0;
      mask_q  <= '0;
      evid_q  <= '0;
    end else begin
      case (state_q)
        S_IDLE: if (start) begin
          state_q <= S_SCAN;
          row_q   <= '0;
          evid_q  <= start_evid;
        end
        S_SCAN: begin
          if (cand != '0) begin
            mask_q  <= cand;
            state_q <= S_EMIT;
          end else if (row_q == QBIN_W'(NQ - 1)) begin
            state_q <= S_END;
          end else begin
            row_q <= row_q + 1'b1;
          end
        end
        S_EMIT: if (road_ready) begin
          mask_q <= mask_rest;
          if (mask_rest == '0) begin
            if (row_q == QBIN_W'(NQ - 1)) state_q <= S_END;
            else begin
              row_q   <= row_q + 1'b1;
              state_q <= S_SCAN;
            end
          end
        end
        S_END: if (road_ready) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign rd_row     = row_q;
  assign road_valid = (state_q == S_EMIT) || (state_q == S_END);
  assign road.evid  = evid_q;
  assign road.eoe   = (state_q == S_END);
  assign road.qbin  = row_q;
  assign road.pbin  = (state_q == S_EMIT) ? first : '0;
  assign busy       = (state_q != S_IDLE);

endmodule
