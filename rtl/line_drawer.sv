// line_drawer: draws the Hough line of one hit of one layer across all
// qA/pT bins.
//
// For every qA/pT bin n the phi0 crossed by the hit is
//     P(n) = phi * 2^QSHIFT + r * (Q_MIN + n * Q_STEP)
// and is turned into a phi0 bin by fhtf_pkg::p_to_bin. Because P grows
// linearly with n, only the first segment of SEG_LEN bins is multiplied out;
// every following segment is the previous one plus the constant
// D = r * SEG_LEN * Q_STEP. This "copy and paste by addition" is what the
// published design uses to save multipliers; the segment length itself is
// this design's choice (the published design does not give it).
//
// Timing: a pipeline that accepts one hit per clock. Segment s (bins
// s*SEG_LEN .. s*SEG_LEN+SEG_LEN-1) appears on the outputs s+1 clocks after
// the hit is presented, tagged with the bank bit that came with the hit, so
// the tail of one event can still be written while the next event starts
// in the other bank. The last segment leaves NSEG clocks after the hit.
//
// Interface: in_valid/in_bank/in_phi/in_r once per clock; per bin n
// out_valid[n] (hit present and crossing inside the 48 phi0 bins),
// out_bank[n] and out_bin[n].
module line_drawer
  import fhtf_pkg::*;
#(
  parameter int unsigned SEG_LEN    = 8,
  parameter int          Q_MIN      = Q_MIN_DEF,
  parameter int          Q_STEP     = Q_STEP_DEF,
  parameter int unsigned QSHIFT     = QSHIFT_DEF,
  parameter int          PHI0_MIN   = PHI0_MIN_DEF,
  parameter int unsigned PHI0_SHIFT = PHI0_SHIFT_DEF
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  input  logic                              in_bank,
  input  logic [PHI_W-1:0]                  in_phi,
  input  logic [R_W-1:0]                    in_r,
  output logic [NQ-1:0]                     out_valid,
  output logic [NQ-1:0]                     out_bank,
  output logic [NQ-1:0][PHI0BIN_W-1:0]      out_bin
);

  localparam int unsigned NSEG = NQ / SEG_LEN;

  // Pipeline registers: stage s holds segment s.
  p_t   seg_q   [NSEG][SEG_LEN];
  p_t   step_q  [NSEG];
  logic vld_q   [NSEG];
  logic bank_q  [NSEG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(NSEG); s++) begin
        vld_q[s]  <= 1'b0;
        bank_q[s] <= 1'b0;
        step_q[s] <= '0;
        for (int k = 0; k < int'(SEG_LEN); k++) seg_q[s][k] <= '0;
      end
    end else begin
      // First segment: multiplied out.
      vld_q[0]  <= in_valid;
      bank_q[0] <= in_bank;
      step_q[0] <= p_t'({1'b0, in_r}) * p_t'(SEG_LEN * Q_STEP);
      for (int k = 0; k < int'(SEG_LEN); k++)
        seg_q[0][k] <= hit_p(in_phi, in_r, Q_MIN + k * Q_STEP, QSHIFT);
      // Later segments: previous segment shifted along the line by one add.
      for (int s = 1; s < int'(NSEG); s++) begin
        vld_q[s]  <= vld_q[s-1];
        bank_q[s] <= bank_q[s-1];
        step_q[s] <= step_q[s-1];
        for (int k = 0; k < int'(SEG_LEN); k++)
          seg_q[s][k] <= seg_q[s-1][k] + step_q[s-1];
      end
    end
  end

  always_comb begin
    for (int s = 0; s < int'(NSEG); s++) begin
      for (int k = 0; k < int'(SEG_LEN); k++) begin
        logic                 ok;
        logic [PHI0BIN_W-1:0] b;
        p_to_bin(seg_q[s][k], PHI0_MIN, QSHIFT, PHI0_SHIFT, ok, b);
        out_valid[s*SEG_LEN + k] = vld_q[s] && ok;
        out_bank[s*SEG_LEN + k]  = bank_q[s];
        out_bin[s*SEG_LEN + k]   = b;
      end
    end
  end

  initial begin
    assert (NQ % SEG_LEN == 0)
      else $error("line_drawer: SEG_LEN must divide the number of qA/pT bins");
  end

endmodule
