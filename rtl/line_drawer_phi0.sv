// line_drawer_phi0: draws the Hough line of one hit by looping over the 48
// phi0 bins instead of the qA/pT bins.
//
// The published design can draw lines either way: for every qA/pT bin the
// crossed phi0 (line_drawer), or for every phi0 bin the crossed qA/pT,
//     qA/pT = (phi0 - phi) / r.
// This block does the second. As in line_drawer only the first segment of
// SEG_LEN bins is computed with the full formula (here a division by r);
// every later segment is the previous one plus the constant step
// DZ = SEG_LEN * binwidth * 2^(QSHIFT+ZF) / r, one addition per bin. The
// exact arithmetic is given in fhtf_pkg (z_first, z_step, z_to_row); the
// segment length, the fraction width ZF and the use of a plain divider are
// this design's choices.
//
// Timing: one hit per clock. Segment s (phi0 bins s*SEG_LEN ..) appears on
// the outputs s+1 clocks after the hit, with the hit's bank bit; the last
// segment leaves NPHI0/SEG_LEN clocks after the hit.
//
// Interface: per phi0 bin m, out_valid[m] (hit present, r not zero, row
// inside the 168 qA/pT bins), out_bank[m] and out_row[m].
module line_drawer_phi0
  import fhtf_pkg::*;
#(
  parameter int unsigned SEG_LEN    = 8,
  parameter int          Q_MIN      = Q_MIN_DEF,
  parameter int          Q_STEP     = Q_STEP_DEF,
  parameter int unsigned QSHIFT     = QSHIFT_DEF,
  parameter int          PHI0_MIN   = PHI0_MIN_DEF,
  parameter int unsigned PHI0_SHIFT = PHI0_SHIFT_DEF,
  parameter int unsigned ZF         = ZF_DEF
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  input  logic                              in_bank,
  input  logic [PHI_W-1:0]                  in_phi,
  input  logic [R_W-1:0]                    in_r,
  output logic [NPHI0-1:0]                  out_valid,
  output logic [NPHI0-1:0]                  out_bank,
  output logic [NPHI0-1:0][QBIN_W-1:0]      out_row
);

  localparam int unsigned NSEG    = NPHI0 / SEG_LEN;
  localparam int unsigned QSTEP_L = $clog2(Q_STEP);

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
      // First segment: full formula (division by r).
      vld_q[0]  <= in_valid && (in_r != '0);
      bank_q[0] <= in_bank;
      step_q[0] <= z_step(in_r, SEG_LEN, PHI0_SHIFT, QSHIFT, ZF);
      for (int k = 0; k < int'(SEG_LEN); k++)
        seg_q[0][k] <= z_first(in_phi, in_r, k, PHI0_MIN, PHI0_SHIFT, QSHIFT, ZF);
      // Later segments: one addition per bin.
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
        logic              ok;
        logic [QBIN_W-1:0] row;
        z_to_row(seg_q[s][k], Q_MIN, QSTEP_L, ZF, ok, row);
        out_valid[s*SEG_LEN + k] = vld_q[s] && ok;
        out_bank[s*SEG_LEN + k]  = bank_q[s];
        out_row[s*SEG_LEN + k]   = row;
      end
    end
  end

  initial begin
    assert (NPHI0 % SEG_LEN == 0)
      else $error("line_drawer_phi0: SEG_LEN must divide the number of phi0 bins");
    assert (Q_STEP == (1 << QSTEP_L))
      else $error("line_drawer_phi0: Q_STEP must be a power of two");
  end

endmodule
