// fhtf_pkg: sizes, types and the binning arithmetic shared by the Hough
// transform track filter.
//
// The filter works on eight detector layers. A hit is a radius r, an azimuth
// phi and an 18-bit cluster identifier. The Hough space (the "accumulator")
// has 168 qA/pT bins by 48 phi0 bins per layer. A hit draws the straight line
//     phi0 = phi + r * qA/pT
// through it: for every qA/pT bin one phi0 bin is crossed. The same rule,
// with the bin held fixed, decides later which hits belong to a selected bin.
//
// Sizes from the published design: 8 layers, 168 x 48 bins, 200 hits per
// layer, phi 16 bits, r 12 bits, cluster id 18 bits, an 8-bit qA/pT bin index
// and a 6-bit phi0 bin index, 32 recovered-hit lanes (4 per layer), a layer
// threshold of 7.
//
// Fixed-point scaling is this design's own choice (all integer, rounding
// towards minus infinity, as the described firmware also rounds down):
//   q(n)  = Q_MIN + n * Q_STEP                  qA/pT of bin n, signed integer
//   P     = phi * 2^QSHIFT + r * q(n)           phi0 scaled by 2^QSHIFT
//   col   = (P - PHI0_MIN * 2^QSHIFT) >>> (QSHIFT + PHI0_SHIFT)
// The crossing is kept only when 0 <= col < 48.
//
// The lines can instead be drawn by looping over the 48 phi0 bins and
// computing qA/pT = (phi0 - phi) / r (selected by LOOP_PHI0 in the modules
// that use it). For phi0 bin m = s*SEG + k, with c(m) the centre of the bin,
//   Z0(k) = ((c(k) - phi) * 2^(QSHIFT+ZF)) / r        (division truncates)
//   DZ    = (SEG * 2^PHI0_SHIFT * 2^(QSHIFT+ZF)) / r
//   Z(m)  = Z0(k) + s * DZ                            qA/pT * 2^ZF
//   row   = (Z(m) - (Q_MIN - Q_STEP/2) * 2^ZF) >>> (ZF + log2 Q_STEP)
// The row is kept only when 0 <= row < 168. Z(m) is defined through the
// first segment plus whole steps, so that drawing (which adds DZ segment by
// segment) and hit recovery (which forms Z0 + s*DZ directly) agree exactly.
// A hit with r = 0 draws nothing in this mode.
package fhtf_pkg;

  localparam int unsigned NLAYERS    = 8;
  localparam int unsigned NQ         = 168;
  localparam int unsigned NPHI0      = 48;
  localparam int unsigned HITS_MAX   = 200;
  localparam int unsigned PHI_W      = 16;
  localparam int unsigned R_W        = 12;
  localparam int unsigned CLU_W      = 18;
  localparam int unsigned QBIN_W     = 8;
  localparam int unsigned PHI0BIN_W  = 6;
  localparam int unsigned REC_PER_L  = 4;
  localparam int unsigned REC_LANES  = NLAYERS * REC_PER_L;
  localparam int unsigned EVID_W     = 8;
  localparam int unsigned CNT_W      = 8;          // layer-count width used by the peak finder
  localparam int unsigned P_W        = 40;         // width of the scaled phi0 value P

  // Default binning constants (own choice, see header).
  localparam int          Q_MIN_DEF      = -2672;
  localparam int          Q_STEP_DEF     = 32;
  localparam int unsigned QSHIFT_DEF     = 12;
  localparam int          PHI0_MIN_DEF   = 16384;
  localparam int unsigned PHI0_SHIFT_DEF = 6;
  localparam int unsigned ZF_DEF         = 8;      // fraction bits of Z

  // Value written on an output lane that carries no hit.
  localparam logic [CLU_W-1:0] CLU_NONE = '1;

  typedef logic signed [P_W-1:0] p_t;

  typedef struct packed {
    logic [R_W-1:0]   r;
    logic [PHI_W-1:0] phi;
    logic [CLU_W-1:0] clu;
  } hit_t;

  // One input word: one hit slot per layer plus event framing.
  typedef struct packed {
    logic                     sof;     // first word of an event
    logic                     eof;     // last word of an event
    logic [NLAYERS-1:0]       hv;      // which layer slots carry a hit
    hit_t [NLAYERS-1:0]       hit;
  } in_word_t;

  // A selected bin (a "road") handed from the peak finder to hit recovery.
  // A token with eoe set carries no bin and marks the end of the event.
  typedef struct packed {
    logic [EVID_W-1:0]    evid;
    logic                 eoe;
    logic [QBIN_W-1:0]    qbin;
    logic [PHI0BIN_W-1:0] pbin;
  } road_t;

  // One output record: up to 32 recovered cluster ids of one road.
  typedef struct packed {
    logic [EVID_W-1:0]              evid;
    logic [QBIN_W-1:0]              qbin;
    logic [PHI0BIN_W-1:0]           pbin;
    logic                           road_last;   // last record of this road
    logic                           event_last;  // end-of-event record, no hits
    logic [REC_LANES-1:0]           mask;
    logic [REC_LANES-1:0][CLU_W-1:0] clu;
  } out_rec_t;

  // Turn a scaled phi0 value into a phi0 bin; ok is low outside 0..NPHI0-1.
  function automatic void p_to_bin(input p_t p, input int phi0_min,
                                   input int unsigned qshift, input int unsigned phi0_shift,
                                   output logic ok, output logic [PHI0BIN_W-1:0] bin);
    p_t rel, col;
    rel = p - (p_t'(phi0_min) <<< qshift);
    col = rel >>> (qshift + phi0_shift);
    ok  = (col >= 0) && (col < p_t'(NPHI0));
    bin = col[PHI0BIN_W-1:0];
  endfunction

  // Scaled phi0 of a hit for a given signed qA/pT value.
  function automatic p_t hit_p(input logic [PHI_W-1:0] phi, input logic [R_W-1:0] r,
                               input int q, input int unsigned qshift);
    p_t pr, pq;
    pr = p_t'({1'b0, r});
    pq = p_t'(q);
    return (p_t'({1'b0, phi}) <<< qshift) + pr * pq;
  endfunction

  // phi0-loop form: first-segment value Z0 for phi0 bin k.
  function automatic p_t z_first(input logic [PHI_W-1:0] phi, input logic [R_W-1:0] r,
                                 input int k, input int phi0_min, input int unsigned phi0_shift,
                                 input int unsigned qshift, input int unsigned zf);
    p_t num, c;
    c   = p_t'(phi0_min) + (p_t'(k) <<< phi0_shift) + (p_t'(1) <<< (phi0_shift - 1));
    num = (c - p_t'({1'b0, phi})) <<< (qshift + zf);
    return (r == '0) ? p_t'(0) : num / p_t'({1'b0, r});
  endfunction

  // phi0-loop form: step DZ between segments of seg phi0 bins.
  function automatic p_t z_step(input logic [R_W-1:0] r, input int seg,
                                input int unsigned phi0_shift, input int unsigned qshift,
                                input int unsigned zf);
    p_t num;
    num = p_t'(seg) <<< (phi0_shift + qshift + zf);
    return (r == '0) ? p_t'(0) : num / p_t'({1'b0, r});
  endfunction

  // phi0-loop form: qA/pT row of a Z value; ok is low outside 0..NQ-1.
  function automatic void z_to_row(input p_t z, input int q_min, input int unsigned qstep_log2,
                                   input int unsigned zf, output logic ok,
                                   output logic [QBIN_W-1:0] row);
    p_t rel, q;
    rel = z - ((p_t'(q_min) <<< zf) - (p_t'(1) <<< (qstep_log2 + zf - 1)));
    q   = rel >>> (zf + qstep_log2);
    ok  = (q >= 0) && (q < p_t'(NQ));
    row = q[QBIN_W-1:0];
  endfunction

endpackage
