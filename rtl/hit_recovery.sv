// hit_recovery: finds the hits that generated a selected bin.
//
// For a road (qA/pT bin n, phi0 bin b) the line rule used to fill the
// accumulators is applied again with n held fixed: a stored hit belongs to
// the road when phi * 2^QSHIFT + r * q(n) falls in phi0 bin b. The hit store
// is looped over REC_PER_L (4) hits of each of the 8 layers per clock, 32
// hits per clock, so every generative hit of the road is found in
// ceil(max layer hit count / 4) clocks. The method follows the published
// design; the lane count of 32 is taken from its simulation trace
// (32 cluster outputs), and the record format is this design's own.
//
// With LOOP_PHI0 set, the rule is the phi0-loop form of fhtf_pkg: for the
// road's phi0 bin m = s*SEG_LEN + k a hit belongs to the road when
// z_first(k) + s * z_step falls in the road's qA/pT bin, the same value the
// phi0-loop line drawer reaches by adding the step segment by segment.
//
// Output: one out_rec_t per clock that found at least one hit, and always
// one on the road's last row (road_last = 1), so every road produces at
// least one record. Lanes that found nothing carry CLU_NONE. An end-of-event
// token produces a record with event_last = 1 and pulses event_done.
//
// Timing: road_ready is high when idle; a road is accepted in one clock and
// then takes one clock per hit-store row while out_ready is high (out_ready
// low stalls the loop). cnt_roads and cnt_hits count roads and recovered
// hits since reset.
module hit_recovery
  import fhtf_pkg::*;
#(
  parameter int          Q_MIN      = Q_MIN_DEF,
  parameter int          Q_STEP     = Q_STEP_DEF,
  parameter int unsigned QSHIFT     = QSHIFT_DEF,
  parameter int          PHI0_MIN   = PHI0_MIN_DEF,
  parameter int unsigned PHI0_SHIFT = PHI0_SHIFT_DEF,
  parameter int unsigned DEPTH      = HITS_MAX,
  parameter bit          LOOP_PHI0  = 1'b0,
  parameter int unsigned SEG_LEN    = 8,
  parameter int unsigned ZF         = ZF_DEF,
  localparam int unsigned ROWS      = (DEPTH + REC_PER_L - 1) / REC_PER_L,
  localparam int unsigned RW        = $clog2(ROWS),
  localparam int unsigned CW        = $clog2(DEPTH+1)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                road_valid,
  output logic                                road_ready,
  input  road_t                               road,
  input  logic [NLAYERS-1:0][CW-1:0]          hit_count,
  output logic [RW-1:0]                       rd_row,
  input  hit_t [NLAYERS-1:0][REC_PER_L-1:0]   rd_hits,
  input  logic [NLAYERS-1:0][REC_PER_L-1:0]   rd_valid,
  output logic                                out_valid,
  input  logic                                out_ready,
  output out_rec_t                            out_rec,
  output logic                                event_done,
  output logic [31:0]                         cnt_roads,
  output logic [31:0]                         cnt_hits
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_EOE} state_e;

  state_e            state_q;
  road_t             road_q;
  int                q_q;
  logic [RW-1:0]     row_q;
  logic [RW:0]       nrows_q;
  logic              ovld_q;
  out_rec_t          orec_q;
  logic              done_q;
  logic [31:0]       roads_q, hits_q;

  logic              can_load;
  logic [RW:0]       nrows;
  logic              last_row;
  logic [REC_LANES-1:0]            match;
  logic [REC_LANES-1:0][CLU_W-1:0] mclu;
  logic [$clog2(REC_LANES+1)-1:0]  nmatch;

  assign can_load = !ovld_q || out_ready;

  // Rows to scan: enough for the fullest layer.
  always_comb begin
    nrows = '0;
    for (int l = 0; l < int'(NLAYERS); l++) begin
      logic [RW:0] r;
      r = (RW+1)'((hit_count[l] + CW'(REC_PER_L - 1)) / CW'(REC_PER_L));
      if (r > nrows) nrows = r;
    end
  end

  // Re-apply the line rule to the 32 hits of the current row.
  always_comb begin
    nmatch = '0;
    for (int l = 0; l < int'(NLAYERS); l++) begin
      for (int k = 0; k < int'(REC_PER_L); k++) begin
        logic                 ok;
        logic [PHI0BIN_W-1:0] b;
        logic [QBIN_W-1:0]    row;
        if (LOOP_PHI0) begin
          z_to_row(z_first(rd_hits[l][k].phi, rd_hits[l][k].r, int'(road_q.pbin) % SEG_LEN,
                           PHI0_MIN, PHI0_SHIFT, QSHIFT, ZF) +
                   p_t'(road_q.pbin / PHI0BIN_W'(SEG_LEN)) *
                   z_step(rd_hits[l][k].r, SEG_LEN, PHI0_SHIFT, QSHIFT, ZF),
                   Q_MIN, $clog2(Q_STEP), ZF, ok, row);
          b  = '0;
          ok = ok && (rd_hits[l][k].r != '0) && (row == road_q.qbin);
        end else begin
          p_to_bin(hit_p(rd_hits[l][k].phi, rd_hits[l][k].r, q_q, QSHIFT),
                   PHI0_MIN, QSHIFT, PHI0_SHIFT, ok, b);
          row = '0;
          ok  = ok && (b == road_q.pbin);
        end
        match[l*REC_PER_L + k] = rd_valid[l][k] && ok;
        mclu[l*REC_PER_L + k]  = match[l*REC_PER_L + k] ? rd_hits[l][k].clu : CLU_NONE;
        nmatch = nmatch + ($clog2(REC_LANES+1))'(match[l*REC_PER_L + k]);
      end
    end
  end

  assign last_row = ((RW+1)'(row_q) + 1'b1 >= nrows_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      road_q  <= '0;
      q_q     <= 0;
      row_q   <= '0;
      nrows_q <= '0;
      ovld_q  <= 1'b0;
      orec_q  <= '0;
      done_q  <= 1'b0;
      roads_q <= '0;
      hits_q  <= '0;
    end else begin
      done_q <= 1'b0;
      if (ovld_q && out_ready) ovld_q <= 1'b0;
      case (state_q)
        S_IDLE: if (road_valid) begin
          road_q  <= road;
          q_q     <= Q_MIN + int'(road.qbin) * Q_STEP;
          row_q   <= '0;
          nrows_q <= nrows;
          state_q <= road.eoe ? S_EOE : S_RUN;
        end
        S_RUN: if (can_load) begin
          if (match != '0 || last_row) begin
            ovld_q            <= 1'b1;
            orec_q.evid       <= road_q.evid;
            orec_q.qbin       <= road_q.qbin;
            orec_q.pbin       <= road_q.pbin;
            orec_q.road_last  <= last_row;
            orec_q.event_last <= 1'b0;
            orec_q.mask       <= match;
            orec_q.clu        <= mclu;
          end
          hits_q <= hits_q + 32'(nmatch);
          if (last_row) begin
            roads_q <= roads_q + 1'b1;
            state_q <= S_IDLE;
          end else begin
            row_q <= row_q + 1'b1;
          end
        end
        S_EOE: if (can_load) begin
          ovld_q            <= 1'b1;
          orec_q.evid       <= road_q.evid;
          orec_q.qbin       <= '0;
          orec_q.pbin       <= '0;
          orec_q.road_last  <= 1'b0;
          orec_q.event_last <= 1'b1;
          orec_q.mask       <= '0;
          orec_q.clu        <= {REC_LANES{CLU_NONE}};
          done_q            <= 1'b1;
          state_q           <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign road_ready = (state_q == S_IDLE);
  assign rd_row     = row_q;
  assign out_valid  = ovld_q;
  assign out_rec    = orec_q;
  assign event_done = done_q;
  assign cnt_roads  = roads_q;
  assign cnt_hits   = hits_q;

endmodule
