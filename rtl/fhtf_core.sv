// fhtf_core: the Hough transform track filter in its processing clock domain.
//
// Two event banks, each made of eight layer accumulators and a hit store,
// are used alternately: while event n is read out of one bank (peak finding
// and hit recovery), event n+1 is written into the other, so two events are
// in the filter at once. This double buffering follows the published
// design; the bank control below is this design's own.
//
// Per bank the state runs FREE -> FILL -> DRAIN -> READY -> READ -> FREE:
//   FILL   input words are accepted, each carrying up to one hit per layer;
//          every hit is stored and its line drawn by that layer's
//          line_drawer (one hit per layer per clock);
//   DRAIN  NSEG+1 clocks after the last word, until the line drawers have
//          written their last segment;
//   READY  waiting for the readout engine (the bank read before must finish);
//   READ   the peak finder scans the bank and hit recovery loops over its
//          hits for every selected bin; the end-of-event record frees the
//          bank, clearing its accumulators and hit store in one clock.
// Banks are filled and read in strict alternation, so events leave in the
// order they came. A new event (word with sof) waits (in_ready low) while
// the next bank is not FREE. Words outside an event (no sof while no event
// is open) are accepted and dropped.
//
// Event identifiers are assigned here, counting from 0.
//
// LOOP_PHI0 selects how lines are drawn: 0 loops over the 168 qA/pT bins
// (line_drawer), 1 loops over the 48 phi0 bins (line_drawer_phi0); hit
// recovery then applies the matching form of the line rule.
module fhtf_core
  import fhtf_pkg::*;
#(
  parameter int unsigned THRESHOLD  = 7,
  parameter int unsigned SEG_LEN    = 8,
  parameter int unsigned DEPTH      = HITS_MAX,
  parameter int          Q_MIN      = Q_MIN_DEF,
  parameter int          Q_STEP     = Q_STEP_DEF,
  parameter int unsigned QSHIFT     = QSHIFT_DEF,
  parameter int          PHI0_MIN   = PHI0_MIN_DEF,
  parameter int unsigned PHI0_SHIFT = PHI0_SHIFT_DEF,
  parameter bit          LOOP_PHI0  = 1'b0,
  parameter int unsigned ZF         = ZF_DEF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  in_word_t    in_word,
  output logic        out_valid,
  input  logic        out_ready,
  output out_rec_t    out_rec,
  output logic [1:0]  bank_busy,      // bank b holds an event (not FREE)
  output logic        overflow,       // a bank dropped hits past DEPTH per layer
  output logic [31:0] cnt_roads,
  output logic [31:0] cnt_hits
);

  localparam int unsigned NSEG = NQ / SEG_LEN;
  localparam int unsigned ROWS = (DEPTH + REC_PER_L - 1) / REC_PER_L;
  localparam int unsigned RW   = $clog2(ROWS);
  localparam int unsigned CW   = $clog2(DEPTH+1);
  localparam int unsigned DW   = $clog2(NSEG+2);

  typedef enum logic [2:0] {B_FREE, B_FILL, B_DRAIN, B_READY, B_READ} bank_e;

  bank_e              bstate_q [2];
  logic [DW-1:0]      drain_q  [2];
  logic [EVID_W-1:0]  evid_q   [2];
  logic [EVID_W-1:0]  next_evid_q;
  logic               fill_open_q;
  logic               fill_bank_q;
  logic               rd_bank_q;

  logic               take, take_hits;
  logic               pf_start, pf_busy;
  logic               evt_done;
  logic [1:0]         clear;

  // Line drawers (shared by the two banks; each write carries its bank).
  logic [NLAYERS-1:0][NQ-1:0]                ld_valid, ld_bank;
  logic [NLAYERS-1:0][NQ-1:0][PHI0BIN_W-1:0] ld_bin;
  logic [NLAYERS-1:0][NPHI0-1:0]             lc_valid, lc_bank;
  logic [NLAYERS-1:0][NPHI0-1:0][QBIN_W-1:0] lc_row;

  // Bank storage.
  logic [1:0][NLAYERS-1:0][NPHI0-1:0]        acc_bits;
  logic [1:0][NLAYERS-1:0][CW-1:0]           hs_count;
  logic [1:0]                                hs_ovf;
  hit_t [1:0][NLAYERS-1:0][REC_PER_L-1:0]    hs_hits;
  logic [1:0][NLAYERS-1:0][REC_PER_L-1:0]    hs_valid;

  logic [QBIN_W-1:0]  pf_row;
  logic               road_valid, road_ready;
  road_t              road;
  logic [RW-1:0]      hr_row;

  // ---------------------------------------------------------------- input
  assign in_ready  = fill_open_q || (bstate_q[fill_bank_q] == B_FREE);
  assign take      = in_valid && in_ready;
  assign take_hits = take && (fill_open_q || in_word.sof);

  for (genvar l = 0; l < NLAYERS; l++) begin : g_layer
    if (LOOP_PHI0) begin : g_phi0
      line_drawer_phi0 #(
        .SEG_LEN(SEG_LEN), .Q_MIN(Q_MIN), .Q_STEP(Q_STEP), .QSHIFT(QSHIFT),
        .PHI0_MIN(PHI0_MIN), .PHI0_SHIFT(PHI0_SHIFT), .ZF(ZF)
      ) u_ld (
        .clk, .rst_n,
        .in_valid (take_hits && in_word.hv[l]),
        .in_bank  (fill_bank_q),
        .in_phi   (in_word.hit[l].phi),
        .in_r     (in_word.hit[l].r),
        .out_valid(lc_valid[l]),
        .out_bank (lc_bank[l]),
        .out_row  (lc_row[l])
      );
      assign ld_valid[l] = '0;
      assign ld_bank[l]  = '0;
      assign ld_bin[l]   = '0;
    end else begin : g_q
      line_drawer #(
        .SEG_LEN(SEG_LEN), .Q_MIN(Q_MIN), .Q_STEP(Q_STEP), .QSHIFT(QSHIFT),
        .PHI0_MIN(PHI0_MIN), .PHI0_SHIFT(PHI0_SHIFT)
      ) u_ld (
        .clk, .rst_n,
        .in_valid (take_hits && in_word.hv[l]),
        .in_bank  (fill_bank_q),
        .in_phi   (in_word.hit[l].phi),
        .in_r     (in_word.hit[l].r),
        .out_valid(ld_valid[l]),
        .out_bank (ld_bank[l]),
        .out_bin  (ld_bin[l])
      );
      assign lc_valid[l] = '0;
      assign lc_bank[l]  = '0;
      assign lc_row[l]   = '0;
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_bank
    for (genvar l = 0; l < NLAYERS; l++) begin : g_acc
      accumulator #(.BANK(1'(b))) u_acc (
        .clk, .rst_n,
        .clear    (clear[b]),
        .set_valid(ld_valid[l]),
        .set_bank (ld_bank[l]),
        .set_bin  (ld_bin[l]),
        .col_valid(lc_valid[l]),
        .col_bank (lc_bank[l]),
        .col_row  (lc_row[l]),
        .rd_row   (pf_row),
        .rd_bits  (acc_bits[b][l])
      );
    end
    hit_store #(.DEPTH(DEPTH)) u_hs (
      .clk, .rst_n,
      .clear   (clear[b]),
      .wr_en   ((take_hits && fill_bank_q == 1'(b)) ? in_word.hv : '0),
      .wr_hit  (in_word.hit),
      .count   (hs_count[b]),
      .overflow(hs_ovf[b]),
      .rd_row  (hr_row),
      .rd_hits (hs_hits[b]),
      .rd_valid(hs_valid[b])
    );
  end

  // -------------------------------------------------------------- readout
  assign pf_start = (bstate_q[rd_bank_q] == B_READY) && !pf_busy;

  peak_finder #(.THRESHOLD(THRESHOLD)) u_pf (
    .clk, .rst_n,
    .start     (pf_start),
    .start_evid(evid_q[rd_bank_q]),
    .rd_row    (pf_row),
    .row_bits  (acc_bits[rd_bank_q]),
    .road_valid(road_valid),
    .road_ready(road_ready),
    .road      (road),
    .busy      (pf_busy)
  );

  hit_recovery #(
    .Q_MIN(Q_MIN), .Q_STEP(Q_STEP), .QSHIFT(QSHIFT), .PHI0_MIN(PHI0_MIN),
    .PHI0_SHIFT(PHI0_SHIFT), .DEPTH(DEPTH), .LOOP_PHI0(LOOP_PHI0), .SEG_LEN(SEG_LEN), .ZF(ZF)
  ) u_hr (
    .clk, .rst_n,
    .road_valid(road_valid),
    .road_ready(road_ready),
    .road      (road),
    .hit_count (hs_count[rd_bank_q]),
    .rd_row    (hr_row),
    .rd_hits   (hs_hits[rd_bank_q]),
    .rd_valid  (hs_valid[rd_bank_q]),
    .out_valid (out_valid),
    .out_ready (out_ready),
    .out_rec   (out_rec),
    .event_done(evt_done),
    .cnt_roads (cnt_roads),
    .cnt_hits  (cnt_hits)
  );

  assign clear[0] = evt_done && (rd_bank_q == 1'b0);
  assign clear[1] = evt_done && (rd_bank_q == 1'b1);

  // --------------------------------------------------------- bank control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++) begin
        bstate_q[b] <= B_FREE;
        drain_q[b]  <= '0;
        evid_q[b]   <= '0;
      end
      next_evid_q <= '0;
      fill_open_q <= 1'b0;
      fill_bank_q <= 1'b0;
      rd_bank_q   <= 1'b0;
    end else begin
      // Fill side.
      if (take_hits) begin
        if (!fill_open_q) begin
          bstate_q[fill_bank_q] <= B_FILL;
          evid_q[fill_bank_q]   <= next_evid_q;
          next_evid_q           <= next_evid_q + 1'b1;
          fill_open_q           <= 1'b1;
        end
        if (in_word.eof) begin
          bstate_q[fill_bank_q] <= B_DRAIN;
          drain_q[fill_bank_q]  <= DW'(NSEG + 1);
          fill_open_q           <= 1'b0;
          fill_bank_q           <= ~fill_bank_q;
        end
      end
      // Drain of the line-drawer pipeline.
      for (int b = 0; b < 2; b++) begin
        if (bstate_q[b] == B_DRAIN && !(take_hits && fill_bank_q == 1'(b))) begin
          if (drain_q[b] == '0) bstate_q[b] <= B_READY;
          else                  drain_q[b]  <= drain_q[b] - 1'b1;
        end
      end
      // Read side.
      if (pf_start) bstate_q[rd_bank_q] <= B_READ;
      if (evt_done) begin
        bstate_q[rd_bank_q] <= B_FREE;
        rd_bank_q           <= ~rd_bank_q;
      end
    end
  end

  always_comb begin
    for (int b = 0; b < 2; b++) bank_busy[b] = (bstate_q[b] != B_FREE);
  end
  assign overflow = |hs_ovf;

  // The readout engine must only be started on a bank that is ready.
  a_start_ready: assert property (@(posedge clk) disable iff (!rst_n)
    pf_start |-> bstate_q[rd_bank_q] == B_READY);
  // A finished event always belongs to the bank being read.
  a_done_read: assert property (@(posedge clk) disable iff (!rst_n)
    evt_done |-> bstate_q[rd_bank_q] == B_READ);

endmodule
