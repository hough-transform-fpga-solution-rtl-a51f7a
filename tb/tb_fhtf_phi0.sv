// tb_fhtf_phi0: end-to-end check of the processing engine with lines drawn
// by looping over the phi0 bins (LOOP_PHI0 = 1), on one clock.
//
// Same events and checks as tb_fhtf_core; the reference model evaluates the
// phi0-loop form of the line rule.
//
// Six events are streamed back to back: tracks with all eight layers, a
// track with one layer missing (found through the threshold of 7), an empty
// event, an event with more than 200 hits in one layer (hit-store overflow)
// and pure noise. Every output record is compared with the reference model.
// out_ready is held high for the first two events and then toggled at
// random. The testbench counts the mechanisms it must see: both banks busy
// at once (two events in flight), input stalled for a free bank, roads
// waiting for hit recovery, output back-pressure and overflow. It also
// checks that the first event leaves within 2000 clocks of its first word
// (5 us at 400 MHz).
module tb_fhtf_phi0;
  import fhtf_pkg::*;
  import fhtf_ref_pkg::*;

  localparam int NEV = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, overflow;
  in_word_t in_word;
  out_rec_t out_rec;
  logic [1:0] bank_busy;
  logic [31:0] cnt_roads, cnt_hits;

  fhtf_core #(.LOOP_PHI0(1'b1)) dut (.*);

  int checks = 0, failures = 0;
  fhtf_event ev [NEV];
  out_rec_t  exp_q [$];
  int        nroads_tot = 0;
  int        n_both = 0, n_in_stall = 0, n_road_stall = 0, n_out_stall = 0, n_ovf = 0;
  int        n_events_out = 0;
  longint    cyc = 0, t_first_in = -1, t_first_out = -1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (bank_busy == 2'b11)               n_both++;
      if (in_valid && !in_ready)            n_in_stall++;
      if (dut.road_valid && !dut.road_ready) n_road_stall++;
      if (out_valid && !out_ready)          n_out_stall++;
      if (overflow)                         n_ovf++;
      if (in_valid && in_ready && in_word.sof && t_first_in < 0) t_first_in = cyc;
      if (out_valid && out_ready) begin
        out_rec_t e;
        if (exp_q.size() == 0) begin
          check(0, "unexpected output record");
        end else begin
          e = exp_q.pop_front();
          check(out_rec == e, $sformatf("record mismatch ev %0d q %0d p %0d (exp q %0d p %0d mask %h got mask %h)",
                                        out_rec.evid, out_rec.qbin, out_rec.pbin, e.qbin, e.pbin, e.mask, out_rec.mask));
        end
        if (out_rec.event_last) begin
          n_events_out++;
          if (t_first_out < 0) t_first_out = cyc;
        end
      end
    end
  end

  // Output side.
  always @(posedge clk) out_ready <= (n_events_out < 2) ? 1'b1 : ($urandom_range(0, 3) != 0);

  initial begin
    int nr;
    in_valid = 0;
    in_word  = '0;
    for (int e = 0; e < NEV; e++) ev[e] = new(e * 4096 + 1);
    ev[0].add_track(40, 20, -1);  ev[0].add_track(120, 30, -1);
    ev[0].add_track(40, 36, -1);  // same qA/pT row: two roads in one row
    for (int l = 0; l < 8; l++) repeat (5) ev[0].add_noise(l);
    ev[1].add_track(84, 10, 3);
    for (int l = 0; l < 8; l++) repeat (10) ev[1].add_noise(l);
    // ev[2] stays empty
    ev[3].add_track(60, 25, -1);
    repeat (205) ev[3].add_noise(0);
    ev[4].add_track(20, 5, -1); ev[4].add_track(100, 40, 7); ev[4].add_track(150, 15, -1);
    for (int l = 0; l < 8; l++) repeat (30) ev[5].add_noise(l);
    for (int e = 0; e < NEV; e++) begin
      ev[e].expected(HITS_MAX, 7, EVID_W'(e), exp_q, nr, 1'b1);
      nroads_tot += nr;
      if (e == 1) check(nr > 0, "seven-layer track gives a road");
    end
    $display("expected records %0d roads %0d", exp_q.size(), nroads_tot);

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int e = 0; e < NEV; e++) begin
      for (int w = 0; w < ev[e].n_words(); w++) begin
        in_valid <= 1'b1;
        in_word  <= ev[e].word(w);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    while (n_events_out < NEV) @(posedge clk);
    repeat (5) @(posedge clk);

    check(exp_q.size() == 0, "all expected records seen");
    check(cnt_roads == 32'(nroads_tot), "road counter");
    check(t_first_out - t_first_in <= 2000, $sformatf("first event latency %0d", t_first_out - t_first_in));
    check(n_both > 0,       "two events in flight");
    check(n_in_stall > 0,   "input stalled waiting for a bank");
    check(n_road_stall > 0, "road waited for hit recovery");
    check(n_out_stall > 0,  "output back-pressure");
    check(n_ovf > 0,        "hit-store overflow");
    $display("both=%0d in_stall=%0d road_stall=%0d out_stall=%0d ovf=%0d latency=%0d",
             n_both, n_in_stall, n_road_stall, n_out_stall, n_ovf, t_first_out - t_first_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
