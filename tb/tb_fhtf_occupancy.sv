// tb_fhtf_occupancy: the filter at full hit-store occupancy.
//
// Two events fill every layer to its 200-hit capacity (1600 hits per event):
// three tracks each plus noise spread over the whole 16-bit azimuth range.
// The events are sent back to back with the output always ready. Every
// record is compared with the reference model. For each event the time from
// its first accepted word to its end-of-event record is measured and must
// not exceed the design's own bound: 200 words, 22 drain clocks, a
// 168-row scan, and per road one scan clock plus 51 recovery clocks
// (a few clocks of slack allowed). The measured time is also compared with
// the 2000-clock (5 us at 400 MHz) processing-time goal and reported.
module tb_fhtf_occupancy;
  import fhtf_pkg::*;
  import fhtf_ref_pkg::*;

  localparam int NEV = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, overflow;
  in_word_t in_word;
  out_rec_t out_rec;
  logic [1:0] bank_busy;
  logic [31:0] cnt_roads, cnt_hits;

  fhtf_core dut (.*);

  int checks = 0, failures = 0;
  fhtf_event ev [NEV];
  out_rec_t  exp_q [$];
  int        nroads [NEV];
  longint    t_in [NEV], t_out [NEV];
  int        n_in_ev = 0, n_out_ev = 0;
  longint    cyc = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  assign out_ready = 1'b1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (in_valid && in_ready && in_word.sof) begin t_in[n_in_ev] = cyc; n_in_ev++; end
      if (out_valid && out_ready) begin
        out_rec_t e;
        if (exp_q.size() == 0) check(0, "unexpected record");
        else begin
          e = exp_q.pop_front();
          check(out_rec == e, $sformatf("record ev %0d q %0d p %0d", out_rec.evid, out_rec.qbin, out_rec.pbin));
        end
        if (out_rec.event_last) begin t_out[n_out_ev] = cyc; n_out_ev++; end
      end
    end
  end

  initial begin
    in_valid = 0; in_word = '0;
    for (int e = 0; e < NEV; e++) begin
      ev[e] = new(e * 8192 + 5);
      ev[e].add_track(50 + 40 * e, 10, -1);
      ev[e].add_track(100, 30 - 5 * e, -1);
      ev[e].add_track(140 - 30 * e, 40, 4);
      for (int l = 0; l < 8; l++)
        while (ev[e].phi[l].size() < HITS_MAX)
          ev[e].add_hit(l, int'($urandom_range(0, 65535)), 1000 + 400 * l + int'($urandom_range(0, 60)));
      ev[e].expected(HITS_MAX, 7, EVID_W'(e), exp_q, nroads[e]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int e = 0; e < NEV; e++)
      for (int w = 0; w < ev[e].n_words(); w++) begin
        in_valid <= 1'b1;
        in_word  <= ev[e].word(w);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    in_valid <= 1'b0;
    while (n_out_ev < NEV) @(posedge clk);
    check(exp_q.size() == 0, "all records seen");
    check(!overflow, "no overflow at exactly 200 hits per layer");
    for (int e = 0; e < NEV; e++) begin
      longint t, bound;
      t = t_out[e] - t_in[e];
      bound = 200 + 22 + 168 + 52 * nroads[e] + 8;
      // the second event also waits for the first one's readout
      if (e > 0) bound += 52 * nroads[e-1] + 168;
      check(t <= bound, $sformatf("event %0d took %0d clocks, bound %0d", e, t, bound));
      $display("event %0d: 1600 hits, %0d roads, %0d clocks (%s 2000-clock goal)",
               e, nroads[e], t, (t <= 2000) ? "within" : "above");
    end
    check(nroads[0] > 0 && nroads[1] > 0, "tracks found under full occupancy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
