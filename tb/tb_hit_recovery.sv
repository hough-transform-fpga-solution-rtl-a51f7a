// tb_hit_recovery: recovered hits of given roads against the reference model.
//
// An event with four tracks (one missing a layer) and noise, 190 hits in its
// fullest layer, is held in a hit-store model that answers the block's row
// reads. The roads of the event, as the reference model selects them, are
// fed in order followed by the end-of-event token; every output record is
// compared with the reference record sequence, and event_done must pulse
// once. Pass 1 keeps out_ready high and checks that each road's last record
// appears nrows + 1 clocks after the road is accepted (one clock to accept,
// one per row of 4 hits per layer). Pass 2 repeats with random out_ready.
module tb_hit_recovery;
  import fhtf_pkg::*;
  import fhtf_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic road_valid, road_ready, out_valid, out_ready, event_done;
  road_t road;
  logic [NLAYERS-1:0][7:0] hit_count;
  logic [5:0] rd_row;
  hit_t [NLAYERS-1:0][REC_PER_L-1:0] rd_hits;
  logic [NLAYERS-1:0][REC_PER_L-1:0] rd_valid;
  out_rec_t out_rec;
  logic [31:0] cnt_roads, cnt_hits;

  hit_recovery dut (.*);

  int checks = 0, failures = 0;
  fhtf_event ev;
  out_rec_t exp_q [$];
  road_t roads [$];
  int nrows = 0;
  int n_done = 0;
  bit rand_ready = 0;
  longint cyc = 0, t_acc = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always_comb begin
    for (int l = 0; l < int'(NLAYERS); l++) begin
      hit_count[l] = 8'(ev == null ? 0 : ev.phi[l].size());
      for (int k = 0; k < 4; k++) begin
        int i;
        i = int'(rd_row) * 4 + k;
        rd_hits[l][k]  = '0;
        rd_valid[l][k] = 1'b0;
        if (ev != null && i < ev.phi[l].size()) begin
          rd_valid[l][k]     = 1'b1;
          rd_hits[l][k].phi  = PHI_W'(ev.phi[l][i]);
          rd_hits[l][k].r    = R_W'(ev.r[l][i]);
          rd_hits[l][k].clu  = CLU_W'(ev.clu[l][i]);
        end
      end
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    out_ready <= rand_ready ? 1'($urandom_range(0, 2) != 0) : 1'b1;
    if (rst_n) begin
      if (event_done) n_done++;
      if (road_valid && road_ready) t_acc = cyc;
      if (out_valid && out_ready) begin
        out_rec_t e;
        if (exp_q.size() == 0) check(0, "extra record");
        else begin
          e = exp_q.pop_front();
          check(out_rec == e, $sformatf("record q%0d p%0d", out_rec.qbin, out_rec.pbin));
        end
      end
    end
  end

  // Watch the first clock of each road's last record in pass 1.
  always @(posedge clk)
    if (rst_n && !rand_ready && out_valid && out_rec.road_last && out_ready)
      check(cyc - t_acc == longint'(nrows + 1), $sformatf("road latency %0d, rows %0d", cyc - t_acc, nrows));

  task automatic run_pass(int evid);
    int nr;
    exp_q.delete();
    roads.delete();
    ev.expected(HITS_MAX, 7, EVID_W'(evid), exp_q, nr);
    foreach (exp_q[i]) begin
      road_t rd;
      rd = '0;
      rd.evid = EVID_W'(evid);
      rd.qbin = exp_q[i].qbin;
      rd.pbin = exp_q[i].pbin;
      rd.eoe  = exp_q[i].event_last;
      if (exp_q[i].road_last || exp_q[i].event_last) roads.push_back(rd);
    end
    check(nr > 3, "event has roads");
    n_done = 0;
    foreach (roads[i]) begin
      road_valid <= 1'b1;
      road <= roads[i];
      @(posedge clk);
      while (!road_ready) @(posedge clk);
    end
    road_valid <= 1'b0;
    while (exp_q.size() != 0) @(posedge clk);
    repeat (3) @(posedge clk);
    check(n_done == 1, "event_done pulsed once");
    $display("pass %0d: %0d roads, %0d rows", evid, nr, nrows);
  endtask

  initial begin
    road_valid = 0; road = '0;
    ev = new(77);
    ev.add_track(30, 12, -1); ev.add_track(90, 33, 2);
    ev.add_track(91, 20, -1); ev.add_track(140, 40, -1);
    for (int l = 0; l < 8; l++) repeat (l == 5 ? 186 : 20 + 10 * l) ev.add_noise(l);
    for (int l = 0; l < 8; l++) if ((ev.phi[l].size() + 3) / 4 > nrows) nrows = (ev.phi[l].size() + 3) / 4;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run_pass(1);
    rand_ready = 1;
    run_pass(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
