// tb_peak_finder: road selection from random accumulator contents.
//
// The testbench holds eight layer accumulators as bit arrays and answers the
// peak finder's row reads from them. Contents are random with dense columns
// so that counts of 7 and 8 layers, plateaus and neighbouring peaks occur.
// The roads received are compared, in order, with a direct evaluation of the
// rule (count >= 7, above the two left neighbours, not below the two right
// ones). Scan 1 runs with road_ready always high and checks the clock count:
// one clock per row plus one per road plus the end token. Scan 2 toggles
// road_ready at random and must give the same roads.
module tb_peak_finder;
  import fhtf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start;
  logic [EVID_W-1:0] start_evid;
  logic [QBIN_W-1:0] rd_row;
  logic [NLAYERS-1:0][NPHI0-1:0] row_bits;
  logic road_valid, road_ready, busy;
  road_t road;

  peak_finder dut (.*);

  int checks = 0, failures = 0;
  logic [NPHI0-1:0] acc [NLAYERS][NQ];
  int exp_q [$];
  bit rand_ready = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always_comb
    for (int l = 0; l < int'(NLAYERS); l++)
      row_bits[l] = (rd_row < NQ) ? acc[l][rd_row] : '0;

  always @(posedge clk) road_ready <= rand_ready ? 1'($urandom_range(0, 1)) : 1'b1;

  function automatic void fill_and_expect();
    int cnt [NPHI0];
    exp_q.delete();
    for (int q = 0; q < int'(NQ); q++) begin
      for (int l = 0; l < int'(NLAYERS); l++)
        for (int c = 0; c < int'(NPHI0); c++)
          acc[l][q][c] = ((q + c) % 5 == 0) ? ($urandom_range(0, 9) != 0) : ($urandom_range(0, 5) == 0);
      for (int c = 0; c < int'(NPHI0); c++) begin
        cnt[c] = 0;
        for (int l = 0; l < int'(NLAYERS); l++) cnt[c] += int'(acc[l][q][c]);
      end
      for (int c = 0; c < int'(NPHI0); c++) begin
        int a, b, d, e;
        a = (c >= 2) ? cnt[c-2] : 0;
        b = (c >= 1) ? cnt[c-1] : 0;
        d = (c + 1 < int'(NPHI0)) ? cnt[c+1] : 0;
        e = (c + 2 < int'(NPHI0)) ? cnt[c+2] : 0;
        if (cnt[c] >= 7 && cnt[c] > a && cnt[c] > b && cnt[c] >= d && cnt[c] >= e)
          exp_q.push_back(q * 64 + c);
      end
    end
  endfunction

  task automatic scan(int evid, output int cycles);
    int nexp;
    bit got_end;
    nexp = exp_q.size();
    start_evid = EVID_W'(evid);
    start = 1;
    @(posedge clk); #1;
    start = 0;
    cycles = 0;
    got_end = 0;
    while (!got_end) begin
      cycles++;
      @(posedge clk);
      if (road_valid && road_ready) begin
        check(road.evid == EVID_W'(evid), "event id");
        if (road.eoe) got_end = 1;
        else if (exp_q.size() == 0) check(0, "extra road");
        else begin
          int e;
          e = exp_q.pop_front();
          check(int'(road.qbin) == e / 64 && int'(road.pbin) == e % 64,
                $sformatf("road q%0d p%0d exp q%0d p%0d", road.qbin, road.pbin, e / 64, e % 64));
        end
      end
      #1;
    end
    check(exp_q.size() == 0, "all roads received");
    check(!busy, "idle after end token");
    $display("scan evid %0d: %0d roads, %0d clocks", evid, nexp, cycles);
  endtask

  initial begin
    int cyc, nexp;
    start = 0; start_evid = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    fill_and_expect();
    nexp = exp_q.size();
    check(nexp > 5, "enough candidates generated");
    scan(3, cyc);
    check(cyc == int'(NQ) + nexp + 1, $sformatf("scan clocks %0d, expected %0d", cyc, int'(NQ) + nexp + 1));
    rand_ready = 1;
    fill_and_expect();
    scan(4, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
