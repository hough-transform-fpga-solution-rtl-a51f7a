// tb_hit_store: writes, counts, overflow, row reads and clear.
//
// Random hits are written to random layers for 260 clocks, so some layers
// pass the 200-hit limit: their extra hits must be dropped and overflow must
// rise. Every row is then read and each of the 4 x 8 returned hits and
// valid flags compared with a queue model. clear must bring all counts to
// zero, drop overflow and leave no valid hit.
module tb_hit_store;
  import fhtf_pkg::*;

  localparam int ROWS = (HITS_MAX + 3) / 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic clear;
  logic [NLAYERS-1:0] wr_en;
  hit_t [NLAYERS-1:0] wr_hit;
  logic [NLAYERS-1:0][7:0] count;
  logic overflow;
  logic [5:0] rd_row;
  hit_t [NLAYERS-1:0][REC_PER_L-1:0] rd_hits;
  logic [NLAYERS-1:0][REC_PER_L-1:0] rd_valid;

  hit_store dut (.*);

  int checks = 0, failures = 0;
  hit_t model [NLAYERS][$];
  bit   exp_ovf = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    clear = 0; wr_en = '0; wr_hit = '0; rd_row = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 260; t++) begin
      for (int l = 0; l < int'(NLAYERS); l++) begin
        wr_en[l]  = (l < 2) ? 1'b1 : ($urandom_range(0, 2) == 0);
        wr_hit[l] = hit_t'({$urandom(), $urandom()});
        if (wr_en[l]) begin
          if (model[l].size() < HITS_MAX) model[l].push_back(wr_hit[l]);
          else exp_ovf = 1;
        end
      end
      @(posedge clk); #1;
    end
    wr_en = '0;
    #1;
    check(overflow == exp_ovf && exp_ovf, "overflow flag");
    for (int l = 0; l < int'(NLAYERS); l++)
      check(count[l] == 8'(model[l].size()), $sformatf("count layer %0d", l));
    for (int row = 0; row < ROWS; row++) begin
      rd_row = 6'(row);
      #1;
      for (int l = 0; l < int'(NLAYERS); l++)
        for (int k = 0; k < 4; k++) begin
          int i;
          i = row * 4 + k;
          check(rd_valid[l][k] == (i < model[l].size()), $sformatf("valid l%0d i%0d", l, i));
          if (i < model[l].size())
            check(rd_hits[l][k] == model[l][i], $sformatf("hit l%0d i%0d", l, i));
        end
    end
    clear = 1;
    @(posedge clk); #1;
    clear = 0;
    #1;
    check(!overflow, "overflow cleared");
    for (int l = 0; l < int'(NLAYERS); l++) check(count[l] == 0, "count cleared");
    rd_row = 0; #1;
    check(rd_valid == '0, "no valid hit after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
