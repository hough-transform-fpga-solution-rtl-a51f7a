// tb_accumulator: random bin writes against a bit-array model.
//
// Every clock each of the 168 rows gets a random write request with a random
// bank bit and phi0 bin; only requests for this accumulator's bank may mark a
// bin. After a burst of writes all rows are read back through rd_row and
// compared with the model, then clear must empty every row; a second burst
// checks that writes continue after clear. The per-column write port (used
// with the phi0-loop line drawer) gets random requests in the same clocks.
module tb_accumulator;
  import fhtf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic clear;
  logic [NQ-1:0] set_valid, set_bank;
  logic [NQ-1:0][PHI0BIN_W-1:0] set_bin;
  logic [NPHI0-1:0] col_valid, col_bank;
  logic [NPHI0-1:0][QBIN_W-1:0] col_row;
  logic [QBIN_W-1:0] rd_row;
  logic [NPHI0-1:0] rd_bits;

  accumulator #(.BANK(1'b1)) dut (.*);

  int checks = 0, failures = 0;
  logic [NPHI0-1:0] model [NQ];

  task automatic burst(int ncyc);
    for (int t = 0; t < ncyc; t++) begin
      for (int n = 0; n < int'(NQ); n++) begin
        set_valid[n] = ($urandom_range(0, 4) == 0);
        set_bank[n]  = 1'($urandom_range(0, 1));
        set_bin[n]   = PHI0BIN_W'($urandom_range(0, NPHI0 - 1));
        if (set_valid[n] && set_bank[n]) model[n][set_bin[n]] = 1'b1;
      end
      for (int m = 0; m < int'(NPHI0); m++) begin
        col_valid[m] = ($urandom_range(0, 2) == 0);
        col_bank[m]  = 1'($urandom_range(0, 1));
        col_row[m]   = QBIN_W'($urandom_range(0, NQ - 1));
        if (col_valid[m] && col_bank[m]) model[col_row[m]][m] = 1'b1;
      end
      @(posedge clk);
      #1;
    end
    set_valid = '0;
    col_valid = '0;
  endtask

  task automatic compare(string what);
    for (int n = 0; n < int'(NQ); n++) begin
      rd_row = QBIN_W'(n);
      #1;
      checks++;
      if (rd_bits !== model[n]) begin
        failures++;
        if (failures < 10) $display("FAIL %s row %0d exp %h got %h", what, n, model[n], rd_bits);
      end
    end
  endtask

  initial begin
    clear = 0; set_valid = '0; set_bank = '0; set_bin = '0; rd_row = '0;
    col_valid = '0; col_bank = '0; col_row = '0;
    foreach (model[n]) model[n] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    compare("after reset");
    burst(6);
    compare("burst 1");
    clear = 1;
    @(posedge clk); #1;
    clear = 0;
    foreach (model[n]) model[n] = '0;
    compare("after clear");
    burst(3);
    compare("burst 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
