// tb_line_drawer: checks every qA/pT bin of every drawn line against a direct
// evaluation of the line rule, and the per-segment latency.
//
// Random hits (random valid and bank bits) are applied every clock. For each
// bin n of segment s = n / 8, the outputs in a clock must equal the line of
// the hit applied s+1 clocks earlier: valid only when that hit was valid and
// its crossing lies inside the 48 phi0 bins, the same bank bit, and the phi0
// bin computed directly from phi * 2^12 + r * q(n).
module tb_line_drawer;
  import fhtf_pkg::*;
  import fhtf_ref_pkg::*;

  localparam int SEG = 8;
  localparam int NCYC = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_bank;
  logic [PHI_W-1:0] in_phi;
  logic [R_W-1:0]   in_r;
  logic [NQ-1:0] out_valid, out_bank;
  logic [NQ-1:0][PHI0BIN_W-1:0] out_bin;

  line_drawer dut (.*);

  int checks = 0, failures = 0;
  // History of applied inputs, index = clock number.
  bit h_v [NCYC+40];
  bit h_b [NCYC+40];
  int h_phi [NCYC+40];
  int h_r [NCYC+40];
  int n_in = 0, n_out = 0;

  initial begin
    in_valid = 0; in_bank = 0; in_phi = 0; in_r = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NCYC + 30; t++) begin
      // drive inputs for clock t
      h_v[t]   = (t < NCYC) && ($urandom_range(0, 3) != 0);
      h_b[t]   = 1'($urandom_range(0, 1));
      h_phi[t] = RPHI0_MIN - 3000 + int'($urandom_range(0, 9000));
      if (t % 7 == 0) h_phi[t] = int'($urandom_range(0, 65535));
      h_r[t]   = int'($urandom_range(0, 4095));
      in_valid <= h_v[t]; in_bank <= h_b[t];
      in_phi <= PHI_W'(h_phi[t]); in_r <= R_W'(h_r[t]);
      @(posedge clk);
      #1;
      // after edge t, stage s holds the hit of clock t - s
      for (int n = 0; n < int'(NQ); n++) begin
        int s, src, c;
        bit ev;
        s   = n / SEG;
        src = t - s;
        ev  = 0; c = -1;
        if (src >= 0) begin
          c  = ref_col(h_phi[src], h_r[src], n);
          ev = h_v[src] && (c >= 0);
        end
        checks++;
        if (out_valid[n] !== ev || (ev && (out_bin[n] != PHI0BIN_W'(c) || out_bank[n] != h_b[src]))) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d bin %0d exp v%0d c%0d got v%0d c%0d", t, n, ev, c, out_valid[n], out_bin[n]);
        end
        if (ev) n_out++;
      end
      if (h_v[t]) n_in++;
    end
    checks++;
    if (n_out == 0 || n_in == 0) failures++;
    $display("hits %0d crossings %0d", n_in, n_out);
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
