// tb_async_fifo: data integrity and flags across two unrelated clocks.
//
// A writer on a 7-unit clock and a reader on a 13-unit clock (later an
// 3-unit phase of fast reading) move 600 random words with random pauses on
// both sides. Every word read is compared, in order, with the words written.
// The testbench requires that the FIFO was seen full (writes refused) and
// empty (reads refused), and that it accepts exactly 16 words before full
// when the reader is stopped.
module tb_async_fifo;

  localparam int W = 16;
  localparam int N = 600;

  logic wclk = 1'b0, rclk = 1'b0, rst_n = 1'b0;
  always #7 wclk = ~wclk;
  always #13 rclk = ~rclk;

  logic wr_en, rd_en, full, empty;
  logic [W-1:0] wdata, rdata;

  async_fifo #(.WIDTH(W), .AW(4)) dut (
    .wclk, .wrst_n(rst_n), .wr_en, .wdata, .full,
    .rclk, .rrst_n(rst_n), .rd_en, .rdata, .empty
  );

  int checks = 0, failures = 0;
  logic [W-1:0] sent [$];
  int n_rd = 0, n_full = 0, n_empty = 0, n_wr = 0;
  bit reader_on = 0;
  bit fast = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // Reader.
  always @(posedge rclk) begin
    if (rst_n) begin
      if (rd_en && !empty) begin
        check(sent.size() > 0 && rdata == sent[0], $sformatf("word %0d", n_rd));
        if (sent.size() > 0) void'(sent.pop_front());
        n_rd++;
      end
      if (rd_en && empty) n_empty++;
    end
    rd_en <= reader_on && (fast || $urandom_range(0, 2) != 0);
  end

  initial begin
    wr_en = 0; wdata = '0; rd_en = 0;
    repeat (3) @(posedge wclk);
    #1 rst_n = 1;
    // Fill with the reader stopped: exactly 16 words must go in.
    for (int i = 0; i < 20; i++) begin
      wr_en = 1; wdata = W'($urandom());
      @(posedge wclk);
      if (!full) begin sent.push_back(wdata); n_wr++; end
      else n_full++;
      #1;
    end
    wr_en = 0;
    check(n_wr == 16, $sformatf("accepted %0d words before full", n_wr));
    reader_on = 1;
    while (n_wr < N) begin
      wr_en = ($urandom_range(0, 3) != 0); wdata = W'($urandom());
      @(posedge wclk);
      if (wr_en && !full) begin sent.push_back(wdata); n_wr++; end
      if (wr_en && full) n_full++;
      #1;
      if (n_wr == N / 2) fast = 1;
    end
    wr_en = 0;
    repeat (100) @(posedge rclk);
    check(n_rd == N, $sformatf("read %0d of %0d", n_rd, N));
    check(n_full > 0, "full seen");
    check(n_empty > 0, "empty seen");
    check(empty, "empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge rclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
