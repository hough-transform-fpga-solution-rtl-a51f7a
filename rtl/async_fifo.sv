// async_fifo: first-in first-out buffer between two independent clocks.
//
// The design runs its blocks on separate clock sources and joins them with
// independent-clock FIFOs, as the published design recommends for placing
// and routing at high frequency. This is a conventional implementation of
// such a FIFO (the published design gives only its function): a dual-clock
// storage array, binary read and write pointers with one extra wrap bit,
// their Gray-coded copies passed to the other side through two-flop
// synchronisers, full computed in the write domain and empty in the read
// domain. Both flags are conservative: they clear a few clocks after the
// other side has moved.
//
// Interface: write side wr_en/wdata/full on wclk, read side rd_en/rdata/
// empty on rclk. rdata shows the oldest word whenever empty is low
// (first-word fall-through); rd_en removes it. Writes while full and reads
// while empty are ignored. Each side has its own active-low reset; both must
// be asserted together.
module async_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned AW    = 4        // depth = 2**AW
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);

  logic [WIDTH-1:0] mem [2**AW];

  logic [AW:0] wbin_q, wgray_q, rbin_q, rgray_q;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen by the write side
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen by the read side

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // Write domain.
  logic [AW:0] wbin_n;
  assign wbin_n = wbin_q + (AW+1)'(wr_en && !full);

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin_q[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin_q   <= '0;
      wgray_q  <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin_q   <= wbin_n;
      wgray_q  <= bin2gray(wbin_n);
      rgray_w1 <= rgray_q;
      rgray_w2 <= rgray_w1;
    end
  end

  // Full when the write pointer is one lap ahead of the read pointer.
  assign full = (wgray_q == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // Read domain.
  logic [AW:0] rbin_n;
  assign rbin_n = rbin_q + (AW+1)'(rd_en && !empty);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin_q   <= '0;
      rgray_q  <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin_q   <= rbin_n;
      rgray_q  <= bin2gray(rbin_n);
      wgray_r1 <= wgray_q;
      wgray_r2 <= wgray_r1;
    end
  end

  assign empty = (rgray_q == wgray_r2);
  assign rdata = mem[rbin_q[AW-1:0]];

  initial assert (AW >= 2) else $error("async_fifo: AW must be at least 2");

endmodule
