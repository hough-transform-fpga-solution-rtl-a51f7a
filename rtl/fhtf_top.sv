// fhtf_top: Hough transform track filter with its clock-domain crossings.
//
// Events enter on clk_in as words of up to eight hits (one per detector
// layer: radius, azimuth and cluster id) framed by sof/eof. An
// independent-clock FIFO carries them into the processing domain clk_core,
// where fhtf_core builds the eight superimposed Hough accumulators of each
// event, selects the bins crossed in at least THRESHOLD layers and recovers
// the hits that generated them. A second independent-clock FIFO carries the
// result records to clk_out. Running the acquisition, the processing and the
// result side on their own clock sources joined by FIFOs follows the published
// design; which blocks sit in which domain, and the FIFO depths, are
// this design's choice. The clock generators (MMCM/PLL) and the host link are
// outside this module: the three clocks and the two streams are ports.
//
// Handshakes: in_valid/in_ready on clk_in, out_valid/out_ready on clk_out,
// both transfer on a clock where valid and ready are high. The status
// outputs belong to clk_core. The three resets are asserted together.
module fhtf_top
  import fhtf_pkg::*;
#(
  parameter int unsigned THRESHOLD  = 7,
  parameter int unsigned SEG_LEN    = 8,
  parameter int unsigned DEPTH      = HITS_MAX,
  parameter int unsigned FIFO_AW    = 4,
  parameter int          Q_MIN      = Q_MIN_DEF,
  parameter int          Q_STEP     = Q_STEP_DEF,
  parameter int unsigned QSHIFT     = QSHIFT_DEF,
  parameter int          PHI0_MIN   = PHI0_MIN_DEF,
  parameter int unsigned PHI0_SHIFT = PHI0_SHIFT_DEF,
  parameter bit          LOOP_PHI0  = 1'b0,
  parameter int unsigned ZF         = ZF_DEF
) (
  input  logic        clk_in,
  input  logic        rst_in_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  in_word_t    in_word,

  input  logic        clk_core,
  input  logic        rst_core_n,
  output logic [1:0]  bank_busy,
  output logic        overflow,
  output logic [31:0] cnt_roads,
  output logic [31:0] cnt_hits,

  input  logic        clk_out,
  input  logic        rst_out_n,
  output logic        out_valid,
  input  logic        out_ready,
  output out_rec_t    out_rec
);

  localparam int unsigned IW = $bits(in_word_t);
  localparam int unsigned OW = $bits(out_rec_t);

  logic     ififo_full, ififo_empty;
  logic     core_in_ready;
  logic [IW-1:0] core_in_bits;
  logic     ofifo_full, ofifo_empty;
  logic     core_out_valid;
  out_rec_t core_out_rec;
  logic [OW-1:0] out_bits;

  async_fifo #(.WIDTH(IW), .AW(FIFO_AW)) u_in_fifo (
    .wclk  (clk_in),   .wrst_n(rst_in_n),
    .wr_en (in_valid && !ififo_full),
    .wdata (in_word),
    .full  (ififo_full),
    .rclk  (clk_core), .rrst_n(rst_core_n),
    .rd_en (core_in_ready && !ififo_empty),
    .rdata (core_in_bits),
    .empty (ififo_empty)
  );
  assign in_ready = !ififo_full;

  fhtf_core #(
    .THRESHOLD(THRESHOLD), .SEG_LEN(SEG_LEN), .DEPTH(DEPTH),
    .Q_MIN(Q_MIN), .Q_STEP(Q_STEP), .QSHIFT(QSHIFT),
    .PHI0_MIN(PHI0_MIN), .PHI0_SHIFT(PHI0_SHIFT), .LOOP_PHI0(LOOP_PHI0), .ZF(ZF)
  ) u_core (
    .clk      (clk_core),
    .rst_n    (rst_core_n),
    .in_valid (!ififo_empty),
    .in_ready (core_in_ready),
    .in_word  (in_word_t'(core_in_bits)),
    .out_valid(core_out_valid),
    .out_ready(!ofifo_full),
    .out_rec  (core_out_rec),
    .bank_busy(bank_busy),
    .overflow (overflow),
    .cnt_roads(cnt_roads),
    .cnt_hits (cnt_hits)
  );

  async_fifo #(.WIDTH(OW), .AW(FIFO_AW)) u_out_fifo (
    .wclk  (clk_core), .wrst_n(rst_core_n),
    .wr_en (core_out_valid && !ofifo_full),
    .wdata (core_out_rec),
    .full  (ofifo_full),
    .rclk  (clk_out),  .rrst_n(rst_out_n),
    .rd_en (out_ready && !ofifo_empty),
    .rdata (out_bits),
    .empty (ofifo_empty)
  );
  assign out_valid = !ofifo_empty;
  assign out_rec   = out_rec_t'(out_bits);

endmodule
