// isps: Image-Stream Processing System: Slice Memory, Sequencer and RISP.
//
// The host writes a frame into the Slice Memory one pixel at a time
// (pix_we/pix_x/pix_y/pix_d), sets the RISP mode and unit configuration and
// pulses start. The Sequencer then streams 16-pixel (128-bit) stripes from the
// Slice Memory into the RISP, one per cycle, and the RISP writes its results
// to Output Memory 0 and emits them on the feature stream (feat_*), in raster
// order of window positions. feat_ready = 0 stalls the whole system (stripes,
// windows and results hold) so that no feature is lost. done pulses when the
// frame is finished. Host writes to the Slice Memory should not overlap a run.
// The structure follows the design description; the host interface and the
// stall are this design's own choice.
module isps #(
  parameter int W     = 160,
  parameter int H     = 120,
  parameter int WIN   = sasoc_pkg::WIN,
  parameter int PIX_W = sasoc_pkg::PIX_W
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // frame input
  input  logic                           pix_we,
  input  logic [$clog2(W)-1:0]           pix_x,
  input  logic [$clog2(H)-1:0]           pix_y,
  input  logic [PIX_W-1:0]               pix_d,
  // configuration
  input  sasoc_pkg::risp_mode_e          mode,
  input  logic                           lpu_coef_we,
  input  logic [$clog2(WIN*WIN)-1:0]     lpu_coef_addr,
  input  logic signed [7:0]              lpu_coef_wdata,
  input  logic [4:0]                     lpu_shift,
  input  logic                           lpu_abs,
  input  sasoc_pkg::opu_op_e             opu_op,
  input  logic [4:0]                     opu_ksize,
  input  logic [$clog2(WIN*WIN)-1:0]     opu_rank,
  // control
  input  logic                           start,
  output logic                           busy,
  output logic                           done,
  // host read of Output Memory 0
  input  logic                           om_re,
  input  logic [$clog2(W)-1:0]           om_rx,
  input  logic [$clog2(H)-1:0]           om_ry,
  output logic [WIN-1:0][PIX_W-1:0]      om_rdata,
  // feature stream towards the FSPS
  output logic                           feat_valid,
  input  logic                           feat_ready,
  output logic [PIX_W-1:0]               feat_data,
  output logic [$clog2(W)-1:0]           feat_x,
  output logic [$clog2(H)-1:0]           feat_y,
  // activity
  output logic                           lpu_active,
  output logic                           opu_active
);
  localparam int XW = $clog2(W);
  localparam int YW = $clog2(H);

  logic          en;
  logic          s1_req, s2_req, sm_re;
  logic [XW-1:0] s1_x, s2_x, sm_rx;
  logic [YW-1:0] s1_y, s2_y, sm_ry;
  logic [WIN-1:0][PIX_W-1:0] sm_rdata;

  assign en = feat_ready;

  slice_memory #(.W(W), .H(H), .PIX_W(PIX_W), .BANKS(WIN)) u_slice (
    .clk, .we(pix_we), .wx(pix_x), .wy(pix_y), .wdata(pix_d),
    .re(sm_re), .rx(sm_rx), .ry(sm_ry), .rdata(sm_rdata));

  isps_sequencer #(.W(W), .H(H), .WIN(WIN)) u_seq (
    .clk, .rst_n, .en, .start, .mode, .busy, .done,
    .s1_req, .s1_x, .s1_y, .s2_req, .s2_x, .s2_y);

  risp #(.W(W), .H(H), .WIN(WIN), .PIX_W(PIX_W)) u_risp (
    .clk, .rst_n, .en, .mode,
    .lpu_coef_we, .lpu_coef_addr, .lpu_coef_wdata, .lpu_shift, .lpu_abs,
    .opu_op, .opu_ksize, .opu_rank,
    .s1_req, .s1_x, .s1_y, .s2_req, .s2_x, .s2_y,
    .sm_re, .sm_rx, .sm_ry, .sm_rdata,
    .om_re, .om_rx, .om_ry, .om_rdata,
    .out_valid(feat_valid), .out_x(feat_x), .out_y(feat_y), .out_data(feat_data),
    .lpu_active, .opu_active);
endmodule
