// risp: Reconfigurable Image Stream Processor.
//
// Two processing units, the LPU (linear window operations) and the OPU
// (order-statistic window operations), each behind its own 16x16 Local Pixel
// Memory, connected by the Stream Network to the Slice Memory (outside) and to
// a dual Output Memory (inside, two frame memories OM0 and OM1). One window
// position per stage is completed per cycle.
//
// Timing of a stage request (req, x, y) issued in cycle t:
//   t    stripe read from the Slice Memory (stage 1) or OM1 (stage 2)
//   t+1  stripe shifted into the unit's Local Pixel Memory
//   t+2  if x >= 15 the window (x-15..x, y..y+15) is complete; unit computes
//        (stage 2 only up to x = W-16: the image of stage 1 is W-15 wide)
//   t+3  result written to OM0 or OM1 at (x-15, y); a final result also
//        appears on the out_* stream
// en = 0 freezes every pipeline register and memory access (back-pressure).
// OM0 has a second, stripe-wide read port for the host. The units, the Local
// Pixel Memories, the dual Output Memory, the Stream Network and the four
// modes follow the design description; the pipeline timing and the way the
// second stage uses OM1 are this design's own choice.
module risp #(
  parameter int W     = 160,
  parameter int H     = 120,
  parameter int WIN   = sasoc_pkg::WIN,
  parameter int PIX_W = sasoc_pkg::PIX_W
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           en,
  input  sasoc_pkg::risp_mode_e          mode,
  // LPU configuration
  input  logic                           lpu_coef_we,
  input  logic [$clog2(WIN*WIN)-1:0]     lpu_coef_addr,
  input  logic signed [7:0]              lpu_coef_wdata,
  input  logic [4:0]                     lpu_shift,
  input  logic                           lpu_abs,
  // OPU configuration
  input  sasoc_pkg::opu_op_e             opu_op,
  input  logic [4:0]                     opu_ksize,
  input  logic [$clog2(WIN*WIN)-1:0]     opu_rank,
  // stage requests from the sequencer
  input  logic                           s1_req,
  input  logic [$clog2(W)-1:0]           s1_x,
  input  logic [$clog2(H)-1:0]           s1_y,
  input  logic                           s2_req,
  input  logic [$clog2(W)-1:0]           s2_x,
  input  logic [$clog2(H)-1:0]           s2_y,
  // Slice Memory read port
  output logic                           sm_re,
  output logic [$clog2(W)-1:0]           sm_rx,
  output logic [$clog2(H)-1:0]           sm_ry,
  input  logic [WIN-1:0][PIX_W-1:0]      sm_rdata,
  // host read port of Output Memory 0
  input  logic                           om_re,
  input  logic [$clog2(W)-1:0]           om_rx,
  input  logic [$clog2(H)-1:0]           om_ry,
  output logic [WIN-1:0][PIX_W-1:0]      om_rdata,
  // final result stream
  output logic                           out_valid,
  output logic [$clog2(W)-1:0]           out_x,
  output logic [$clog2(H)-1:0]           out_y,
  output logic [PIX_W-1:0]               out_data,
  // activity, for the system monitor and tests
  output logic                           lpu_active,
  output logic                           opu_active
);
  localparam int XW = $clog2(W);
  localparam int YW = $clog2(H);

  typedef struct packed {
    logic          v;
    logic [XW-1:0] x;
    logic [YW-1:0] y;
  } tag_t;

  tag_t t1a, t1b, t1c;   // stage 1: stripe ready, window ready, result ready
  tag_t t2a, t2b, t2c;   // stage 2

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1a <= '0; t1b <= '0; t1c <= '0;
      t2a <= '0; t2b <= '0; t2c <= '0;
    end else if (en) begin
      t1a <= '{v: s1_req, x: s1_x, y: s1_y};
      t1b <= '{v: t1a.v && (t1a.x >= XW'(WIN - 1)), x: t1a.x - XW'(WIN - 1), y: t1a.y};
      t1c <= t1b;
      t2a <= '{v: s2_req, x: s2_x, y: s2_y};
      t2b <= '{v: t2a.v && (t2a.x >= XW'(WIN - 1)) && (t2a.x <= XW'(W - WIN)), x: t2a.x - XW'(WIN - 1), y: t2a.y};
      t2c <= t2b;
    end
  end

  assign sm_re = s1_req && en;
  assign sm_rx = s1_x;
  assign sm_ry = s1_y;

  // dual output memory
  logic [WIN-1:0][PIX_W-1:0] om1_stripe;
  logic                      om0_we, om1_we, om0_we_g, om1_we_g;
  logic [XW-1:0]             om0_x, om1_x;
  logic [YW-1:0]             om0_y, om1_y;
  logic [PIX_W-1:0]          om0_d, om1_d;

  assign om0_we_g = om0_we && en;
  assign om1_we_g = om1_we && en;

  slice_memory #(.W(W), .H(H), .PIX_W(PIX_W), .BANKS(WIN)) u_om0 (
    .clk, .we(om0_we_g), .wx(om0_x), .wy(om0_y), .wdata(om0_d),
    .re(om_re), .rx(om_rx), .ry(om_ry), .rdata(om_rdata));

  slice_memory #(.W(W), .H(H), .PIX_W(PIX_W), .BANKS(WIN)) u_om1 (
    .clk, .we(om1_we_g), .wx(om1_x), .wy(om1_y), .wdata(om1_d),
    .re(s2_req && en), .rx(s2_x), .ry(s2_y), .rdata(om1_stripe));

  // stream network
  logic [WIN-1:0][PIX_W-1:0]          lpu_stripe, opu_stripe;
  logic                               lpu_sh, opu_sh, lpu_wv, opu_wv;
  logic [WIN-1:0][WIN-1:0][PIX_W-1:0] lpu_win, opu_win;
  logic                               lpu_vld, opu_vld;
  logic [PIX_W-1:0]                   lpu_res, opu_res;

  stream_network #(.WIN(WIN), .PIX_W(PIX_W), .XW(XW), .YW(YW)) u_net (
    .mode,
    .sm_stripe(sm_rdata), .st1_stripe_vld(t1a.v),
    .om1_stripe,          .st2_stripe_vld(t2a.v),
    .st1_win_vld(t1b.v),  .st2_win_vld(t2b.v),
    .lpu_stripe, .lpu_shift(lpu_sh), .lpu_win_vld(lpu_wv),
    .opu_stripe, .opu_shift(opu_sh), .opu_win_vld(opu_wv),
    .lpu_vld, .lpu_res, .opu_vld, .opu_res,
    .st1_x(t1c.x), .st1_y(t1c.y), .st2_x(t2c.x), .st2_y(t2c.y),
    .om0_we, .om0_x, .om0_y, .om0_d,
    .om1_we, .om1_x, .om1_y, .om1_d);

  // local pixel memories and units
  local_pixel_memory #(.WIN(WIN), .PIX_W(PIX_W)) u_lpm_lpu (
    .clk, .rst_n, .shift(lpu_sh && en), .stripe(lpu_stripe), .win(lpu_win));
  local_pixel_memory #(.WIN(WIN), .PIX_W(PIX_W)) u_lpm_opu (
    .clk, .rst_n, .shift(opu_sh && en), .stripe(opu_stripe), .win(opu_win));

  lpu #(.WIN(WIN), .PIX_W(PIX_W)) u_lpu (
    .clk, .rst_n, .en,
    .coef_we(lpu_coef_we), .coef_addr(lpu_coef_addr), .coef_wdata(lpu_coef_wdata),
    .shift(lpu_shift), .abs_en(lpu_abs),
    .in_valid(lpu_wv), .win(lpu_win), .out_valid(lpu_vld), .result(lpu_res));

  opu #(.WIN(WIN), .PIX_W(PIX_W)) u_opu (
    .clk, .rst_n, .en, .op(opu_op), .ksize(opu_ksize), .cfg_rank(opu_rank),
    .in_valid(opu_wv), .win(opu_win), .out_valid(opu_vld), .result(opu_res));

  assign out_valid  = om0_we_g;
  assign out_x      = om0_x;
  assign out_y      = om0_y;
  assign out_data   = om0_d;
  assign lpu_active = lpu_wv && en;
  assign opu_active = opu_wv && en;
endmodule
