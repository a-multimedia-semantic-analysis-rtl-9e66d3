// sasoc: top level of the Semantic Analysis SoC.
//
// An Image-Stream Processing System (ISPS: slice memory, sequencer, RISP with
// LPU and OPU) extracts pixel-level features from a frame; its result stream
// crosses into the Feature-Stream Processing System (FSPS: three-level VPU,
// K-NN processor, vector memories), which packs the features into
// 256-dimension vectors and classifies them. Three clock domains: the root
// clock (clk) runs the System Monitor and the clock unit, which derive
// clk_isps and clk_fsps by integer division and gate them; the monitor can
// rebalance the two ratios at run time from the stall and bubble counts.
//
// Host ports are grouped by domain: isps_* / pix_* / lpu_* / opu_* / om_* are
// sampled on clk_isps, fsps-side ports (ivm, lvm, prog, ovm, knn) on
// clk_fsps, mon_* on clk. Both derived clocks are outputs so the host can
// drive their ports synchronously. rst_n is asynchronous and must be
// asserted with a falling edge: the derived clocks stop during reset, so
// their domains are cleared by that edge, not by a clock. It is released
// while all clocks are stopped or slow enough; reset synchronisers are left
// to the integration. The system partitioning follows the design description;
// port-level details are this design's own choice.
module sasoc #(
  parameter int W      = 160,
  parameter int H      = 120,
  parameter int IDEPTH = 8,
  parameter int LDEPTH = 128,
  parameter int ODEPTH = 128,
  parameter int NPE    = 128,
  parameter int FIFO_DEPTH = 16,
  parameter int MON_WINDOW = 256,
  parameter int MON_THRESH = 32
) (
  input  logic                           clk,
  input  logic                           rst_n,
  output logic                           clk_isps,
  output logic                           clk_fsps,
  // system monitor (clk domain)
  input  logic                           mon_auto,
  input  logic [3:0]                     mon_isps_div,
  input  logic [3:0]                     mon_fsps_div,
  input  logic                           mon_isps_on,
  input  logic                           mon_fsps_on,
  output logic [3:0]                     isps_div,
  output logic [3:0]                     fsps_div,
  output logic                           mon_adjust,
  // ISPS (clk_isps domain)
  input  logic                           pix_we,
  input  logic [$clog2(W)-1:0]           pix_x,
  input  logic [$clog2(H)-1:0]           pix_y,
  input  logic [7:0]                     pix_d,
  input  sasoc_pkg::risp_mode_e          mode,
  input  logic                           lpu_coef_we,
  input  logic [7:0]                     lpu_coef_addr,
  input  logic signed [7:0]              lpu_coef_wdata,
  input  logic [4:0]                     lpu_shift,
  input  logic                           lpu_abs,
  input  sasoc_pkg::opu_op_e             opu_op,
  input  logic [4:0]                     opu_ksize,
  input  logic [7:0]                     opu_rank,
  input  logic                           isps_start,
  output logic                           isps_busy,
  output logic                           isps_done,
  input  logic                           om_re,
  input  logic [$clog2(W)-1:0]           om_rx,
  input  logic [$clog2(H)-1:0]           om_ry,
  output logic [15:0][7:0]               om_rdata,
  output logic                           isps_stall,
  output logic                           lpu_active,
  output logic                           opu_active,
  // FSPS (clk_fsps domain)
  input  logic                           h_ivm_we,
  input  logic [$clog2(IDEPTH)-1:0]      h_ivm_waddr,
  input  logic [2047:0]                  h_ivm_wdata,
  input  logic                           low_we,
  input  logic [$clog2(LDEPTH)-1:0]      low_waddr,
  input  logic [2047:0]                  low_wdata,
  input  logic                           mid_we,
  input  logic [$clog2(LDEPTH)-1:0]      mid_waddr,
  input  logic [255:0]                   mid_wdata,
  input  logic                           high_we,
  input  logic [$clog2(LDEPTH)-1:0]      high_waddr,
  input  logic [48:0]                    high_wdata,
  input  sasoc_pkg::vpu_cfg_t            prog,
  input  logic [$clog2(LDEPTH+1)-1:0]    n_terms,
  input  logic [4:0]                     mid_wshift,
  input  logic signed [31:0]             bias,
  input  logic                           auto_en,
  input  logic                           knn_en,
  input  logic                           fsps_start,
  input  logic [$clog2(IDEPTH)-1:0]      fsps_start_slot,
  input  logic                           ovm_re,
  input  logic [$clog2(ODEPTH)-1:0]      ovm_raddr,
  output logic [32:0]                    ovm_rdata,
  output logic [NPE-1:0]                 knn_valid,
  output logic [NPE-1:0][31:0]           knn_dist,
  output logic [NPE-1:0][15:0]           knn_id,
  output logic [$clog2(NPE+1)-1:0]       knn_count,
  output logic                           fsps_busy,
  output logic                           fsps_done,
  output logic                           fsps_starved
);
  // ---- clocks and monitor ----
  system_monitor #(.WINDOW(MON_WINDOW), .THRESH(MON_THRESH)) u_mon (
    .clk, .rst_n, .auto_en(mon_auto),
    .isps_div_init(mon_isps_div), .fsps_div_init(mon_fsps_div),
    .isps_stalled(isps_stall), .fsps_starved, .isps_busy,
    .isps_div, .fsps_div, .adjust(mon_adjust));

  clock_unit u_clk (
    .clk, .rst_n, .isps_div, .fsps_div,
    .isps_on(mon_isps_on), .fsps_on(mon_fsps_on), .clk_isps, .clk_fsps);

  // ---- ISPS ----
  logic       feat_valid, feat_ready, wfull;
  logic [7:0] feat_data;
  logic [$clog2(W)-1:0] feat_x;
  logic [$clog2(H)-1:0] feat_y;

  isps #(.W(W), .H(H)) u_isps (
    .clk(clk_isps), .rst_n,
    .pix_we, .pix_x, .pix_y, .pix_d, .mode,
    .lpu_coef_we, .lpu_coef_addr, .lpu_coef_wdata, .lpu_shift, .lpu_abs,
    .opu_op, .opu_ksize, .opu_rank,
    .start(isps_start), .busy(isps_busy), .done(isps_done),
    .om_re, .om_rx, .om_ry, .om_rdata,
    .feat_valid, .feat_ready, .feat_data, .feat_x, .feat_y,
    .lpu_active, .opu_active);

  assign feat_ready = !wfull;
  assign isps_stall = isps_busy && wfull;

  // ---- clock-domain crossing ----
  logic       f_valid, f_ready, rempty;
  logic [7:0] f_data;

  async_fifo #(.DW(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk(clk_isps), .wrst_n(rst_n), .winc(feat_valid), .wdata(feat_data), .wfull,
    .rclk(clk_fsps), .rrst_n(rst_n), .rinc(f_valid && f_ready), .rdata(f_data), .rempty);

  assign f_valid = !rempty;

  // ---- FSPS ----
  logic fsps_stall;

  fsps #(.IDEPTH(IDEPTH), .LDEPTH(LDEPTH), .ODEPTH(ODEPTH), .NPE(NPE)) u_fsps (
    .clk(clk_fsps), .rst_n,
    .feat_valid(f_valid), .feat_ready(f_ready), .feat_data(f_data),
    .h_ivm_we, .h_ivm_waddr, .h_ivm_wdata,
    .low_we, .low_waddr, .low_wdata, .mid_we, .mid_waddr, .mid_wdata,
    .high_we, .high_waddr, .high_wdata,
    .prog, .n_terms, .mid_wshift, .bias, .auto_en, .knn_en,
    .start(fsps_start), .start_slot(fsps_start_slot),
    .ovm_re, .ovm_raddr, .ovm_rdata,
    .knn_valid, .knn_dist, .knn_id, .knn_count,
    .busy(fsps_busy), .done(fsps_done), .stall(fsps_stall));

  assign fsps_starved = rempty && !fsps_busy && !fsps_stall;
endmodule
