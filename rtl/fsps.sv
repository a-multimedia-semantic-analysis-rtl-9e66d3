// fsps: Feature-Stream Processing System, the Machine-Learning Engine.
//
// Input Vector Memory, three-level VPU (with its Local Vector Memories),
// K-NN Processor attached to the High-Level VPU, Output Vector Memory and the
// controller that turns incoming feature vectors into classifications. Every
// term's high-level value t (a distance when the program computes distances)
// is offered to the K-NN processor together with the term index, which ranks
// the database entries by distance while the classification runs. The host
// loads the LVMs, can write and start IVM vectors itself and reads the OVM.
// Timing: a classification of n terms takes n issue cycles plus the 4-cycle
// VPU latency plus one cycle to write the OVM. The block structure follows
// the design description; the interfaces are this design's own choice.
module fsps #(
  parameter int DIM    = sasoc_pkg::VDIM,
  parameter int EW     = sasoc_pkg::VEL_W,
  parameter int LANES  = sasoc_pkg::MID_LANES,
  parameter int IDEPTH = 8,
  parameter int LDEPTH = 128,
  parameter int ODEPTH = 128,
  parameter int NPE    = 128
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // feature stream
  input  logic                        feat_valid,
  output logic                        feat_ready,
  input  logic [EW-1:0]               feat_data,
  // host: IVM
  input  logic                        h_ivm_we,
  input  logic [$clog2(IDEPTH)-1:0]   h_ivm_waddr,
  input  logic [DIM*EW-1:0]           h_ivm_wdata,
  // host: LVMs
  input  logic                        low_we,
  input  logic [$clog2(LDEPTH)-1:0]   low_waddr,
  input  logic [DIM*EW-1:0]           low_wdata,
  input  logic                        mid_we,
  input  logic [$clog2(LDEPTH)-1:0]   mid_waddr,
  input  logic [LANES*16-1:0]         mid_wdata,
  input  logic                        high_we,
  input  logic [$clog2(LDEPTH)-1:0]   high_waddr,
  input  logic [48:0]                 high_wdata,
  // program
  input  sasoc_pkg::vpu_cfg_t         prog,
  input  logic [$clog2(LDEPTH+1)-1:0] n_terms,
  input  logic [4:0]                  mid_wshift,
  input  logic signed [31:0]          bias,
  input  logic                        auto_en,
  input  logic                        knn_en,
  input  logic                        start,
  input  logic [$clog2(IDEPTH)-1:0]   start_slot,
  // host: OVM
  input  logic                        ovm_re,
  input  logic [$clog2(ODEPTH)-1:0]   ovm_raddr,
  output logic [32:0]                 ovm_rdata,
  // K-NN ranking
  output logic [NPE-1:0]              knn_valid,
  output logic [NPE-1:0][31:0]        knn_dist,
  output logic [NPE-1:0][15:0]        knn_id,
  output logic [$clog2(NPE+1)-1:0]    knn_count,
  // status
  output logic                        busy,
  output logic                        done,
  output logic                        stall
);
  import sasoc_pkg::*;
  localparam int IW = $clog2(IDEPTH);
  localparam int LW = $clog2(LDEPTH);

  logic              c_ivm_we, ivm_we, ivm_re, issue, res_valid, res_dec, ovm_we;
  logic              term_valid, knn_clr;
  logic [IW-1:0]     c_ivm_waddr, ivm_waddr, ivm_raddr;
  logic [DIM*EW-1:0] c_ivm_wdata, ivm_wdata, ivm_rdata;
  logic [LW-1:0]     lvm_addr, term_id;
  logic [$clog2(ODEPTH)-1:0] ovm_waddr;
  logic [32:0]       ovm_wdata;
  logic signed [31:0] res_acc, term_t;
  vpu_cfg_t          cfg;

  // host IVM writes take priority over the packer
  assign ivm_we    = h_ivm_we || c_ivm_we;
  assign ivm_waddr = h_ivm_we ? h_ivm_waddr : c_ivm_waddr;
  assign ivm_wdata = h_ivm_we ? h_ivm_wdata : c_ivm_wdata;

  fsps_controller #(.DIM(DIM), .EW(EW), .IDEPTH(IDEPTH), .LDEPTH(LDEPTH), .ODEPTH(ODEPTH)) u_ctl (
    .clk, .rst_n, .feat_valid, .feat_ready, .feat_data,
    .prog, .n_terms, .auto_en, .knn_en, .start, .start_slot,
    .ivm_we(c_ivm_we), .ivm_waddr(c_ivm_waddr), .ivm_wdata(c_ivm_wdata),
    .ivm_re, .ivm_raddr, .issue, .lvm_addr, .cfg,
    .res_valid, .res_acc, .res_dec, .ovm_we, .ovm_waddr, .ovm_wdata,
    .knn_clr, .busy, .done, .stall);

  vector_mem #(.WIDTH(DIM*EW), .DEPTH(IDEPTH)) u_ivm (
    .clk, .we(ivm_we), .waddr(ivm_waddr), .wdata(ivm_wdata),
    .re(ivm_re), .raddr(ivm_raddr), .rdata(ivm_rdata));

  vpu #(.DIM(DIM), .EW(EW), .LANES(LANES), .AW(32), .LDEPTH(LDEPTH)) u_vpu (
    .clk, .rst_n,
    .low_we, .low_waddr, .low_wdata, .mid_we, .mid_waddr, .mid_wdata,
    .high_we, .high_waddr, .high_wdata,
    .mid_wshift, .bias,
    .issue, .lvm_addr, .cfg, .id(lvm_addr), .a(ivm_rdata),
    .term_valid, .term_id, .term_t, .res_valid, .res_acc, .res_dec);

  knn_processor #(.NPE(NPE), .DW(32), .IDW(16)) u_knn (
    .clk, .rst_n, .clr(knn_clr), .in_valid(term_valid && knn_en),
    .in_dist(term_t), .id(16'(term_id)),
    .pe_valid(knn_valid), .pe_dist(knn_dist), .pe_id(knn_id), .count(knn_count));

  vector_mem #(.WIDTH(33), .DEPTH(ODEPTH)) u_ovm (
    .clk, .we(ovm_we), .waddr(ovm_waddr), .wdata(ovm_wdata),
    .re(ovm_re), .raddr(ovm_raddr), .rdata(ovm_rdata));
endmodule
