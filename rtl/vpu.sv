// vpu: three-level Vector Processing Unit of the Machine-Learning Engine.
//
// Low level: 256 lanes of element-wise arithmetic between the input vector
// and a model vector of the Low-Level Local Vector Memory (LVM).
// Mid level: reduction to 16 partial sums and one scalar, optionally weighted
// by a 16-entry vector of the Mid-Level LVM.
// High level: scalar exponential / decision stump, weighting by an entry of the
// High-Level LVM ({pol, thr, weight}) and accumulation over the terms of one
// classification.
// One term (one input vector against one model entry, e.g. one support
// vector, one Gaussian, one weak classifier or one database vector) is issued
// per cycle. Timing: issue (valid, lvm_addr, cfg, id) in cycle t reads the
// three LVMs; the input vector a must be presented in cycle t+1 (the Input
// Vector Memory read issued in cycle t); the low and mid results are
// registered in t+1 and t+2, and term_* / res_* appear in cycle t+4.
// Throughput: 256 dimensions per cycle. Host writes load the LVMs. A model
// entry can bypass a level with the pass operations (VL_PASS_A, VM_SUM,
// VH_PASS), which is how an input reaches a higher level directly. The three
// levels, the per-level LVMs and the 256-dimension parallelism follow the
// design description; the pipeline, the split of work between the levels and
// the memory words are this design's own choice.
module vpu #(
  parameter int DIM    = sasoc_pkg::VDIM,
  parameter int EW     = sasoc_pkg::VEL_W,
  parameter int LANES  = sasoc_pkg::MID_LANES,
  parameter int AW     = sasoc_pkg::ACC_W,
  parameter int LDEPTH = 128
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // host loads of the local vector memories
  input  logic                        low_we,
  input  logic [$clog2(LDEPTH)-1:0]   low_waddr,
  input  logic [DIM*EW-1:0]           low_wdata,
  input  logic                        mid_we,
  input  logic [$clog2(LDEPTH)-1:0]   mid_waddr,
  input  logic [LANES*16-1:0]         mid_wdata,
  input  logic                        high_we,
  input  logic [$clog2(LDEPTH)-1:0]   high_waddr,
  input  logic [AW+16:0]              high_wdata,   // {pol, thr[AW-1:0], weight[15:0]}
  // settings of the current classification
  input  logic [4:0]                  mid_wshift,
  input  logic signed [AW-1:0]        bias,
  // term issue
  input  logic                        issue,
  input  logic [$clog2(LDEPTH)-1:0]   lvm_addr,
  input  sasoc_pkg::vpu_cfg_t         cfg,
  input  logic [$clog2(LDEPTH)-1:0]   id,
  input  logic [DIM*EW-1:0]           a,
  // results
  output logic                        term_valid,
  output logic [$clog2(LDEPTH)-1:0]   term_id,
  output logic signed [AW-1:0]        term_t,
  output logic                        res_valid,
  output logic signed [AW-1:0]        res_acc,
  output logic                        res_dec
);
  import sasoc_pkg::*;
  localparam int IDW = $clog2(LDEPTH);
  localparam int LW  = 2 * EW + 2;

  typedef struct packed {
    logic           v;
    vpu_cfg_t       cfg;
    logic [IDW-1:0] id;
  } ctl_t;

  logic [DIM*EW-1:0]   low_b;
  logic [LANES*16-1:0] mid_w;
  logic [AW+16:0]      high_e;

  vector_mem #(.WIDTH(DIM*EW),   .DEPTH(LDEPTH)) u_lvm_low (
    .clk, .we(low_we), .waddr(low_waddr), .wdata(low_wdata),
    .re(issue), .raddr(lvm_addr), .rdata(low_b));
  vector_mem #(.WIDTH(LANES*16), .DEPTH(LDEPTH)) u_lvm_mid (
    .clk, .we(mid_we), .waddr(mid_waddr), .wdata(mid_wdata),
    .re(issue), .raddr(lvm_addr), .rdata(mid_w));
  vector_mem #(.WIDTH(AW+17),    .DEPTH(LDEPTH)) u_lvm_high (
    .clk, .we(high_we), .waddr(high_waddr), .wdata(high_wdata),
    .re(issue), .raddr(lvm_addr), .rdata(high_e));

  // control pipeline: c1 = operands ready, c2 = low done, c3 = mid done
  ctl_t c1, c2, c3;
  logic [LANES*16-1:0] mid_w2;
  logic [AW+16:0]      high_e2, high_e3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1 <= '0; c2 <= '0; c3 <= '0;
    end else begin
      c1 <= '{v: issue, cfg: cfg, id: id};
      c2 <= c1;
      c3 <= c2;
    end
  end

  // low level
  logic [DIM-1:0][LW-1:0] low_y, low_q;
  vpu_low #(.DIM(DIM), .EW(EW), .LW(LW)) u_low (
    .op(c1.cfg.vl_op), .a(a), .b(low_b), .y(low_y));

  always_ff @(posedge clk) begin
    if (c1.v) begin
      low_q   <= low_y;
      mid_w2  <= mid_w;
      high_e2 <= high_e;
    end
  end

  // mid level
  logic signed [AW-1:0]     mid_s, mid_q;
  vpu_mid #(.DIM(DIM), .LANES(LANES), .LW(LW), .AW(AW)) u_mid (
    .op(c2.cfg.vm_op), .wshift(mid_wshift), .x(low_q), .w(mid_w2),
    .s(mid_s));

  always_ff @(posedge clk) begin
    if (c2.v) begin
      mid_q   <= mid_s;
      high_e3 <= high_e2;
    end
  end

  // high level
  vpu_high #(.AW(AW), .IDW(IDW)) u_high (
    .clk, .rst_n, .in_valid(c3.v), .cfg(c3.cfg), .in_id(c3.id), .s(mid_q),
    .weight(high_e3[15:0]), .thr(high_e3[AW+15:16]), .pol(high_e3[AW+16]),
    .bias, .term_valid, .term_id, .term_t, .res_valid, .res_acc, .res_dec);
endmodule
