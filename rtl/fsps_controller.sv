// fsps_controller: control of the Feature-Stream Processing System.
//
// Two jobs. (1) Feature packing: feature bytes arriving from the ISPS
// (feat_valid/feat_ready) are gathered, element 0 first, into a 256-element
// vector that is written to the next slot of the Input Vector Memory (IVM,
// used as a ring); a completed vector becomes a pending classification.
// feat_ready drops while a complete vector waits for the previous one to be
// taken. (2) Classification: started by a pending vector (auto_en) or by the
// host (start, start_slot; host wins), it issues terms 0..n_terms-1 to the
// VPU, one per cycle, each reading the same IVM slot and LVM entry i, with
// first/last set on the first and last term. When the VPU's result returns it
// is written to the next Output Vector Memory (OVM) word as {decision, acc}
// and done pulses. knn_clr clears the K-NN processor at the start of each
// classification when knn_en is set. That the FSPS takes feature vectors from
// the ISPS into an IVM and stores results in an OVM follows the design
// description; the packing, the ring of IVM slots and this sequencing are
// this design's own choice.
module fsps_controller #(
  parameter int DIM    = sasoc_pkg::VDIM,
  parameter int EW     = sasoc_pkg::VEL_W,
  parameter int IDEPTH = 8,
  parameter int LDEPTH = 128,
  parameter int ODEPTH = 128
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // feature stream
  input  logic                        feat_valid,
  output logic                        feat_ready,
  input  logic [EW-1:0]               feat_data,
  // program
  input  sasoc_pkg::vpu_cfg_t         prog,        // first/last ignored
  input  logic [$clog2(LDEPTH+1)-1:0] n_terms,     // 1..LDEPTH
  input  logic                        auto_en,
  input  logic                        knn_en,
  input  logic                        start,
  input  logic [$clog2(IDEPTH)-1:0]   start_slot,
  // IVM
  output logic                        ivm_we,
  output logic [$clog2(IDEPTH)-1:0]   ivm_waddr,
  output logic [DIM*EW-1:0]           ivm_wdata,
  output logic                        ivm_re,
  output logic [$clog2(IDEPTH)-1:0]   ivm_raddr,
  // VPU issue
  output logic                        issue,
  output logic [$clog2(LDEPTH)-1:0]   lvm_addr,
  output sasoc_pkg::vpu_cfg_t         cfg,
  input  logic                        res_valid,
  input  logic signed [31:0]          res_acc,
  input  logic                        res_dec,
  // OVM
  output logic                        ovm_we,
  output logic [$clog2(ODEPTH)-1:0]   ovm_waddr,
  output logic [32:0]                 ovm_wdata,
  // K-NN
  output logic                        knn_clr,
  // status
  output logic                        busy,
  output logic                        done,
  output logic                        stall    // a full vector waits: input held off
);
  import sasoc_pkg::*;
  localparam int IW = $clog2(IDEPTH);
  localparam int LW = $clog2(LDEPTH);
  localparam int CW = $clog2(DIM + 1);

  // ---- packer ----
  logic [DIM-1:0][EW-1:0] pbuf;
  logic [CW-1:0]          pcnt;
  logic [IW-1:0]          wslot, pend_slot;
  logic                   pend, take_pend;

  assign feat_ready = (pcnt < CW'(DIM));
  assign stall      = (pcnt == CW'(DIM)) && pend;
  assign ivm_we     = (pcnt == CW'(DIM)) && !pend;
  assign ivm_waddr  = wslot;
  assign ivm_wdata  = pbuf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pbuf      <= '0;
      pcnt      <= '0;
      wslot     <= '0;
      pend      <= 1'b0;
      pend_slot <= '0;
    end else begin
      if (feat_valid && feat_ready) begin
        pbuf[pcnt[CW-2:0]] <= feat_data;
        pcnt <= pcnt + 1'b1;
      end
      if (take_pend) pend <= 1'b0;
      if (ivm_we) begin
        pend      <= 1'b1;
        pend_slot <= wslot;
        wslot     <= wslot + 1'b1;
        pcnt      <= '0;
      end
    end
  end

  // ---- classification sequencer ----
  typedef enum logic [1:0] {J_IDLE, J_ISSUE, J_WAIT} jstate_e;
  jstate_e       js;
  logic [LW-1:0] term;
  logic [IW-1:0] slot;
  logic [LW-1:0] ovm_ptr;
  logic          go_host, go_auto;

  assign go_host   = (js == J_IDLE) && start;
  assign go_auto   = (js == J_IDLE) && !start && auto_en && pend;
  assign take_pend = go_auto;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      js      <= J_IDLE;
      term    <= '0;
      slot    <= '0;
      ovm_ptr <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (js)
        J_IDLE: if (go_host || go_auto) begin
          js   <= J_ISSUE;
          term <= '0;
          slot <= go_host ? start_slot : pend_slot;
        end
        J_ISSUE: begin
          if (32'(term) == 32'(n_terms) - 1) js <= J_WAIT;
          term <= term + 1'b1;
        end
        J_WAIT: if (res_valid) begin
          js      <= J_IDLE;
          ovm_ptr <= ovm_ptr + 1'b1;
          done    <= 1'b1;
        end
        default: js <= J_IDLE;
      endcase
    end
  end

  always_comb begin
    issue      = (js == J_ISSUE);
    lvm_addr   = term;
    ivm_re     = issue;
    ivm_raddr  = slot;
    cfg        = prog;
    cfg.first  = (term == '0);
    cfg.last   = (32'(term) == 32'(n_terms) - 1);
    ovm_we     = (js == J_WAIT) && res_valid;
    ovm_waddr  = ovm_ptr;
    ovm_wdata  = {res_dec, res_acc};
    knn_clr    = knn_en && (go_host || go_auto);
    busy       = (js != J_IDLE) || pend;
  end
endmodule
