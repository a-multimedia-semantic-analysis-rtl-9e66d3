// vpu_high: High-Level VPU, scalar transfer, weighting and accumulation.
//
// For each term the scalar s from the mid level passes one transfer function:
//   VH_PASS   t = s
//   VH_EXP    t = exp(-u / 256) in Q0.16 (65536 = 1.0), u = max(s, 0) >>> exp_shift
//   VH_STUMP  t = 1 if (pol ? -s : s) < (pol ? -thr : thr), else 0 (decision stump)
// and is weighted by the term's model entry: term = t * weight (signed 16-bit
// weight, low 32 bits kept). The terms of one classification are accumulated
// (cleared by cfg.first); with cfg.last the sum plus bias is the result and
// its sign the decision (1 when acc + bias >= 0). These cover AdaBoost (sum of
// weighted stumps), SVM (sum of alpha_i * K(x, s_i)) and GMM (sum of
// w_k * exp(-d_k)). The raw t of each term goes to the K-NN processor.
// exp uses exp(-v) = 2^(-v*log2 e): log2 e is 5909/4096, the fraction of the
// power of two comes from a 17-point table of 2^(-k/16) with linear
// interpolation, the integer part is a right shift (error < 0.1% of full
// scale). Timing: one term per cycle; outputs registered, one cycle after
// in_valid. That the top level of the VPU evaluates exponentials in one cycle
// follows the design description; everything else here is this design's own
// choice.
module vpu_high #(
  parameter int AW  = sasoc_pkg::ACC_W,
  parameter int IDW = 7
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  sasoc_pkg::vpu_cfg_t      cfg,
  input  logic [IDW-1:0]           in_id,
  input  logic signed [AW-1:0]     s,
  input  logic signed [15:0]       weight,
  input  logic signed [AW-1:0]     thr,
  input  logic                     pol,
  input  logic signed [AW-1:0]     bias,
  // per-term output
  output logic                     term_valid,
  output logic [IDW-1:0]           term_id,
  output logic signed [AW-1:0]     term_t,
  // per-classification output
  output logic                     res_valid,
  output logic signed [AW-1:0]     res_acc,
  output logic                     res_dec
);
  import sasoc_pkg::*;

  // 2^(-k/16) * 65536, k = 0..16
  function automatic logic [16:0] pow2_tab(input logic [4:0] k);
    unique case (k)
      5'd0:  pow2_tab = 17'd65536;  5'd1:  pow2_tab = 17'd62757;
      5'd2:  pow2_tab = 17'd60097;  5'd3:  pow2_tab = 17'd57549;
      5'd4:  pow2_tab = 17'd55109;  5'd5:  pow2_tab = 17'd52773;
      5'd6:  pow2_tab = 17'd50535;  5'd7:  pow2_tab = 17'd48393;
      5'd8:  pow2_tab = 17'd46341;  5'd9:  pow2_tab = 17'd44376;
      5'd10: pow2_tab = 17'd42495;  5'd11: pow2_tab = 17'd40693;
      5'd12: pow2_tab = 17'd38968;  5'd13: pow2_tab = 17'd37316;
      5'd14: pow2_tab = 17'd35734;  5'd15: pow2_tab = 17'd34219;
      default: pow2_tab = 17'd32768;
    endcase
  endfunction

  // exp(-u/256), u >= 0, result Q0.16
  function automatic logic [AW-1:0] exp_neg(input logic [AW-1:0] u);
    logic [AW+12:0] y;       // u/256 * log2(e), 20 fraction bits
    logic [AW+12:0] n;       // integer part of the power of two
    logic [3:0]     idx;     // fraction, table step (1/16)
    logic [7:0]     rem;     // fraction within the step (1/4096)
    logic [16:0]    lo, hi;
    logic [25:0]    interp;
    y      = (AW+13)'(u) * (AW+13)'(5909);
    n      = y >> 20;
    idx    = y[19:16];
    rem    = y[15:8];
    lo     = pow2_tab({1'b0, idx});
    hi     = pow2_tab({1'b0, idx} + 5'd1);
    interp = 26'({lo, 8'b0}) - (26'(lo - hi) * 26'(rem));
    if (n >= 17) exp_neg = '0;
    else         exp_neg = AW'(interp >> 8) >> n;
  endfunction

  logic signed [AW-1:0] t, u, term;
  logic signed [AW+15:0] prod;
  logic signed [AW-1:0] acc, nacc;

  always_comb begin
    u = (s < 0) ? '0 : (s >>> cfg.exp_shift);
    unique case (cfg.vh_op)
      VH_EXP:   t = exp_neg(u);
      VH_STUMP: t = ((pol ? -s : s) < (pol ? -thr : thr)) ? AW'(1) : AW'(0);
      default:  t = s;
    endcase
    prod = t * weight;
    term = prod[AW-1:0];
    nacc = (cfg.first ? '0 : acc) + term;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      term_valid <= 1'b0;
      term_id    <= '0;
      term_t     <= '0;
      res_valid  <= 1'b0;
      res_acc    <= '0;
      res_dec    <= 1'b0;
      acc        <= '0;
    end else begin
      term_valid <= in_valid;
      res_valid  <= in_valid && cfg.last;
      if (in_valid) begin
        acc     <= nacc;
        term_id <= in_id;
        term_t  <= t;
        if (cfg.last) begin
          res_acc <= nacc + bias;
          res_dec <= (nacc + bias) >= 0;
        end
      end
    end
  end
endmodule
