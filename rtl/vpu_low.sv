// vpu_low: Low-Level VPU, 256 lanes of element-wise vector arithmetic.
//
// Lane i combines element a[i] of the input vector (from the Input Vector
// Memory) with element b[i] of a model vector (from the Low-Level Local Vector
// Memory): pass a, a*b, a-b, |a-b| or (a-b)^2, on signed 8-bit elements, into
// a signed 18-bit lane result (exact for every operation). Reduced by the
// mid-level VPU these give inner products and L1 or squared-L2 distances of
// 256-dimension vectors. Combinational; the VPU registers its output. The
// 256-lane width follows the design description; the operation set and the
// number formats are this design's own choice.
module vpu_low #(
  parameter int DIM  = sasoc_pkg::VDIM,
  parameter int EW   = sasoc_pkg::VEL_W,
  parameter int LW   = 2 * EW + 2
) (
  input  sasoc_pkg::vl_op_e             op,
  input  logic [DIM-1:0][EW-1:0]        a,
  input  logic [DIM-1:0][EW-1:0]        b,
  output logic [DIM-1:0][LW-1:0]        y
);
  import sasoc_pkg::*;
  always_comb begin
    for (int i = 0; i < DIM; i++) begin
      logic signed [EW:0]   d;
      logic signed [LW-1:0] r;
      d = $signed({a[i][EW-1], a[i]}) - $signed({b[i][EW-1], b[i]});
      unique case (op)
        VL_PASS_A:  r = LW'($signed(a[i]));
        VL_MUL:     r = LW'($signed(a[i]) * $signed(b[i]));
        VL_SUB:     r = LW'(d);
        VL_ABSDIFF: r = (d < 0) ? -LW'(d) : LW'(d);
        VL_SQDIFF:  r = LW'(d * d);
        default:    r = '0;
      endcase
      y[i] = r;
    end
  end
endmodule
