// vpu_mid: Mid-Level VPU, 16-lane reduction and weighting.
//
// The 256 lane results of the low level are summed in 16 groups of 16 lanes
// (lanes 16g..16g+15 form partial sum g). With VM_SUM the 16 partial sums are
// added; with VM_WSUM each partial sum is first multiplied by a signed 16-bit
// weight from the Mid-Level Local Vector Memory and the product shifted right
// by wshift. The result s is one signed 32-bit scalar: an inner product or a
// distance, plain or per-group weighted (for example a diagonal covariance
// per 16-dimension block). Combinational; the VPU registers its output. The
// existence of a mid level with its own memory follows the design
// description; the 256 -> 16 -> 1 reduction and the weighting are this
// design's own choice.
module vpu_mid #(
  parameter int DIM   = sasoc_pkg::VDIM,
  parameter int LANES = sasoc_pkg::MID_LANES,
  parameter int LW    = 18,
  parameter int AW    = sasoc_pkg::ACC_W
) (
  input  sasoc_pkg::vm_op_e               op,
  input  logic [4:0]                      wshift,
  input  logic [DIM-1:0][LW-1:0]          x,
  input  logic [LANES-1:0][15:0]          w,
  output logic signed [AW-1:0]            s
);
  import sasoc_pkg::*;
  localparam int G = DIM / LANES;
  always_comb begin
    s = '0;
    for (int g = 0; g < LANES; g++) begin
      logic signed [AW-1:0] p;
      logic signed [AW+15:0] wp;
      p = '0;
      for (int k = 0; k < G; k++) p += AW'($signed(x[g*G + k]));
      wp = $signed(p) * $signed(w[g]);
      if (op == VM_WSUM) s += AW'(wp >>> wshift);
      else               s += p;
    end
  end
endmodule
