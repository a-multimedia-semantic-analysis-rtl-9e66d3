// sasoc_pkg: types and constants shared by the image-stream (ISPS) and the
// feature-stream (FSPS) halves of the semantic-analysis SoC.
// The pixel width, the 16x16 window, the 16 slice-memory banks and the
// 256-dimension vector come from the design description; the operation
// encodings and word widths are choices of this implementation.
package sasoc_pkg;

  localparam int PIX_W   = 8;    // pixel width; 16 pixels form the 128-bit stripe
  localparam int WIN     = 16;   // RISP window edge: 16x16 window per cycle
  localparam int BANKS   = 16;   // slice-memory banks, one per stripe lane

  localparam int VDIM    = 256;  // vector dimensions processed in parallel by the VPU
  localparam int VEL_W   = 8;    // signed vector element width
  localparam int MID_LANES = 16; // parallelism of the mid-level VPU
  localparam int ACC_W   = 32;   // scalar width used by mid/high level and K-NN

  // RISP configuration modes (four modes built from the two processing units)
  typedef enum logic [1:0] {
    MODE_A_LPU     = 2'd0,  // LPU alone
    MODE_B_OPU     = 2'd1,  // OPU alone
    MODE_C_OPU_LPU = 2'd2,  // OPU then LPU, both running as a pipeline
    MODE_D_LPU_OPU = 2'd3   // LPU then OPU, both running as a pipeline
  } risp_mode_e;

  // Order Processing Unit operations: all are rank selections
  typedef enum logic [1:0] {
    OPU_MIN    = 2'd0,
    OPU_MAX    = 2'd1,
    OPU_MEDIAN = 2'd2,
    OPU_RANK   = 2'd3
  } opu_op_e;

  // Low-level VPU: element-wise operation on 256 lanes (a = input vector, b = LVM vector)
  typedef enum logic [2:0] {
    VL_PASS_A  = 3'd0,  // a
    VL_MUL     = 3'd1,  // a*b     (inner product after reduction)
    VL_SUB     = 3'd2,  // a-b
    VL_ABSDIFF = 3'd3,  // |a-b|   (L1 distance after reduction)
    VL_SQDIFF  = 3'd4   // (a-b)^2 (squared L2 distance after reduction)
  } vl_op_e;

  // Mid-level VPU: reduction of 256 lanes to 16 partial sums, then to one scalar
  typedef enum logic [0:0] {
    VM_SUM  = 1'b0,     // plain sum of the 16 partial sums
    VM_WSUM = 1'b1      // partial sums weighted by the mid-level LVM, then summed
  } vm_op_e;

  // High-level VPU: scalar transfer function before weighting and accumulation
  typedef enum logic [1:0] {
    VH_PASS  = 2'd0,    // t = s
    VH_EXP   = 2'd1,    // t = exp(-s / 2^shift) in Q0.16
    VH_STUMP = 2'd2     // t = (s*polarity < thr*polarity) ? 1 : 0  (decision stump)
  } vh_op_e;

  // One VPU instruction: one input vector against one model entry
  typedef struct packed {
    vl_op_e           vl_op;
    vm_op_e           vm_op;
    vh_op_e           vh_op;
    logic [3:0]       exp_shift;   // input scaling of the exponential
    logic             first;       // clear the accumulator before this term
    logic             last;        // last term: produce the result
  } vpu_cfg_t;

endpackage
