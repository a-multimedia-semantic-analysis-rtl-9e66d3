// stream_network: the RISP's router between the memories and the two
// processing units, set by the configuration mode.
//
// The RISP runs up to two scan stages at once. Stage 1 reads stripes from the
// Slice Memory; stage 2 reads stripes from Output Memory 1, which holds the
// image stage 1 has just produced. The mode decides which unit serves which
// stage and where each result is written:
//   Mode A  LPU on stage 1, result to Output Memory 0 (OPU idle)
//   Mode B  OPU on stage 1, result to Output Memory 0 (LPU idle)
//   Mode C  OPU on stage 1 -> Output Memory 1 -> LPU on stage 2 -> Output Memory 0
//   Mode D  LPU on stage 1 -> Output Memory 1 -> OPU on stage 2 -> Output Memory 0
// In modes C and D both units work in the same cycles, as a pipeline. The
// final result (whatever goes to Output Memory 0) is also the feature stream.
// Purely combinational. The four modes and the pipelined use of both units in
// modes C and D follow the design description; the assignment of operations to
// modes A-D and the routing through Output Memory 1 are this design's choice.
module stream_network #(
  parameter int WIN   = sasoc_pkg::WIN,
  parameter int PIX_W = sasoc_pkg::PIX_W,
  parameter int XW    = 8,
  parameter int YW    = 7
) (
  input  sasoc_pkg::risp_mode_e       mode,
  // stripes from the memories and their valid tags
  input  logic [WIN-1:0][PIX_W-1:0]   sm_stripe,
  input  logic                        st1_stripe_vld,
  input  logic [WIN-1:0][PIX_W-1:0]   om1_stripe,
  input  logic                        st2_stripe_vld,
  // window-valid tags of the two stages
  input  logic                        st1_win_vld,
  input  logic                        st2_win_vld,
  // to the local pixel memories and the units
  output logic [WIN-1:0][PIX_W-1:0]   lpu_stripe,
  output logic                        lpu_shift,
  output logic                        lpu_win_vld,
  output logic [WIN-1:0][PIX_W-1:0]   opu_stripe,
  output logic                        opu_shift,
  output logic                        opu_win_vld,
  // unit results and the result tags of the two stages
  input  logic                        lpu_vld,
  input  logic [PIX_W-1:0]            lpu_res,
  input  logic                        opu_vld,
  input  logic [PIX_W-1:0]            opu_res,
  input  logic [XW-1:0]               st1_x,
  input  logic [YW-1:0]               st1_y,
  input  logic [XW-1:0]               st2_x,
  input  logic [YW-1:0]               st2_y,
  // writes to the dual output memory
  output logic                        om0_we,
  output logic [XW-1:0]               om0_x,
  output logic [YW-1:0]               om0_y,
  output logic [PIX_W-1:0]            om0_d,
  output logic                        om1_we,
  output logic [XW-1:0]               om1_x,
  output logic [YW-1:0]               om1_y,
  output logic [PIX_W-1:0]            om1_d
);
  import sasoc_pkg::*;
  logic lpu_first;   // LPU serves stage 1
  logic opu_first;   // OPU serves stage 1
  logic piped;       // both units in use

  always_comb begin
    lpu_first = (mode == MODE_A_LPU) || (mode == MODE_D_LPU_OPU);
    opu_first = (mode == MODE_B_OPU) || (mode == MODE_C_OPU_LPU);
    piped     = (mode == MODE_C_OPU_LPU) || (mode == MODE_D_LPU_OPU);

    lpu_stripe  = lpu_first ? sm_stripe      : om1_stripe;
    lpu_shift   = lpu_first ? st1_stripe_vld : (piped && st2_stripe_vld);
    lpu_win_vld = lpu_first ? st1_win_vld    : (piped && st2_win_vld);
    opu_stripe  = opu_first ? sm_stripe      : om1_stripe;
    opu_shift   = opu_first ? st1_stripe_vld : (piped && st2_stripe_vld);
    opu_win_vld = opu_first ? st1_win_vld    : (piped && st2_win_vld);

    // stage-1 result: to OM1 when piped, else it is the final result
    om1_we = piped && (lpu_first ? lpu_vld : opu_vld);
    om1_x  = st1_x;
    om1_y  = st1_y;
    om1_d  = lpu_first ? lpu_res : opu_res;

    if (piped) begin
      om0_we = lpu_first ? opu_vld : lpu_vld;
      om0_x  = st2_x;
      om0_y  = st2_y;
      om0_d  = lpu_first ? opu_res : lpu_res;
    end else begin
      om0_we = lpu_first ? lpu_vld : opu_vld;
      om0_x  = st1_x;
      om0_y  = st1_y;
      om0_d  = lpu_first ? lpu_res : opu_res;
    end
  end
endmodule
