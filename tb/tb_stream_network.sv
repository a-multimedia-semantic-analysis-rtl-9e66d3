// tb_stream_network: for each of the four modes, drives distinct stripes,
// tags and results and checks which unit gets which stripe and which
// result goes to which output memory, at which coordinates.
module tb_stream_network;
  import sasoc_pkg::*;
  risp_mode_e mode;
  logic [15:0][7:0] sm_stripe, om1_stripe, lpu_stripe, opu_stripe;
  logic st1_stripe_vld, st2_stripe_vld, st1_win_vld, st2_win_vld;
  logic lpu_shift, lpu_win_vld, opu_shift, opu_win_vld;
  logic lpu_vld, opu_vld; logic [7:0] lpu_res, opu_res;
  logic [7:0] st1_x, st2_x, om0_x, om1_x; logic [6:0] st1_y, st2_y, om0_y, om1_y;
  logic om0_we, om1_we; logic [7:0] om0_d, om1_d;
  int checks = 0, failures = 0;
  stream_network dut (.*);
  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL mode %0d: %s", mode, what); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    sm_stripe = {16{8'hA1}}; om1_stripe = {16{8'hB2}};
    lpu_res = 8'h11; opu_res = 8'h22;
    st1_x = 8'd3; st1_y = 7'd4; st2_x = 8'd5; st2_y = 7'd6;
    for (int m = 0; m < 4; m++) begin
      mode = risp_mode_e'(m);
      st1_stripe_vld = 1; st2_stripe_vld = 0; st1_win_vld = 1; st2_win_vld = 0;
      lpu_vld = 1; opu_vld = 1;
      #1;
      case (mode)
        MODE_A_LPU: begin
          chk(lpu_stripe == sm_stripe && lpu_shift && lpu_win_vld, "LPU on slice memory");
          chk(!opu_shift && !opu_win_vld, "OPU idle");
          chk(om0_we && om0_d == 8'h11 && om0_x == 3 && om0_y == 4 && !om1_we, "LPU result to OM0");
        end
        MODE_B_OPU: begin
          chk(opu_stripe == sm_stripe && opu_shift && opu_win_vld, "OPU on slice memory");
          chk(!lpu_shift && !lpu_win_vld, "LPU idle");
          chk(om0_we && om0_d == 8'h22 && om0_x == 3 && !om1_we, "OPU result to OM0");
        end
        MODE_C_OPU_LPU: begin
          chk(opu_stripe == sm_stripe && opu_shift, "OPU first");
          chk(lpu_stripe == om1_stripe && !lpu_shift, "LPU on OM1, stage 2 idle");
          chk(om1_we && om1_d == 8'h22 && om1_x == 3 && om1_y == 4, "OPU result to OM1");
          chk(om0_we && om0_d == 8'h11 && om0_x == 5 && om0_y == 6, "LPU result to OM0");
        end
        default: begin
          chk(lpu_stripe == sm_stripe && lpu_shift, "LPU first");
          chk(opu_stripe == om1_stripe && !opu_shift, "OPU on OM1");
          chk(om1_we && om1_d == 8'h11, "LPU result to OM1");
          chk(om0_we && om0_d == 8'h22 && om0_x == 5, "OPU result to OM0");
        end
      endcase
      // stage 2 valid only
      st1_stripe_vld = 0; st2_stripe_vld = 1; st1_win_vld = 0; st2_win_vld = 1;
      lpu_vld = 0; opu_vld = 0;
      #1;
      if (mode == MODE_C_OPU_LPU) chk(lpu_shift && lpu_win_vld && !opu_shift, "stage 2 drives LPU");
      if (mode == MODE_D_LPU_OPU) chk(opu_shift && opu_win_vld && !lpu_shift, "stage 2 drives OPU");
      if (mode == MODE_A_LPU || mode == MODE_B_OPU) chk(!lpu_shift && !opu_shift, "no stage 2 in single modes");
      chk(!om0_we && !om1_we, "no writes without results");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
