// tb_isps_sequencer: runs a single-unit and a pipelined frame (with random
// stalls) and checks the request counts of both stages, the scan order, the
// 16-band lag of stage 2 and the cycle count from start to done.
module tb_isps_sequencer;
  import sasoc_pkg::*;
  localparam int W = 20, H = 40;
  logic clk = 0, rst_n = 0, en = 1, start = 0;
  risp_mode_e mode;
  logic busy, done, s1_req, s2_req;
  logic [4:0] s1_x, s2_x; logic [5:0] s1_y, s2_y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  isps_sequencer #(.W(W), .H(H)) dut (.*);
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(risp_mode_e m, bit stalls);
    int n1, n2, cyc, ex1, ey1, bad;
    n1 = 0; n2 = 0; cyc = 0; ex1 = 0; ey1 = 0; bad = 0;
    mode = m; start = 1; @(negedge clk); start = 0;
    while (!done) begin
      en = stalls ? ($urandom_range(3) != 0) : 1'b1;
      #1;
      if (en && s1_req) begin
        if (s1_x != ex1 || s1_y != ey1) bad++;
        n1++;
        ex1++; if (ex1 == W) begin ex1 = 0; ey1++; end
      end
      if (en && s2_req) begin
        n2++;
        if (s2_y + 16 > (H - 15) || s2_x != s1_x) bad++;
      end
      if (en) cyc++;
      @(negedge clk);
    end
    en = 1;
    checks++; if (n1 != W * (H - 15)) begin failures++; $display("FAIL s1 count %0d", n1); end
    checks++; if (bad != 0) begin failures++; $display("FAIL order %0d", bad); end
    if (m == MODE_C_OPU_LPU || m == MODE_D_LPU_OPU) begin
      checks++; if (n2 != W * (H - 30)) begin failures++; $display("FAIL s2 count %0d", n2); end
      checks++; if (cyc != W * (H - 30 + 16) + 3) begin failures++; $display("FAIL cycles %0d", cyc); end
    end else begin
      checks++; if (n2 != 0) begin failures++; $display("FAIL s2 in single mode"); end
      checks++; if (cyc != W * (H - 15) + 3) begin failures++; $display("FAIL cycles %0d", cyc); end
    end
  endtask
  initial begin
    mode = MODE_A_LPU;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    run(MODE_A_LPU, 0);
    run(MODE_C_OPU_LPU, 0);
    run(MODE_D_LPU_OPU, 1);
    run(MODE_B_OPU, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
