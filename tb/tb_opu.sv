// tb_opu: random windows (some with many equal pixels), random sub-window
// sizes and all four operations; the expected value comes from sorting the
// K x K pixels in the testbench.
module tb_opu;
  import sasoc_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  opu_op_e op; logic [4:0] ksize; logic [7:0] cfg_rank;
  logic [15:0][15:0][7:0] win;
  logic out_valid; logic [7:0] result;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  opu dut (.*);
  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    op = OPU_MIN; ksize = 16; cfg_rank = 0; win = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int k, nn, rk; logic [7:0] v[$]; logic [7:0] e;
      k = (n % 4 == 0) ? 3 : (n % 4 == 1) ? 16 : $urandom_range(1, 16);
      ksize = 5'(k);
      op = opu_op_e'($urandom_range(3));
      cfg_rank = 8'($urandom_range(255));
      for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++)
        win[r][c] = (n % 3 == 0) ? 8'($urandom_range(3)) : 8'($urandom);
      v = {};
      for (int r = 0; r < k; r++) for (int c = 0; c < k; c++) v.push_back(win[r][c]);
      v.sort();
      nn = k * k;
      case (op)
        OPU_MIN: rk = 0;
        OPU_MAX: rk = nn - 1;
        OPU_MEDIAN: rk = (nn - 1) / 2;
        default: rk = (int'(cfg_rank) < nn) ? int'(cfg_rank) : nn - 1;
      endcase
      e = v[rk];
      in_valid = 1; @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid || result !== e) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d op=%0d got %0d exp %0d", k, op, result, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
