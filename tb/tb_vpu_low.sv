// tb_vpu_low: random signed vectors through all five lane operations,
// every lane checked against integer arithmetic.
module tb_vpu_low;
  import sasoc_pkg::*;
  vl_op_e op;
  logic [255:0][7:0] a, b;
  logic [255:0][17:0] y;
  int checks = 0, failures = 0;
  vpu_low dut (.*);
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 50; n++) begin
      op = vl_op_e'(n % 5);
      for (int i = 0; i < 256; i++) begin
        a[i] = (n % 7 == 0) ? 8'h80 : 8'($urandom);
        b[i] = (n % 7 == 0) ? 8'h7f : 8'($urandom);
      end
      #1;
      for (int i = 0; i < 256; i++) begin
        int av, bv, e;
        av = int'($signed(a[i])); bv = int'($signed(b[i]));
        case (op)
          VL_PASS_A: e = av;
          VL_MUL: e = av * bv;
          VL_SUB: e = av - bv;
          VL_ABSDIFF: e = (av > bv) ? av - bv : bv - av;
          default: e = (av - bv) * (av - bv);
        endcase
        checks++;
        if (int'($signed(y[i])) != e) begin
          failures++;
          if (failures < 10) $display("FAIL op %0d lane %0d: %0d %0d -> %0d exp %0d", op, i, av, bv, $signed(y[i]), e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
