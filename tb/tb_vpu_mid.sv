// tb_vpu_mid: random lane values and weights; checks the plain sum and the
// group-weighted, shifted sum.
module tb_vpu_mid;
  import sasoc_pkg::*;
  vm_op_e op; logic [4:0] wshift;
  logic [255:0][17:0] x; logic [15:0][15:0] w;
  logic signed [31:0] s;
  int checks = 0, failures = 0;
  vpu_mid dut (.*);
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 100; n++) begin
      longint e, p;
      op = vm_op_e'(n % 2); wshift = 5'($urandom_range(12));
      for (int i = 0; i < 256; i++) x[i] = 18'($urandom);
      for (int g = 0; g < 16; g++) w[g] = 16'($urandom);
      #1;
      e = 0;
      for (int g = 0; g < 16; g++) begin
        p = 0;
        for (int k = 0; k < 16; k++) p += longint'($signed(x[g*16+k]));
        if (op == VM_WSUM) e += (p * longint'($signed(w[g]))) >>> wshift;
        else e += p;
      end
      checks++;
      if (longint'(s) != longint'(int'(e))) begin
        failures++;
        if (failures < 10) $display("FAIL op %0d got %0d exp %0d", op, s, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
