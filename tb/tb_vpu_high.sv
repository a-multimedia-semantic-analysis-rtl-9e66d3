// tb_vpu_high: checks the three transfer functions (exp against a real
// exponential within 0.2% of full scale), weighting, accumulation across
// first/last terms, the bias and decision, and the one-cycle latency.
module tb_vpu_high;
  import sasoc_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  vpu_cfg_t cfg; logic [6:0] in_id;
  logic signed [31:0] s, thr, bias; logic signed [15:0] weight; logic pol;
  logic term_valid; logic [6:0] term_id; logic signed [31:0] term_t;
  logic res_valid; logic signed [31:0] res_acc; logic res_dec;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  vpu_high dut (.*);
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    cfg = '0; in_id = 0; s = 0; thr = 0; bias = 0; weight = 0; pol = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // exponential
    for (int n = 0; n < 300; n++) begin
      real e; int u;
      cfg = '0; cfg.vh_op = VH_EXP; cfg.exp_shift = 4'($urandom_range(3)); cfg.first = 1; cfg.last = 1;
      s = (n < 10) ? -n : int'($urandom_range(n < 200 ? 2000 : 40000));
      weight = 16'sd1; in_valid = 1; in_id = 7'(n);
      u = (s < 0) ? 0 : (s >>> cfg.exp_shift);
      e = 65536.0 * $exp(-real'(u) / 256.0);
      @(negedge clk); in_valid = 0;
      checks++;
      if (!term_valid || term_id != 7'(n) || (real'(term_t) - e) > 131.0 || (e - real'(term_t)) > 131.0) begin
        failures++;
        if (failures < 10) $display("FAIL exp u=%0d got %0d exp %f", u, term_t, e);
      end
    end
    // stumps with accumulation: sum of alpha over passing stumps, plus bias
    for (int n = 0; n < 50; n++) begin
      int acc, nt;
      acc = 0; nt = $urandom_range(1, 20);
      bias = -int'($urandom_range(500));
      for (int t = 0; t < nt; t++) begin
        int sv, tv, wv; bit pv, h;
        sv = int'($urandom_range(2000)) - 1000; tv = int'($urandom_range(2000)) - 1000;
        wv = int'($urandom_range(200)); pv = $urandom_range(1);
        h = pv ? (-sv < -tv) : (sv < tv);
        acc += h ? wv : 0;
        cfg = '0; cfg.vh_op = VH_STUMP; cfg.first = (t == 0); cfg.last = (t == nt - 1);
        s = sv; thr = tv; weight = 16'(wv); pol = pv; in_valid = 1;
        @(negedge clk);
        checks++;
        if (term_t != (h ? 1 : 0)) failures++;
      end
      in_valid = 0;
      checks++;
      if (!res_valid || res_acc != acc + bias || res_dec != (acc + bias >= 0)) begin
        failures++;
        if (failures < 10) $display("FAIL stump acc got %0d exp %0d", res_acc, acc + bias);
      end
      @(negedge clk);
      checks++; if (res_valid) failures++;
    end
    // pass with weights
    cfg = '0; cfg.vh_op = VH_PASS; cfg.first = 1; cfg.last = 0; s = 1000; weight = -16'sd3; bias = 0; in_valid = 1;
    @(negedge clk);
    cfg.first = 0; cfg.last = 1; s = -7; weight = 16'sd100; @(negedge clk); in_valid = 0;
    checks++; if (res_acc != -3000 - 700 || res_dec) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
