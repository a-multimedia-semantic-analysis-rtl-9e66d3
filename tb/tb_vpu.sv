// tb_vpu: loads the three local vector memories, then runs (1) a linear
// classifier: sum_i w_i * <a, b_i> + bias, (2) squared-L2 distances with a
// weighted mid level, one term per cycle, checking each term, the result,
// and the 4-cycle issue-to-result latency.
module tb_vpu;
  import sasoc_pkg::*;
  localparam int LD = 16;
  logic clk = 0, rst_n = 0;
  logic low_we = 0, mid_we = 0, high_we = 0;
  logic [3:0] low_waddr, mid_waddr, high_waddr;
  logic [2047:0] low_wdata; logic [255:0] mid_wdata; logic [48:0] high_wdata;
  logic [4:0] mid_wshift; logic signed [31:0] bias;
  logic issue; logic [3:0] lvm_addr, id; vpu_cfg_t cfg; logic [2047:0] a;
  logic term_valid; logic [3:0] term_id; logic signed [31:0] term_t;
  logic res_valid; logic signed [31:0] res_acc; logic res_dec;
  int checks = 0, failures = 0;
  logic [2047:0] lowm [LD]; logic [255:0] midm [LD]; int wgt [LD];
  int exp_t [$]; int cyc = 0; int issue_cyc [$];
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  vpu #(.LDEPTH(LD)) dut (.*);
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // result side
  always @(negedge clk) if (rst_n && term_valid) begin
    int e, ic;
    e = exp_t.pop_front(); ic = issue_cyc.pop_front();
    checks++;
    if (term_t != e || cyc - ic != 4) begin
      failures++;
      if (failures < 10) $display("FAIL term %0d got %0d exp %0d latency %0d", term_id, term_t, e, cyc - ic);
    end
  end
  function automatic int dot(logic [2047:0] x, logic [2047:0] y);
    int s; s = 0;
    for (int i = 0; i < 256; i++) s += int'($signed(x[i*8 +: 8])) * int'($signed(y[i*8 +: 8]));
    return s;
  endfunction
  function automatic int sqd(logic [2047:0] x, logic [2047:0] y, logic [255:0] w, int sh);
    longint s, p; s = 0;
    for (int g = 0; g < 16; g++) begin
      p = 0;
      for (int k = 0; k < 16; k++) begin
        int d; d = int'($signed(x[(g*16+k)*8 +: 8])) - int'($signed(y[(g*16+k)*8 +: 8]));
        p += d * d;
      end
      s += (p * longint'($signed(w[g*16 +: 16]))) >>> sh;
    end
    return int'(s);
  endfunction
  initial begin
    issue = 0; cfg = '0; lvm_addr = 0; id = 0; a = '0; mid_wshift = 5'd2; bias = -32'sd100;
    low_waddr = 0; mid_waddr = 0; high_waddr = 0; low_wdata = 0; mid_wdata = 0; high_wdata = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < LD; i++) begin
      for (int k = 0; k < 64; k++) lowm[i][k*32 +: 32] = $urandom;
      for (int k = 0; k < 16; k++) midm[i][k*16 +: 16] = 16'($urandom_range(8));
      wgt[i] = int'($urandom_range(20)) - 10;
      low_we = 1; low_waddr = 4'(i); low_wdata = lowm[i];
      mid_we = 1; mid_waddr = 4'(i); mid_wdata = midm[i];
      high_we = 1; high_waddr = 4'(i); high_wdata = {1'b0, 32'sd0, 16'(wgt[i])};
      @(negedge clk);
    end
    low_we = 0; mid_we = 0; high_we = 0;
    for (int job = 0; job < 4; job++) begin
      logic [2047:0] av; int acc;
      for (int k = 0; k < 64; k++) av[k*32 +: 32] = $urandom;
      acc = 0;
      for (int i = 0; i < LD; i++) begin
        int t;
        cfg = '0; cfg.first = (i == 0); cfg.last = (i == LD - 1);
        if (job % 2 == 0) begin cfg.vl_op = VL_MUL; cfg.vm_op = VM_SUM; t = dot(av, lowm[i]); end
        else begin cfg.vl_op = VL_SQDIFF; cfg.vm_op = VM_WSUM; t = sqd(av, lowm[i], midm[i], 2); end
        cfg.vh_op = VH_PASS;
        acc += t * wgt[i];
        exp_t.push_back(t); issue_cyc.push_back(cyc);
        issue = 1; lvm_addr = 4'(i); id = 4'(i);
        @(negedge clk);
        issue = 0; a = av;            // input vector one cycle after issue
        #0;
      end
      repeat (5) @(negedge clk);
      checks++;
      if (res_acc != acc + bias || res_dec != (acc + bias >= 0)) begin
        failures++; $display("FAIL job %0d result %0d exp %0d", job, res_acc, acc + bias);
      end
    end
    checks++; if (exp_t.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
