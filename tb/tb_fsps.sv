// tb_fsps: the Machine-Learning Engine end to end.
// (1) K-NN retrieval: 40 database vectors in the low-level LVM, feature
//     bytes streamed in (auto start), squared-L2 distances accumulated into
//     the OVM and ranked by the K-NN processor; a second vector arrives while
//     auto start is off, so the input stalls.
// (2) RBF-kernel SVM started by the host on a host-written IVM slot:
//     sum_i alpha_i * exp(-|x - s_i|^2 / 2^shift / 256) + bias, checked
//     against a real-valued model.
// Also checks the cycle count of a classification (n terms + 5).
module tb_fsps;
  import sasoc_pkg::*;
  localparam int ND = 40;
  logic clk = 0, rst_n = 0;
  logic feat_valid = 0, feat_ready; logic [7:0] feat_data;
  logic h_ivm_we = 0; logic [2:0] h_ivm_waddr; logic [2047:0] h_ivm_wdata;
  logic low_we = 0, mid_we = 0, high_we = 0;
  logic [6:0] low_waddr, mid_waddr, high_waddr;
  logic [2047:0] low_wdata; logic [255:0] mid_wdata; logic [48:0] high_wdata;
  vpu_cfg_t prog; logic [7:0] n_terms; logic [4:0] mid_wshift; logic signed [31:0] bias;
  logic auto_en, knn_en, start = 0; logic [2:0] start_slot;
  logic ovm_re = 0; logic [6:0] ovm_raddr; logic [32:0] ovm_rdata;
  logic [127:0] knn_valid; logic [127:0][31:0] knn_dist; logic [127:0][15:0] knn_id; logic [7:0] knn_count;
  logic busy, done, stall;
  int checks = 0, failures = 0, n_stall = 0, cyc = 0;
  logic [2047:0] db [ND];
  always #5 clk = ~clk;
  always @(posedge clk) begin cyc++; if (stall) n_stall++; end
  fsps dut (.*);
  initial begin
    #5000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic int sqd(logic [2047:0] x, logic [2047:0] y);
    int s; s = 0;
    for (int i = 0; i < 256; i++) begin
      int d; d = int'($signed(x[i*8 +: 8])) - int'($signed(y[i*8 +: 8])); s += d * d;
    end
    return s;
  endfunction
  task automatic send_vec(logic [2047:0] v);
    for (int i = 0; i < 256; i++) begin
      feat_valid = 1; feat_data = v[i*8 +: 8];
      @(negedge clk);
      while (!feat_ready) @(negedge clk);
    end
    feat_valid = 0;
  endtask
  task automatic read_ovm(int addr, output logic [32:0] q);
    ovm_re = 1; ovm_raddr = 7'(addr); @(negedge clk); ovm_re = 0; q = ovm_rdata;
  endtask
  initial begin
    logic [2047:0] x0, x1, xs; logic [32:0] q; int dref [$]; int sum0, sum1; int t0, t1;
    feat_data = 0; h_ivm_waddr = 0; h_ivm_wdata = 0; low_waddr = 0; mid_waddr = 0; high_waddr = 0;
    low_wdata = 0; mid_wdata = 0; high_wdata = 0; start_slot = 0; ovm_raddr = 0;
    prog = '0; prog.vl_op = VL_SQDIFF; prog.vm_op = VM_SUM; prog.vh_op = VH_PASS;
    n_terms = 8'(ND); mid_wshift = 0; bias = 32'sd0; auto_en = 0; knn_en = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < ND; i++) begin
      for (int k = 0; k < 64; k++) db[i][k*32 +: 32] = $urandom;
      low_we = 1; low_waddr = 7'(i); low_wdata = db[i];
      high_we = 1; high_waddr = 7'(i); high_wdata = {1'b0, 32'sd0, 16'sd1};
      @(negedge clk);
    end
    low_we = 0; high_we = 0;
    for (int k = 0; k < 64; k++) begin x0[k*32 +: 32] = $urandom; x1[k*32 +: 32] = $urandom; end
    // two vectors while auto start is off: the second must stall the input
    fork
      begin send_vec(x0); send_vec(x1); end
      begin repeat (700) @(negedge clk); auto_en = 1; end
    join
    wait (!busy); @(negedge clk);
    sum0 = 0; sum1 = 0;
    for (int i = 0; i < ND; i++) begin sum0 += sqd(x0, db[i]); sum1 += sqd(x1, db[i]); end
    read_ovm(0, q); checks++; if ($signed(q[31:0]) != sum0) begin failures++; $display("FAIL ovm0 %0d exp %0d", $signed(q[31:0]), sum0); end
    read_ovm(1, q); checks++; if ($signed(q[31:0]) != sum1) begin failures++; $display("FAIL ovm1 %0d exp %0d", $signed(q[31:0]), sum1); end
    // K-NN ranking of the last classification (x1)
    for (int i = 0; i < ND; i++) dref.push_back(sqd(x1, db[i]));
    dref.sort();
    checks++; if (knn_count != 8'(ND)) begin failures++; $display("FAIL knn count %0d", knn_count); end
    for (int i = 0; i < ND; i++) begin
      checks++;
      if (knn_dist[i] != 32'(dref[i]) || sqd(x1, db[knn_id[i]]) != dref[i]) begin
        failures++; if (failures < 10) $display("FAIL knn %0d: %0d exp %0d", i, knn_dist[i], dref[i]);
      end
    end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL input never stalled"); end
    // RBF SVM through the host path
    auto_en = 0; knn_en = 0;
    for (int k = 0; k < 64; k++) xs[k*32 +: 32] = $urandom;
    h_ivm_we = 1; h_ivm_waddr = 3'd5; h_ivm_wdata = xs; @(negedge clk); h_ivm_we = 0;
    begin
      real model; int alpha [ND];
      model = -2000.0;
      for (int i = 0; i < ND; i++) begin
        alpha[i] = int'($urandom_range(2000)) - 1000;
        high_we = 1; high_waddr = 7'(i); high_wdata = {1'b0, 32'sd0, 16'(alpha[i])}; @(negedge clk);
        model += real'(alpha[i]) * 65536.0 * $exp(-real'(sqd(xs, db[i]) >>> 12) / 256.0);
      end
      high_we = 0;
      prog = '0; prog.vl_op = VL_SQDIFF; prog.vm_op = VM_SUM; prog.vh_op = VH_EXP; prog.exp_shift = 4'd12;
      bias = -32'sd2000;
      start = 1; start_slot = 3'd5; t0 = cyc; @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      t1 = cyc;
      read_ovm(2, q);
      checks++;
      if ((real'($signed(q[31:0])) - model) > 2000.0 * ND || (model - real'($signed(q[31:0]))) > 2000.0 * ND) begin
        failures++; $display("FAIL svm %0d exp %f", $signed(q[31:0]), model);
      end
      checks++; if (q[32] != ($signed(q[31:0]) >= 0)) failures++;
      checks++; if (t1 - t0 != ND + 5) begin failures++; $display("FAIL job cycles %0d", t1 - t0); end
      $display("svm result %0d model %f, job cycles %0d, stall cycles %0d", $signed(q[31:0]), model, t1 - t0, n_stall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
