// tb_fsps_controller: streams feature bytes and checks the packed IVM
// write, the term issue sequence (addresses, first/last, one per cycle), the
// OVM write of the returned result, K-NN clear, host start priority and
// input back-pressure while a full vector waits.
module tb_fsps_controller;
  import sasoc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic feat_valid = 0, feat_ready; logic [7:0] feat_data;
  vpu_cfg_t prog; logic [7:0] n_terms; logic auto_en, knn_en, start = 0; logic [2:0] start_slot;
  logic ivm_we, ivm_re; logic [2:0] ivm_waddr, ivm_raddr; logic [2047:0] ivm_wdata;
  logic issue; logic [6:0] lvm_addr; vpu_cfg_t cfg;
  logic res_valid; logic signed [31:0] res_acc; logic res_dec;
  logic ovm_we; logic [6:0] ovm_waddr; logic [32:0] ovm_wdata;
  logic knn_clr, busy, done, stall;
  int checks = 0, failures = 0, n_stall = 0, n_issue = 0, n_clr = 0;
  logic [2047:0] sent [$];
  always #5 clk = ~clk;
  fsps_controller dut (.*);
  initial begin
    #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // stand-in for the VPU: result 4 cycles after the last term
  int pipe [$];
  always @(posedge clk) begin
    if (stall) n_stall++;
    if (knn_clr) n_clr++;
    if (issue) begin
      checks++;
      if (lvm_addr != 7'(n_issue) || cfg.first != (n_issue == 0) || cfg.last != (n_issue == n_terms - 1) || cfg.vl_op != prog.vl_op) begin failures++; $display("FAIL issue %0d addr %0d", n_issue, lvm_addr); end
      n_issue = cfg.last ? 0 : n_issue + 1;
    end
    if (ivm_we) begin
      checks++;
      if (sent.size() == 0 || ivm_wdata != sent.pop_front()) begin failures++; $display("FAIL ivm data"); end
    end
  end
  logic [3:0] lastq;
  always @(posedge clk) lastq <= {lastq[2:0], issue && cfg.last};
  assign res_valid = lastq[3];
  assign res_acc = 32'sd12345;
  assign res_dec = 1'b1;
  task automatic send_vec(logic [2047:0] v);
    sent.push_back(v);
    for (int i = 0; i < 256; i++) begin
      feat_valid = 1; feat_data = v[i*8 +: 8];
      @(negedge clk);
      while (!feat_ready) @(negedge clk);
    end
    feat_valid = 0;
  endtask
  initial begin
    logic [2047:0] v;
    int nd;
    prog = '0; prog.vl_op = VL_SQDIFF; n_terms = 8'd10; auto_en = 0; knn_en = 1; start_slot = 0; feat_data = 0;
    lastq = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    fork
      begin
        for (int n = 0; n < 3; n++) begin
          for (int k = 0; k < 64; k++) v[k*32 +: 32] = $urandom;
          send_vec(v);
        end
      end
      begin repeat (600) @(negedge clk); auto_en = 1; end
      begin
        nd = 0;
        while (nd < 3) begin
          @(negedge clk);
          if (ovm_we) begin
            checks++;
            if (ovm_waddr != 7'(nd) || ovm_wdata != {1'b1, 32'sd12345}) begin failures++; $display("FAIL ovm"); end
            nd++;
          end
        end
      end
    join
    // host start
    auto_en = 0;
    while (busy) @(negedge clk);
    start = 1; start_slot = 3'd6; @(negedge clk); start = 0;
    checks++; if (ivm_raddr != 3'd6 || !issue) begin failures++; $display("FAIL host start"); end
    wait (done); @(negedge clk);
    checks++; if (n_stall == 0) begin failures++; $display("FAIL no stall"); end
    checks++; if (n_clr != 4) begin failures++; $display("FAIL knn clears %0d", n_clr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
