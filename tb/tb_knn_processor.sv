// tb_knn_processor: inserts random distances (many duplicates, more than
// NPE of them) one per cycle and compares the PE contents with a sorted
// reference list after every insertion; also checks clear.
module tb_knn_processor;
  localparam int NPE = 128;
  logic clk = 0, rst_n = 0, clr = 0, in_valid = 0;
  logic [31:0] in_dist; logic [15:0] id;
  logic [NPE-1:0] pe_valid; logic [NPE-1:0][31:0] pe_dist; logic [NPE-1:0][15:0] pe_id;
  logic [7:0] count;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  knn_processor #(.NPE(NPE)) dut (.*);
  typedef struct { int unsigned d; int id; } ent_t;
  ent_t ref_l[$];
  initial begin
    #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic compare();
    checks++;
    if (count != 8'(ref_l.size())) begin failures++; $display("FAIL count %0d exp %0d", count, ref_l.size()); return; end
    for (int i = 0; i < ref_l.size(); i++)
      if (!pe_valid[i] || pe_dist[i] != ref_l[i].d || pe_id[i] != 16'(ref_l[i].id)) begin
        failures++;
        if (failures < 10) $display("FAIL pe %0d: %0d/%0d exp %0d/%0d", i, pe_dist[i], pe_id[i], ref_l[i].d, ref_l[i].id);
        return;
      end
  endtask
  initial begin
    in_dist = 0; id = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      for (int n = 0; n < 300; n++) begin
        int unsigned d; int pos;
        d = (round == 0) ? $urandom_range(500) : $urandom;
        in_valid = 1; in_dist = d; id = 16'(n);
        // reference: after all entries <= d
        pos = 0;
        while (pos < ref_l.size() && ref_l[pos].d <= d) pos++;
        ref_l.insert(pos, '{d, n});
        if (ref_l.size() > NPE) void'(ref_l.pop_back());
        @(negedge clk);
        in_valid = 0;
        compare();
      end
      clr = 1; @(negedge clk); clr = 0; ref_l = {};
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
