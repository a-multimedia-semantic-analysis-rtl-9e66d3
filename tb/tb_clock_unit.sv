// tb_clock_unit: measures the period of both derived clocks for several
// ratios (including 1), checks that a gated clock stops and restarts, and
// that the two domains can run at different ratios at once.
module tb_clock_unit;
  logic clk = 0, rst_n = 0, isps_on = 0, fsps_on = 0;
  logic [3:0] isps_div, fsps_div;
  logic clk_isps, clk_fsps;
  int checks = 0, failures = 0;
  int root = 0, ni = 0, nf = 0;
  always #5 clk = ~clk;
  always @(posedge clk) root++;
  always @(posedge clk_isps) ni++;
  always @(posedge clk_fsps) nf++;
  clock_unit dut (.*);
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic measure(int di, int df);
    int r0, i0, f0;
    isps_div = 4'(di); fsps_div = 4'(df); isps_on = 1; fsps_on = 1;
    repeat (40) @(negedge clk);
    r0 = root; i0 = ni; f0 = nf;
    repeat (15 * 16) @(negedge clk);
    checks++;
    if ((ni - i0) != (root - r0) / di || (nf - f0) != (root - r0) / df) begin
      failures++; $display("FAIL div %0d/%0d: %0d/%0d edges in %0d", di, df, ni - i0, nf - f0, root - r0);
    end
  endtask
  initial begin
    isps_div = 1; fsps_div = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    measure(1, 1); measure(2, 3); measure(5, 1); measure(1, 15); measure(4, 4); measure(3, 6);
    // gate the FSPS clock only
    fsps_on = 0; repeat (20) @(negedge clk);
    begin
      int f0, i0; f0 = nf; i0 = ni;
      repeat (60) @(negedge clk);
      checks++; if (nf != f0) begin failures++; $display("FAIL gated clock ran"); end
      checks++; if (ni == i0) begin failures++; $display("FAIL ungated clock stopped"); end
      fsps_on = 1; repeat (60) @(negedge clk);
      checks++; if (nf == f0) begin failures++; $display("FAIL clock did not restart"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
