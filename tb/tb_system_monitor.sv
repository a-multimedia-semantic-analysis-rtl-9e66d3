// tb_system_monitor: drives the stall and bubble status bits and checks the
// divider moves at each window end: bubbles slow the FSPS (or speed up a
// slowed ISPS), stalls speed the FSPS up (or slow the ISPS), balanced
// status changes nothing, and auto_en = 0 reloads the host's ratios.
module tb_system_monitor;
  localparam int WINDOW = 64, THRESH = 8;
  logic clk = 0, rst_n = 0, auto_en = 0, isps_stalled = 0, fsps_starved = 0, isps_busy = 0;
  logic [3:0] isps_div_init, fsps_div_init, isps_div, fsps_div;
  logic adjust;
  int checks = 0, failures = 0, n_adj = 0;
  always #5 clk = ~clk;
  always @(posedge clk) if (adjust) n_adj++;
  system_monitor #(.WINDOW(WINDOW), .THRESH(THRESH)) dut (.*);
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic expect_div(int ei, int ef, string what);
    checks++;
    if (isps_div != 4'(ei) || fsps_div != 4'(ef)) begin
      failures++; $display("FAIL %s: isps %0d fsps %0d, exp %0d %0d", what, isps_div, fsps_div, ei, ef);
    end
  endtask
  initial begin
    isps_div_init = 4'd3; fsps_div_init = 4'd1;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    expect_div(3, 1, "host ratios");
    auto_en = 1;
    // bubbles in the FSPS while the ISPS works: ISPS sped up 3 -> 2 -> 1, then FSPS slowed
    fsps_starved = 1; isps_busy = 1;
    repeat (WINDOW + 2) @(negedge clk); expect_div(2, 1, "bubbles 1");
    repeat (WINDOW) @(negedge clk);     expect_div(1, 1, "bubbles 2");
    repeat (WINDOW) @(negedge clk);     expect_div(1, 2, "bubbles 3");
    repeat (WINDOW) @(negedge clk);     expect_div(1, 3, "bubbles 4");
    // bubbles without ISPS work are not counted
    isps_busy = 0;
    repeat (WINDOW) @(negedge clk);     expect_div(1, 3, "idle");
    // stalls: FSPS sped up 3 -> 2 -> 1, then ISPS slowed
    fsps_starved = 0; isps_busy = 1; isps_stalled = 1;
    repeat (WINDOW) @(negedge clk);     expect_div(1, 2, "stall 1");
    repeat (WINDOW) @(negedge clk);     expect_div(1, 1, "stall 2");
    repeat (WINDOW) @(negedge clk);     expect_div(2, 1, "stall 3");
    // few events: no change
    isps_stalled = 0;
    repeat (2 * WINDOW) @(negedge clk); expect_div(2, 1, "balanced");
    checks++; if (n_adj != 7) begin failures++; $display("FAIL adjust pulses %0d", n_adj); end
    auto_en = 0; @(negedge clk); @(negedge clk); expect_div(3, 1, "back to host");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
