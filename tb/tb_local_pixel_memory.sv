// tb_local_pixel_memory: shifts random stripes in (with random stalls) and
// checks the whole 16x16 window against a model of the last 16 stripes.
module tb_local_pixel_memory;
  logic clk = 0, rst_n = 0, shift = 0;
  logic [15:0][7:0] stripe;
  logic [15:0][15:0][7:0] win;
  logic [15:0][7:0] hist [16];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  local_pixel_memory dut (.*);
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int c = 0; c < 16; c++) hist[c] = '0;
    stripe = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      shift = ($urandom_range(3) != 0);
      for (int r = 0; r < 16; r++) stripe[r] = 8'($urandom);
      @(negedge clk);
      if (shift) begin
        for (int c = 0; c < 15; c++) hist[c] = hist[c+1];
        hist[15] = stripe;
      end
      for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) begin
        checks++;
        if (win[r][c] !== hist[c][r]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
