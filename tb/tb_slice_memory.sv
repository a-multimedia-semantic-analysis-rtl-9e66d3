// tb_slice_memory: fills a small frame with a known pattern and reads
// random stripes, checking every lane against the pattern (rows past the
// bottom must read zero) and the one-cycle read latency.
module tb_slice_memory;
  localparam int W = 40, H = 27;
  logic clk = 0, we = 0, re = 0;
  logic [5:0] wx, rx; logic [4:0] wy, ry;
  logic [7:0] wdata;
  logic [15:0][7:0] rdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  slice_memory #(.W(W), .H(H)) dut (.*);
  function automatic logic [7:0] pat(int x, int y); return 8'((x * 7 + y * 13) ^ (y << 3)); endfunction
  initial begin
    #200000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(negedge clk);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      we = 1; wx = 6'(x); wy = 5'(y); wdata = pat(x, y); @(negedge clk);
    end
    we = 0;
    for (int n = 0; n < 300; n++) begin
      int x, y;
      x = $urandom_range(W-1); y = $urandom_range(H-1);
      re = 1; rx = 6'(x); ry = 5'(y); @(negedge clk); re = 0;
      for (int i = 0; i < 16; i++) begin
        logic [7:0] exp_v;
        exp_v = (y + i < H) ? pat(x, y + i) : 8'h00;
        checks++;
        if (rdata[i] !== exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d) lane %0d got %h exp %h", x, y, i, rdata[i], exp_v);
        end
      end
      // data must hold while re = 0
      @(negedge clk); checks++;
      if (rdata[0] !== ((y < H) ? pat(x, y) : 8'h00)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
