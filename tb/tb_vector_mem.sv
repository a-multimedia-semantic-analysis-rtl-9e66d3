// tb_vector_mem: random writes and reads against a testbench copy; checks
// the one-cycle read latency, hold while re = 0 and read-before-write.
module tb_vector_mem;
  localparam int WIDTH = 96, DEPTH = 16;
  logic clk = 0, we = 0, re = 0;
  logic [3:0] waddr, raddr; logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  vector_mem #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    waddr = 0; raddr = 0; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; waddr = 4'(i); wdata = {$urandom, $urandom, $urandom}; model[i] = wdata; @(negedge clk);
    end
    for (int n = 0; n < 500; n++) begin
      logic [WIDTH-1:0] exp_v, held;
      we = $urandom_range(1); waddr = 4'($urandom); wdata = {$urandom, $urandom, $urandom};
      re = 1; raddr = 4'($urandom);
      exp_v = model[raddr];
      @(negedge clk);
      if (we) model[waddr] = wdata;
      checks++;
      if (rdata !== exp_v) failures++;
      held = rdata; re = 0; we = 0; @(negedge clk);
      checks++;
      if (rdata !== held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
