// tb_async_fifo: writer and reader on unrelated clocks (7 ns and 11 ns,
// then swapped speeds), random push and pop; checks order and content of
// every word, that full and empty both occur, and that nothing is lost.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0, winc = 0, rinc = 0;
  logic [7:0] wdata, rdata; logic wfull, rempty;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0, nw = 0, nr = 0;
  int wp = 7, rp = 11;
  logic [7:0] q [$];
  always #(wp) wclk = ~wclk;
  always #(rp) rclk = ~rclk;
  async_fifo dut (.*);
  initial begin
    #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(negedge wclk) if (wrst_n) begin
    winc = (nw < 2000) && ($urandom_range(3) != 0);
    wdata = 8'($urandom);
    if (winc && !wfull) begin q.push_back(wdata); nw++; end
    if (wfull) n_full++;
  end
  always @(negedge rclk) if (rrst_n) begin
    rinc = ($urandom_range(3) != 0);
    if (rinc && !rempty) begin
      checks++;
      if (q.size() == 0 || rdata != q.pop_front()) failures++;
      nr++;
    end
    if (rempty) n_empty++;
  end
  initial begin
    wdata = 0;
    #30; wrst_n = 1; rrst_n = 1;
    wait (nr >= 1000);
    wp = 13; rp = 5;
    wait (nr >= 2000 || nw >= 2000 && q.size() == 0);
    #500;
    checks++; if (nr != 2000) begin failures++; $display("FAIL read %0d", nr); end
    checks++; if (n_full == 0 || n_empty == 0) begin failures++; $display("FAIL full %0d empty %0d", n_full, n_empty); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
