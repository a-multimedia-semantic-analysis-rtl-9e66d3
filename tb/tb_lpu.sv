// tb_lpu: loads random masks, applies random windows and checks the
// saturated, shifted (optionally absolute) weighted sum one cycle later.
module tb_lpu;
  logic clk = 0, rst_n = 0, en = 1, coef_we = 0, abs_en = 0, in_valid = 0;
  logic [7:0] coef_addr; logic signed [7:0] coef_wdata; logic [4:0] shift;
  logic [15:0][15:0][7:0] win;
  logic out_valid; logic [7:0] result;
  logic signed [7:0] cm [256];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  lpu dut (.*);
  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    shift = 0; win = '0; coef_addr = 0; coef_wdata = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      // new mask: t=0 box filter, others random (sparse, Haar-like or dense)
      for (int i = 0; i < 256; i++) begin
        cm[i] = (t == 0) ? 8'sd1 : (t == 1) ? ((i % 16 < 8) ? 8'sd1 : -8'sd1) : 8'($urandom_range(255));
        coef_we = 1; coef_addr = 8'(i); coef_wdata = cm[i]; @(negedge clk);
      end
      coef_we = 0;
      for (int n = 0; n < 40; n++) begin
        longint s, m;
        logic [7:0] e;
        shift = (t == 0) ? 5'd8 : 5'($urandom_range(14));
        abs_en = $urandom_range(1);
        for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) win[r][c] = 8'($urandom);
        in_valid = 1;
        s = 0;
        for (int i = 0; i < 256; i++) s += longint'(win[i/16][i%16]) * longint'(cm[i]);
        m = (abs_en && s < 0) ? -s : s;
        m = m >>> shift;
        e = (m < 0) ? 8'd0 : (m > 255) ? 8'd255 : 8'(m);
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (!out_valid || result !== e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d got %0d exp %0d (s=%0d)", t, result, e, s);
        end
      end
    end
    // stall holds the result
    begin
      logic [7:0] held;
      held = result;
      in_valid = 1; en = 0; win = '1; @(negedge clk); checks++;
      if (result !== held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
