// tb_isps: loads a random frame, runs all four RISP modes (a Haar-like LPU
// mask, OPU median / maximum / rank filters), with and without random
// back-pressure on the feature stream, and checks every feature against a
// testbench model of the window operations, the number of features, the
// Output Memory 0 contents (host read port) and the frame cycle count.
module tb_isps;
  import sasoc_pkg::*;
  localparam int W = 36, H = 40;
  localparam int XW = $clog2(W), YW = $clog2(H);
  logic clk = 0, rst_n = 0;
  logic pix_we = 0; logic [XW-1:0] pix_x; logic [YW-1:0] pix_y; logic [7:0] pix_d;
  risp_mode_e mode;
  logic lpu_coef_we = 0; logic [7:0] lpu_coef_addr; logic signed [7:0] lpu_coef_wdata;
  logic [4:0] lpu_shift; logic lpu_abs;
  opu_op_e opu_op; logic [4:0] opu_ksize; logic [7:0] opu_rank;
  logic start = 0, busy, done;
  logic om_re = 0; logic [XW-1:0] om_rx; logic [YW-1:0] om_ry; logic [15:0][7:0] om_rdata;
  logic feat_valid, feat_ready; logic [7:0] feat_data; logic [XW-1:0] feat_x; logic [YW-1:0] feat_y;
  logic lpu_active, opu_active;
  int checks = 0, failures = 0;
  int img [H][W], s1 [H][W], fin [H][W];
  int coef [256];
  int n_lpu_act = 0, n_opu_act = 0, n_both = 0, n_stall = 0;

  always #5 clk = ~clk;
  isps #(.W(W), .H(H)) dut (.*);

  initial begin
    #50000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    if (lpu_active) n_lpu_act++;
    if (opu_active) n_opu_act++;
    if (lpu_active && opu_active) n_both++;
    if (busy && !feat_ready) n_stall++;
  end

  function automatic int f_lpu(int x, int y, bit from_s1);
    int s;
    s = 0;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++)
      s += (from_s1 ? s1[y+r][x+c] : img[y+r][x+c]) * coef[r*16+c];
    if (lpu_abs && s < 0) s = -s;
    s = s >>> lpu_shift;
    return (s < 0) ? 0 : (s > 255) ? 255 : s;
  endfunction

  function automatic int f_opu(int x, int y, bit from_s1);
    int v[$]; int k, n, rk;
    k = opu_ksize;
    for (int r = 0; r < k; r++) for (int c = 0; c < k; c++) v.push_back(from_s1 ? s1[y+r][x+c] : img[y+r][x+c]);
    v.sort();
    n = k * k;
    case (opu_op)
      OPU_MIN: rk = 0;
      OPU_MAX: rk = n - 1;
      OPU_MEDIAN: rk = (n - 1) / 2;
      default: rk = (opu_rank < n) ? int'(opu_rank) : n - 1;
    endcase
    return v[rk];
  endfunction

  task automatic run(risp_mode_e m, opu_op_e oop, int ks, bit stalls);
    int ow, oh, nfeat, cyc, exp_cyc;
    bit piped, lpu1;
    mode = m; opu_op = oop; opu_ksize = 5'(ks); opu_rank = 8'd5;
    piped = (m == MODE_C_OPU_LPU || m == MODE_D_LPU_OPU);
    lpu1  = (m == MODE_A_LPU || m == MODE_D_LPU_OPU);
    // model
    for (int y = 0; y <= H - 16; y++) for (int x = 0; x <= W - 16; x++)
      s1[y][x] = lpu1 ? f_lpu(x, y, 0) : f_opu(x, y, 0);
    ow = piped ? W - 30 : W - 15;
    oh = piped ? H - 30 : H - 15;
    for (int y = 0; y < oh; y++) for (int x = 0; x < ow; x++)
      fin[y][x] = !piped ? s1[y][x] : lpu1 ? f_opu(x, y, 1) : f_lpu(x, y, 1);
    // run
    nfeat = 0; cyc = 0;
    start = 1; @(negedge clk); start = 0;
    while (!done) begin
      feat_ready = stalls ? ($urandom_range(4) != 0) : 1'b1;
      #1;
      if (feat_valid) begin
        nfeat++;
        checks++;
        if (feat_x >= ow || feat_y >= oh || feat_data != 8'(fin[feat_y][feat_x])) begin
          failures++;
          if (failures < 10) $display("FAIL mode %0d (%0d,%0d) got %0d exp %0d", m, feat_x, feat_y, feat_data, fin[feat_y][feat_x]);
        end
      end
      @(negedge clk);
      if (feat_ready) cyc++;
    end
    feat_ready = 1;
    exp_cyc = W * (piped ? (H - 30 + 16) : (H - 15)) + 3;
    checks++;
    if (nfeat != ow * oh) begin failures++; $display("FAIL mode %0d features %0d exp %0d", m, nfeat, ow * oh); end
    checks++;
    if (cyc != exp_cyc) begin failures++; $display("FAIL mode %0d cycles %0d exp %0d", m, cyc, exp_cyc); end
    // Output Memory 0 through the host port: column 2, rows 0..15
    om_re = 1; om_rx = XW'(2); om_ry = '0; @(negedge clk); om_re = 0;
    for (int i = 0; i < 16 && i < oh; i++) begin
      checks++;
      if (om_rdata[i] != 8'(fin[i][2])) failures++;
    end
  endtask

  initial begin
    feat_ready = 1; mode = MODE_A_LPU; opu_op = OPU_MIN; opu_ksize = 3; opu_rank = 0;
    lpu_shift = 5'd4; lpu_abs = 1'b1; pix_x = '0; pix_y = '0; pix_d = '0;
    lpu_coef_addr = '0; lpu_coef_wdata = '0; om_rx = '0; om_ry = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      img[y][x] = $urandom_range(255);
      pix_we = 1; pix_x = XW'(x); pix_y = YW'(y); pix_d = 8'(img[y][x]); @(negedge clk);
    end
    pix_we = 0;
    // Haar-like two-rectangle mask with a small random ripple
    for (int i = 0; i < 256; i++) begin
      coef[i] = ((i / 16) < 8 ? 1 : -1) * (1 + $urandom_range(2));
      lpu_coef_we = 1; lpu_coef_addr = 8'(i); lpu_coef_wdata = 8'(coef[i]); @(negedge clk);
    end
    lpu_coef_we = 0;
    run(MODE_A_LPU, OPU_MIN, 3, 0);
    run(MODE_B_OPU, OPU_MEDIAN, 3, 1);
    run(MODE_C_OPU_LPU, OPU_MEDIAN, 3, 0);
    run(MODE_D_LPU_OPU, OPU_MAX, 5, 1);
    run(MODE_B_OPU, OPU_RANK, 16, 0);
    // every mechanism must have happened
    checks++; if (n_both == 0)  begin failures++; $display("FAIL no pipelined cycle"); end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL no stall"); end
    $display("lpu cycles %0d, opu cycles %0d, both %0d, stalls %0d", n_lpu_act, n_opu_act, n_both, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
