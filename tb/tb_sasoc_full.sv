// tb_sasoc_full: the whole SoC end to end with every parameter at its default (160x120 frame).
// A random frame is written into the slice memory; the RISP runs mode C (OPU 3x3 median noise reduction, then LPU Haar-like features, pipelined) and then mode A on it
// (Haar-like LPU mask, OPU median / maximum); every feature crosses into the FSPS
// clock domain, is packed into 256-element vectors and classified
// automatically against a database of ND vectors (sum of squared-L2
// distances, with K-NN ranking). Checks: every OVM result against a
// testbench model of the whole chain, the K-NN list of the last vector, and
// that each mechanism happened: both RISP units working in the same cycle
// (modes C/D), ISPS stalled by a full crossing FIFO, FSPS bubbles, a
// frequency adjustment by the system monitor, IVM input back-pressure,
// and clock gating of one domain.
module tb_sasoc_full;
  import sasoc_pkg::*;
  localparam int W = 160, H = 120, ND = 24;
  localparam int XW = $clog2(W), YW = $clog2(H);
  logic clk = 0, rst_n = 1, clk_isps, clk_fsps;
  logic mon_auto, mon_isps_on, mon_fsps_on; logic [3:0] mon_isps_div, mon_fsps_div, isps_div, fsps_div;
  logic mon_adjust;
  logic pix_we = 0; logic [XW-1:0] pix_x; logic [YW-1:0] pix_y; logic [7:0] pix_d;
  risp_mode_e mode;
  logic lpu_coef_we = 0; logic [7:0] lpu_coef_addr; logic signed [7:0] lpu_coef_wdata;
  logic [4:0] lpu_shift; logic lpu_abs; opu_op_e opu_op; logic [4:0] opu_ksize; logic [7:0] opu_rank;
  logic isps_start = 0, isps_busy, isps_done;
  logic om_re = 0; logic [XW-1:0] om_rx; logic [YW-1:0] om_ry; logic [15:0][7:0] om_rdata;
  logic isps_stall, lpu_active, opu_active;
  logic h_ivm_we = 0; logic [2:0] h_ivm_waddr; logic [2047:0] h_ivm_wdata;
  logic low_we = 0, mid_we = 0, high_we = 0; logic [6:0] low_waddr, mid_waddr, high_waddr;
  logic [2047:0] low_wdata; logic [255:0] mid_wdata; logic [48:0] high_wdata;
  vpu_cfg_t prog; logic [7:0] n_terms; logic [4:0] mid_wshift; logic signed [31:0] bias;
  logic auto_en, knn_en, fsps_start = 0; logic [2:0] fsps_start_slot;
  logic ovm_re = 0; logic [6:0] ovm_raddr; logic [32:0] ovm_rdata;
  logic [127:0] knn_valid; logic [127:0][31:0] knn_dist; logic [127:0][15:0] knn_id; logic [7:0] knn_count;
  logic fsps_busy, fsps_done, fsps_starved;
  int checks = 0, failures = 0;
  int n_both = 0, n_stall = 0, n_starve = 0, n_adj = 0, n_bp = 0, n_gated = 0, n_done = 0;
  int img [H][W], s1 [H][W];
  int coef [256];
  logic [7:0] fstream [$];
  logic [2047:0] db [ND];

  always #5 clk = ~clk;
  sasoc dut (.*);

  initial begin
    #500000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk_isps) begin
    if (lpu_active && opu_active) n_both++;
    if (isps_stall) n_stall++;
  end
  always @(posedge clk_fsps) begin
    if (fsps_starved && isps_busy) n_starve++;
    if (dut.u_fsps.stall) n_bp++;
    if (fsps_done) n_done++;
  end
  always @(posedge clk) if (mon_adjust) n_adj++;

  function automatic int f_lpu(int x, int y, bit from_s1);
    int s; s = 0;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++)
      s += (from_s1 ? s1[y+r][x+c] : img[y+r][x+c]) * coef[r*16+c];
    if (lpu_abs && s < 0) s = -s;
    s = s >>> lpu_shift;
    return (s < 0) ? 0 : (s > 255) ? 255 : s;
  endfunction
  function automatic int f_opu(int x, int y, bit from_s1);
    int v[$]; int k, n;
    k = opu_ksize;
    for (int r = 0; r < k; r++) for (int c = 0; c < k; c++) v.push_back(from_s1 ? s1[y+r][x+c] : img[y+r][x+c]);
    v.sort(); n = k * k;
    return (opu_op == OPU_MAX) ? v[n-1] : (opu_op == OPU_MIN) ? v[0] : v[(n-1)/2];
  endfunction
  function automatic int sqd(logic [2047:0] x, logic [2047:0] y);
    int s; s = 0;
    for (int i = 0; i < 256; i++) begin
      int d; d = int'($signed(x[i*8 +: 8])) - int'($signed(y[i*8 +: 8])); s += d * d;
    end
    return s;
  endfunction

  // model of one frame: append its features, in stream order, to fstream
  task automatic model_frame(risp_mode_e m);
    bit piped, lpu1; int ow, oh;
    piped = (m == MODE_C_OPU_LPU || m == MODE_D_LPU_OPU);
    lpu1  = (m == MODE_A_LPU || m == MODE_D_LPU_OPU);
    for (int y = 0; y <= H - 16; y++) for (int x = 0; x <= W - 16; x++)
      s1[y][x] = lpu1 ? f_lpu(x, y, 0) : f_opu(x, y, 0);
    ow = piped ? W - 30 : W - 15;
    oh = piped ? H - 30 : H - 15;
    for (int y = 0; y < oh; y++) for (int x = 0; x < ow; x++)
      fstream.push_back(8'(!piped ? s1[y][x] : lpu1 ? f_opu(x, y, 1) : f_lpu(x, y, 1)));
  endtask

  task automatic run_frame(risp_mode_e m, opu_op_e oop, int ks);
    @(negedge clk_isps);
    mode = m; opu_op = oop; opu_ksize = 5'(ks);
    model_frame(m);
    isps_start = 1; @(negedge clk_isps); isps_start = 0;
    while (!isps_done) @(negedge clk_isps);
  endtask

  initial begin
    mon_auto = 0; mon_isps_on = 1; mon_fsps_on = 1; mon_isps_div = 4'd1; mon_fsps_div = 4'd6;
    mode = MODE_A_LPU; lpu_shift = 5'd5; lpu_abs = 1; opu_op = OPU_MEDIAN; opu_ksize = 5'd3; opu_rank = 0;
    pix_x = 0; pix_y = 0; pix_d = 0; lpu_coef_addr = 0; lpu_coef_wdata = 0; om_rx = 0; om_ry = 0;
    h_ivm_waddr = 0; h_ivm_wdata = 0; low_waddr = 0; mid_waddr = 0; high_waddr = 0;
    low_wdata = 0; mid_wdata = 0; high_wdata = 0;
    prog = '0; prog.vl_op = VL_SQDIFF; prog.vm_op = VM_SUM; prog.vh_op = VH_PASS;
    n_terms = 8'(ND); mid_wshift = 0; bias = 0; auto_en = 1; knn_en = 1; fsps_start_slot = 0; ovm_raddr = 0;
    #1 rst_n = 0;  // a real falling edge: derived clocks are stopped in reset
    repeat (3) @(negedge clk); rst_n = 1;
    // FSPS model: database vectors, unit weights
    for (int i = 0; i < ND; i++) begin
      @(negedge clk_fsps);
      for (int k = 0; k < 64; k++) db[i][k*32 +: 32] = $urandom;
      low_we = 1; low_waddr = 7'(i); low_wdata = db[i];
      high_we = 1; high_waddr = 7'(i); high_wdata = {1'b0, 32'sd0, 16'sd1};
    end
    @(negedge clk_fsps); low_we = 0; high_we = 0;
    // frame and LPU mask (ISPS domain)
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      @(negedge clk_isps);
      img[y][x] = $urandom_range(255);
      pix_we = 1; pix_x = XW'(x); pix_y = YW'(y); pix_d = 8'(img[y][x]);
    end
    for (int i = 0; i < 256; i++) begin
      @(negedge clk_isps); pix_we = 0;
      coef[i] = ((i % 16) < 8 ? 1 : -1) * (1 + $urandom_range(2));
      lpu_coef_we = 1; lpu_coef_addr = 8'(i); lpu_coef_wdata = 8'(coef[i]);
    end
    @(negedge clk_isps); lpu_coef_we = 0;
    // frames; the monitor rebalances the clocks from here on
    mon_auto = 1;
    // hold automatic classification off until the packed input backs up
    auto_en = 0;
    fork
      begin
        while (n_bp < 20) @(negedge clk_fsps);
        auto_en = 1;
      end
    join_none
    run_frame(MODE_C_OPU_LPU, OPU_MEDIAN, 3);
    run_frame(MODE_A_LPU, OPU_MEDIAN, 3);
    // let the FSPS finish the vectors it has
    begin
      int nvec;
      nvec = fstream.size() / 256;
      while (n_done < nvec) @(negedge clk_fsps);
      repeat (4) @(negedge clk_fsps);
      // gate the ISPS clock while the FSPS keeps running
      mon_isps_on = 0;
      begin
        int ni0, nf0;
        repeat (8) @(negedge clk_fsps);
        ni0 = n_both + n_stall; nf0 = 0;
        fork
          begin : cnt_i
            forever begin @(posedge clk_isps); n_gated--; end
          end
          begin repeat (50) @(posedge clk_fsps); nf0 = 50; end
        join_any
        disable cnt_i;
        if (n_gated == 0 && nf0 == 50) n_gated = 1; else n_gated = 0;
      end
      mon_isps_on = 1;
      // results
      for (int v = 0; v < nvec; v++) begin
        logic [2047:0] x; int e;
        for (int i = 0; i < 256; i++) x[i*8 +: 8] = fstream[v*256 + i];
        e = 0;
        for (int i = 0; i < ND; i++) e += sqd(x, db[i]);
        @(negedge clk_fsps); ovm_re = 1; ovm_raddr = 7'(v);
        @(negedge clk_fsps); ovm_re = 0;
        checks++;
        if ($signed(ovm_rdata[31:0]) != e) begin
          failures++; if (failures < 10) $display("FAIL vector %0d result %0d exp %0d", v, $signed(ovm_rdata[31:0]), e);
        end
        if (v == nvec - 1) begin
          int dref [$];
          for (int i = 0; i < ND; i++) dref.push_back(sqd(x, db[i]));
          dref.sort();
          for (int i = 0; i < ND; i++) begin
            checks++;
            if (!knn_valid[i] || knn_dist[i] != 32'(dref[i])) failures++;
          end
        end
      end
      checks++; if (n_done != nvec) begin failures++; $display("FAIL classifications %0d exp %0d", n_done, nvec); end
      $display("features %0d, vectors %0d", fstream.size(), nvec);
    end
    $display("mechanisms: both-units %0d, isps-stall %0d, fsps-bubble %0d, monitor-adjust %0d, ivm-backpressure %0d, gating %0d",
             n_both, n_stall, n_starve, n_adj, n_bp, n_gated);
    $display("final dividers isps %0d fsps %0d", isps_div, fsps_div);
    checks++; if (n_both == 0)   begin failures++; $display("FAIL never pipelined"); end
    checks++; if (n_stall == 0)  begin failures++; $display("FAIL never stalled"); end
    checks++; if (n_starve == 0) begin failures++; $display("FAIL no FSPS bubbles"); end
    checks++; if (n_adj == 0)    begin failures++; $display("FAIL monitor never adjusted"); end
    checks++; if (n_gated == 0)  begin failures++; $display("FAIL gating"); end
    checks++; if (n_bp == 0)     begin failures++; $display("FAIL no input back-pressure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
