// opu: Order Processing Unit of the RISP. Computes one order-statistic
// (rank) filter over a window per cycle: minimum, maximum, median or the
// pixel of any chosen rank.
//
// The operation covers the K x K top-left corner of the 16x16 window
// (K = ksize, 1..16), so a 3x3 median for noise reduction and a 16x16 maximum
// use the same hardware.
// The value of the given rank is found one bit at a time, most significant
// first: the pixels that agree with the bits found so far and have a 0 in the
// current bit are counted; if the rank is below that count the bit is 0,
// otherwise it is 1 and the count is subtracted from the rank. Eight rounds
// of 256 comparisons replace a 256x256 comparison matrix or a sorting network.
// The rank is 0 for MIN, K*K-1 for MAX, (K*K-1)/2 for
// MEDIAN and cfg_rank (clamped) for RANK. Timing: in_valid in cycle t gives
// out_valid with the result in cycle t+1; en = 0 freezes the output register.
// That the unit computes order-based window operations follows the design
// description; the bit-serial radix selection and the K x K sub-window are this
// design's own choice.
module opu #(
  parameter int WIN   = sasoc_pkg::WIN,
  parameter int PIX_W = sasoc_pkg::PIX_W
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               en,
  input  sasoc_pkg::opu_op_e                 op,
  input  logic [4:0]                         ksize,    // 1..WIN
  input  logic [$clog2(WIN*WIN)-1:0]         cfg_rank,
  input  logic                               in_valid,
  input  logic [WIN-1:0][WIN-1:0][PIX_W-1:0] win,
  output logic                               out_valid,
  output logic [PIX_W-1:0]                   result
);
  import sasoc_pkg::*;
  localparam int N  = WIN * WIN;
  localparam int CW = $clog2(N) + 1;

  logic [CW-1:0]    k, n, rank;
  logic [N-1:0]     in_k;
  logic [PIX_W-1:0] pix [N];
  logic [PIX_W-1:0] sel;

  always_comb begin
    k = (ksize == 0) ? CW'(1) : (32'(ksize) > WIN) ? CW'(WIN) : CW'(ksize);
    n = CW'(k * k);
    for (int r = 0; r < WIN; r++)
      for (int c = 0; c < WIN; c++) begin
        pix[r*WIN + c]    = win[r][c];
        in_k[r*WIN + c] = (CW'(r) < k) && (CW'(c) < k);
      end
    unique case (op)
      OPU_MIN:    rank = '0;
      OPU_MAX:    rank = n - 1'b1;
      OPU_MEDIAN: rank = (n - 1'b1) >> 1;
      default:    rank = (CW'(cfg_rank) < n) ? CW'(cfg_rank) : n - 1'b1;
    endcase
  end

  // radix selection, most significant bit first: count the pixels that
  // share the result prefix and have a 0 in this bit; the rank decides the bit
  always_comb begin
    logic [CW-1:0] r, cnt;
    logic          match;
    r   = rank;
    sel = '0;
    for (int bt = PIX_W - 1; bt >= 0; bt--) begin
      cnt = '0;
      for (int i = 0; i < N; i++) begin
        match = in_k[i] && !pix[i][bt] && (((pix[i] ^ sel) >> (bt + 1)) == '0);
        cnt += CW'(match);
      end
      if (r >= cnt) begin
        sel[bt] = 1'b1;
        r       = r - cnt;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
    end else if (en) begin
      out_valid <= in_valid;
      if (in_valid) result <= sel;
    end
  end
endmodule
