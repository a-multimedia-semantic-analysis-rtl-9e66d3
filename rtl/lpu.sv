// lpu: Linear Processing Unit of the RISP. Computes one linear window
// operation (convolution / correlation with a 16x16 coefficient mask) per cycle.
//
// result = sat8( (abs_en ? |S| : S) >>> shift ),  S = sum_{r,c} win[r][c] * coef[r][c]
// Pixels are unsigned, coefficients signed 8-bit; S is exact (32 bits). The
// result saturates to 0..255. Box filters, gradients and Haar-like rectangle
// features are all masks of this form. Coefficients are written one at a time
// through coef_we/coef_addr (row*16+col). Timing: in_valid with a window in
// cycle t gives out_valid with the result in cycle t+1; en = 0 freezes the
// output register. That the unit does linear 16x16 window operations in one
// cycle follows the design description; the number formats, the mask storage
// and the abs/shift post-processing are this design's own choice.
module lpu #(
  parameter int WIN   = sasoc_pkg::WIN,
  parameter int PIX_W = sasoc_pkg::PIX_W
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               en,
  // configuration
  input  logic                               coef_we,
  input  logic [$clog2(WIN*WIN)-1:0]         coef_addr,
  input  logic signed [7:0]                  coef_wdata,
  input  logic [4:0]                         shift,
  input  logic                               abs_en,
  // window in, result out
  input  logic                               in_valid,
  input  logic [WIN-1:0][WIN-1:0][PIX_W-1:0] win,
  output logic                               out_valid,
  output logic [PIX_W-1:0]                   result
);
  logic signed [7:0] coef [WIN*WIN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < WIN*WIN; i++) coef[i] <= '0;
    end else if (coef_we) begin
      coef[coef_addr] <= coef_wdata;
    end
  end

  logic signed [31:0] sum, mag, shifted;
  logic [PIX_W-1:0]   sat;
  always_comb begin
    sum = '0;
    for (int r = 0; r < WIN; r++)
      for (int c = 0; c < WIN; c++)
        sum += $signed({1'b0, win[r][c]}) * coef[r*WIN + c];
    mag     = (abs_en && sum < 0) ? -sum : sum;
    shifted = mag >>> shift;
    if (shifted < 0)                             sat = '0;
    else if (shifted > (2**PIX_W) - 1)           sat = '1;
    else                                         sat = shifted[PIX_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
    end else if (en) begin
      out_valid <= in_valid;
      if (in_valid) result <= sat;
    end
  end
endmodule
