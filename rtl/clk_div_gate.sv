// clk_div_gate: integer clock divider with clock gating, one per clock domain.
//
// Divides the root clock by div (1..15; 0 counts as 1). For div >= 2 the
// output is a registered clock, high for the first div/2 root cycles of each
// period, so it is glitch-free; a new div is taken only at the start of a
// period. For div = 1 the root clock itself passes through an AND gate whose
// enable is sampled on the falling edge (the usual glitch-free gate). on = 0
// stops the clock low. Changing div between 1 and another value may shorten
// the one period in which the switch happens. The design description gives
// dynamic frequency scaling and clock gating per domain; the divider is this
// design's own choice (no PLL is described).
module clk_div_gate (
  input  logic       clk,      // root clock
  input  logic       rst_n,
  input  logic [3:0] div,
  input  logic       on,
  output logic       clk_out
);
  logic [3:0] n, cnt, nn, cn;
  logic       clk_d, en_neg;

  // next ratio and count: a new ratio is taken at the end of a period
  always_comb begin
    nn = n;
    cn = cnt + 1'b1;
    if (cnt >= n - 1'b1) begin
      nn = (div == 0) ? 4'd1 : div;
      cn = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n     <= 4'd1;
      cnt   <= '0;
      clk_d <= 1'b0;
    end else begin
      n     <= nn;
      cnt   <= cn;
      clk_d <= on && (cn < (nn >> 1));
    end
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) en_neg <= 1'b0;
    else        en_neg <= on;
  end

  assign clk_out = (n == 4'd1) ? (clk & en_neg) : clk_d;
endmodule
