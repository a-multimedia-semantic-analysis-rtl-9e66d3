// system_monitor: power-aware frequency scaling of the ISPS and FSPS clocks.
//
// Runs on the root clock. Two status bits arrive from the processing domains
// (with isps_busy) through two-flop synchronizers: isps_stalled (the ISPS holds a feature the
// FSPS cannot take yet: the FSPS is the bottleneck) and fsps_starved (the
// FSPS is idle waiting for features while the ISPS works: bubble cycles in
// the FSPS). Over every window of WINDOW root cycles both are counted. At the
// end of a window, if stalls exceeded THRESH, the FSPS is sped up (its divider
// decremented) or, already at full speed, the ISPS is slowed; else if bubbles
// exceeded THRESH, the ISPS is sped up or, already at full speed, the FSPS is
// slowed, which is where the power saving comes from. With auto_en = 0 the
// host's dividers are used unchanged. Each clock is gated off when the host
// marks its system unused (isps_on / fsps_on). The goal (balance the two
// systems' computing time by scaling their clocks, gate an unused one)
// follows the design description; the counting window, the threshold rule
// and the one-step adjustments are this design's own choice.
module system_monitor #(
  parameter int WINDOW = 256,
  parameter int THRESH = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       auto_en,
  input  logic [3:0] isps_div_init,
  input  logic [3:0] fsps_div_init,
  input  logic       isps_stalled,    // asynchronous, ISPS domain
  input  logic       fsps_starved,    // asynchronous, FSPS domain
  input  logic       isps_busy,       // asynchronous, ISPS domain
  output logic [3:0] isps_div,
  output logic [3:0] fsps_div,
  output logic       adjust           // pulses when a divider was changed
);
  localparam int CW = $clog2(WINDOW + 1);

  logic [1:0]    st_sync, sv_sync, ib_sync;
  logic [CW-1:0] tick, n_stall, n_starve;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_sync <= '0;
      sv_sync <= '0;
      ib_sync <= '0;
    end else begin
      ib_sync <= {ib_sync[0], isps_busy};
      st_sync <= {st_sync[0], isps_stalled};
      sv_sync <= {sv_sync[0], fsps_starved};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick     <= '0;
      n_stall  <= '0;
      n_starve <= '0;
      isps_div <= 4'd1;
      fsps_div <= 4'd1;
      adjust   <= 1'b0;
    end else begin
      adjust <= 1'b0;
      if (!auto_en) begin
        tick     <= '0;
        n_stall  <= '0;
        n_starve <= '0;
        isps_div <= (isps_div_init == 0) ? 4'd1 : isps_div_init;
        fsps_div <= (fsps_div_init == 0) ? 4'd1 : fsps_div_init;
      end else if (tick == CW'(WINDOW - 1)) begin
        tick     <= '0;
        n_stall  <= '0;
        n_starve <= '0;
        if (n_stall > CW'(THRESH)) begin
          adjust <= 1'b1;
          if (fsps_div > 4'd1)       fsps_div <= fsps_div - 1'b1;
          else if (isps_div < 4'd15) isps_div <= isps_div + 1'b1;
          else                       adjust   <= 1'b0;
        end else if (n_starve > CW'(THRESH)) begin
          adjust <= 1'b1;
          if (isps_div > 4'd1)       isps_div <= isps_div - 1'b1;
          else if (fsps_div < 4'd15) fsps_div <= fsps_div + 1'b1;
          else                       adjust   <= 1'b0;
        end
      end else begin
        tick     <= tick + 1'b1;
        n_stall  <= n_stall  + CW'(st_sync[1]);
        n_starve <= n_starve + CW'(sv_sync[1] && ib_sync[1]);
      end
    end
  end
endmodule
