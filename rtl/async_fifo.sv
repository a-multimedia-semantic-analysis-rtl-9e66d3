// async_fifo: clock-domain crossing FIFO for the feature stream from the ISPS
// clock domain to the FSPS clock domain.
//
// DEPTH (a power of two) words. Write and read pointers are kept in binary
// and Gray code; each Gray pointer crosses to the other domain through a
// two-flop synchronizer, so full (write side) and empty (read side) are
// conservative: they may stay set a few cycles after the other side moved,
// never too short. Write when winc && !wfull; rdata shows the oldest word
// whenever !rempty (first-word fall-through) and rinc pops it. The design
// description only says that the ISPS sends its features to the FSPS across
// separate clock domains; this FIFO is this design's own choice.
module async_fifo #(
  parameter int DW    = sasoc_pkg::PIX_W,
  parameter int DEPTH = 16
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          winc,
  input  logic [DW-1:0] wdata,
  output logic          wfull,
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rinc,
  output logic [DW-1:0] rdata,
  output logic          rempty
);
  localparam int AW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  logic [AW:0]   wbin, wgray, rbin, rgray;
  logic [AW:0]   rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0]   wbin_n, rbin_n, wgray_n, rgray_n;

  // write side
  assign wbin_n  = wbin + (AW+1)'(winc && !wfull);
  assign wgray_n = (wbin_n >> 1) ^ wbin_n;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_n;
      wgray    <= wgray_n;
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wclk) begin
    if (winc && !wfull) mem[wbin[AW-1:0]] <= wdata;
  end

  assign wfull = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // read side
  assign rbin_n  = rbin + (AW+1)'(rinc && !rempty);
  assign rgray_n = (rbin_n >> 1) ^ rbin_n;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_n;
      rgray    <= rgray_n;
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  assign rempty = (rgray == wgray_r2);
  assign rdata  = mem[rbin[AW-1:0]];
endmodule
