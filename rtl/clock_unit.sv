// clock_unit: clock generation for the two processing domains.
//
// The root clock drives the system-monitor domain; the ISPS and FSPS clocks
// are divided copies of it (ratios 1..15) that the System Monitor can change
// at run time and that can each be gated off when that system is not in use.
// The three clock domains, the frequency scaling of the ISPS and FSPS
// clocks and the gating follow the design description; integer division of
// one root clock is this design's own choice.
module clock_unit (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] isps_div,
  input  logic [3:0] fsps_div,
  input  logic       isps_on,
  input  logic       fsps_on,
  output logic       clk_isps,
  output logic       clk_fsps
);
  clk_div_gate u_isps (.clk, .rst_n, .div(isps_div), .on(isps_on), .clk_out(clk_isps));
  clk_div_gate u_fsps (.clk, .rst_n, .div(fsps_div), .on(fsps_on), .clk_out(clk_fsps));
endmodule
