// local_pixel_memory: the 16x16 pixel window in front of a RISP processing unit.
//
// Every cycle with shift = 1 a new vertical stripe of 16 pixels enters at the
// right-hand column and the leftmost column drops out, so a window sliding one
// pixel to the right is ready every cycle and all 256 pixels can be read at
// once. win[r][c] is row r, column c of the window; column WIN-1 is the newest.
// The registers hold their value when shift = 0 (stall). The window size
// follows the design description; the shift-register form is this design's
// own choice.
module local_pixel_memory #(
  parameter int WIN   = sasoc_pkg::WIN,
  parameter int PIX_W = sasoc_pkg::PIX_W
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              shift,
  input  logic [WIN-1:0][PIX_W-1:0]         stripe,   // lane i = window row i
  output logic [WIN-1:0][WIN-1:0][PIX_W-1:0] win      // [row][col]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win <= '0;
    end else if (shift) begin
      for (int r = 0; r < WIN; r++) begin
        for (int c = 0; c < WIN - 1; c++) win[r][c] <= win[r][c+1];
        win[r][WIN-1] <= stripe[r];
      end
    end
  end
endmodule
