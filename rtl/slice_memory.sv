// slice_memory: banked frame memory that delivers a vertical stripe of 16
// pixels, starting at any row, in every cycle.
//
// Pixel (x, y) lives in bank (y mod BANKS) at word (y / BANKS) * W + x, so the
// 16 vertically adjacent pixels of any stripe always fall in 16 different
// banks. A stripe read at (rx, ry) reads every bank once, at the word holding
// row ry + ((b - ry) mod BANKS), and rotates the bank outputs so that lane i
// carries row ry + i. Rows past the bottom of the frame read as zero.
//
// Timing: one pixel write and one stripe read per cycle; read data appear one
// cycle after re (registered memory, as in an SRAM macro). The 16 banks and the
// 16-pixel (128-bit) stripe follow the design description; the row-interleaved
// bank mapping and the single-pixel write port are this design's own choice.
// The same module serves as the two halves of the RISP's dual Output Memory.
module slice_memory #(
  parameter int W     = 160,               // frame width in pixels
  parameter int H     = 120,               // frame height in pixels
  parameter int PIX_W = sasoc_pkg::PIX_W,
  parameter int BANKS = sasoc_pkg::BANKS
) (
  input  logic                     clk,
  // pixel write port
  input  logic                     we,
  input  logic [$clog2(W)-1:0]     wx,
  input  logic [$clog2(H)-1:0]     wy,
  input  logic [PIX_W-1:0]         wdata,
  // stripe read port
  input  logic                     re,
  input  logic [$clog2(W)-1:0]     rx,
  input  logic [$clog2(H)-1:0]     ry,
  output logic [BANKS-1:0][PIX_W-1:0] rdata
);
  localparam int GROUPS = (H + BANKS - 1) / BANKS;
  localparam int DEPTH  = GROUPS * W;
  localparam int AW     = $clog2(DEPTH);
  localparam int BW     = $clog2(BANKS);

  logic [PIX_W-1:0] mem [BANKS][DEPTH];

  // write: one bank, selected by the low row bits
  always_ff @(posedge clk) begin
    if (we) mem[int'(wy) % BANKS][AW'((int'(wy) / BANKS) * W + wx)] <= wdata;
  end

  // read: every bank at its own address
  logic [BANKS-1:0][PIX_W-1:0] bank_q;
  logic [BANKS-1:0]            bank_ok;
  logic [BW-1:0]               rot_q;

  always_ff @(posedge clk) begin
    if (re) begin
      for (int b = 0; b < BANKS; b++) begin
        int row;
        row = int'(ry) + ((b - int'(int'(ry) % BANKS) + BANKS) % BANKS);
        bank_ok[b] <= (row < H);
        bank_q[b]  <= mem[b][AW'((row < H) ? (row / BANKS) * W + int'(rx) : 0)];
      end
      rot_q <= BW'(int'(ry) % BANKS);
    end
  end

  // rotate: lane i comes from bank (ry + i) mod BANKS
  always_comb begin
    for (int i = 0; i < BANKS; i++) begin
      logic [BW-1:0] b;
      b = BW'(int'(rot_q) + i);
      rdata[i] = bank_ok[b] ? bank_q[b] : '0;
    end
  end
endmodule
