// vector_mem: single-clock vector memory with one write port and one read
// port, DEPTH words of WIDTH bits. Used for the Input Vector Memory, the Local
// Vector Memory of each VPU level and the Output Vector Memory.
// Read data appear one cycle after re (synchronous read, as an SRAM macro)
// and hold while re = 0. A read and a write to the same word in the same
// cycle return the old word. Contents are cleared by nothing: they are loaded
// before use. The memories follow the design description; their depths and
// word widths are this design's own choice.
module vector_mem #(
  parameter int WIDTH = sasoc_pkg::VDIM * sasoc_pkg::VEL_W,
  parameter int DEPTH = 128
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
