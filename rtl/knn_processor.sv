// knn_processor: K-Nearest-Neighbour ranking of vector distances.
//
// NPE processing elements hold the NPE smallest distances seen since clr, in
// ascending order, with their vector ids. Each cycle with in_valid one new
// (dist, id) is inserted: every PE compares the new distance with its own in
// parallel; PEs holding larger distances (or nothing) take their left
// neighbour's entry, the first of them takes the new one, and the rest keep
// theirs. So a distance is sorted and stored in the same cycle, at one
// distance per cycle; equal distances keep arrival order, and a distance
// larger than all NPE held ones is dropped once the PEs are full. Distances
// are unsigned. Outputs are the registers of the PEs (count = number held).
// The 128 PEs and the one-cycle sort-and-store follow the design
// description; the insertion structure is this design's own choice.
module knn_processor #(
  parameter int NPE = 128,
  parameter int DW  = sasoc_pkg::ACC_W,
  parameter int IDW = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  input  logic                       in_valid,
  input  logic [DW-1:0]              in_dist,
  input  logic [IDW-1:0]             id,
  output logic [NPE-1:0]             pe_valid,
  output logic [NPE-1:0][DW-1:0]     pe_dist,
  output logic [NPE-1:0][IDW-1:0]    pe_id,
  output logic [$clog2(NPE+1)-1:0]   count
);
  logic [NPE-1:0] after;   // new entry goes in front of this PE's entry

  always_comb begin
    for (int i = 0; i < NPE; i++) after[i] = !pe_valid[i] || (pe_dist[i] > in_dist);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pe_valid <= '0;
      pe_dist  <= '0;
      pe_id    <= '0;
    end else if (clr) begin
      pe_valid <= '0;
    end else if (in_valid) begin
      for (int i = 0; i < NPE; i++) begin
        if (after[i]) begin
          if (i == 0 || !after[i-1]) begin
            pe_valid[i] <= 1'b1;
            pe_dist[i]  <= in_dist;
            pe_id[i]    <= id;
          end else begin
            pe_valid[i] <= pe_valid[i-1];
            pe_dist[i]  <= pe_dist[i-1];
            pe_id[i]    <= pe_id[i-1];
          end
        end
      end
    end
  end

  always_comb begin
    count = '0;
    for (int i = 0; i < NPE; i++) count += $bits(count)'(pe_valid[i]);
  end
endmodule
