// isps_sequencer: scan controller of the Image-Stream Processing System.
//
// After start it issues one stripe request per cycle: for each band y (the
// top row of a 16-row window) it walks x = 0..W-1, so the RISP sees every
// 16x16 window position (x-15, y) once x >= 15. Stage 1 scans the input frame
// for bands 0..H-16. In the pipelined modes (C, D) stage 2 scans the image
// written by stage 1, LAG = 16 bands behind, so every row it reads is already
// complete, and the run takes 16 extra bands. After the last request it waits
// three cycles for the RISP pipeline to drain and pulses done. en = 0 stalls it.
// That a sequencer drives the slice memory and the RISP follows the design
// description; the scan order, the 16-band lag and the drain are this
// design's own choice.
module isps_sequencer #(
  parameter int W   = 160,
  parameter int H   = 120,
  parameter int WIN = sasoc_pkg::WIN
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   start,
  input  sasoc_pkg::risp_mode_e  mode,
  output logic                   busy,
  output logic                   done,
  output logic                   s1_req,
  output logic [$clog2(W)-1:0]   s1_x,
  output logic [$clog2(H)-1:0]   s1_y,
  output logic                   s2_req,
  output logic [$clog2(W)-1:0]   s2_x,
  output logic [$clog2(H)-1:0]   s2_y
);
  import sasoc_pkg::*;
  localparam int XW    = $clog2(W);
  localparam int YW    = $clog2(H);
  localparam int HOUT  = H - WIN + 1;      // window rows of stage 1
  localparam int HOUT2 = HOUT - WIN + 1;   // window rows of stage 2
  localparam int LAG   = WIN;
  localparam int NB_P  = (HOUT > LAG + HOUT2) ? HOUT : LAG + HOUT2;
  localparam int BW    = $clog2(NB_P + 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e        state;
  logic [XW-1:0] x;
  logic [BW-1:0] band, nbands;
  logic [1:0]    drain;
  logic          piped_q;

  assign nbands = piped_q ? BW'(NB_P) : BW'(HOUT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      x       <= '0;
      band    <= '0;
      drain   <= '0;
      piped_q <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (en) begin
        unique case (state)
          S_IDLE: if (start) begin
            state   <= S_RUN;
            x       <= '0;
            band    <= '0;
            piped_q <= (mode == MODE_C_OPU_LPU) || (mode == MODE_D_LPU_OPU);
          end
          S_RUN: begin
            if (x == XW'(W - 1)) begin
              x <= '0;
              if (band == nbands - 1'b1) begin
                state <= S_DRAIN;
                drain <= '0;
              end
              band <= band + 1'b1;
            end else begin
              x <= x + 1'b1;
            end
          end
          S_DRAIN: begin
            drain <= drain + 1'b1;
            if (drain == 2'd2) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  always_comb begin
    busy   = (state != S_IDLE);
    s1_req = (state == S_RUN) && (band < BW'(HOUT));
    s1_x   = x;
    s1_y   = YW'(band);
    s2_req = (state == S_RUN) && piped_q && (band >= BW'(LAG)) && (band - BW'(LAG) < BW'(HOUT2));
    s2_x   = x;
    s2_y   = YW'(band - BW'(LAG));
  end
endmodule
