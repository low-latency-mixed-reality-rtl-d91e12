// video_controller: turns 8-pixel words from the video FIFO into a 640x480
// video stream of one pixel per clock.
//
// Timing: 800 clocks per line and 525 lines per frame (640x480 active with the
// standard 16/96/48 horizontal and 10/2/33 vertical porch/sync/porch, syncs
// active low), 420,000 clocks per frame, i.e. 240 frames/s at a 9.92 ns pixel
// clock. After enable rises the controller waits FILL_CYCLES clocks so the
// FIFO can fill, then runs frames back to back while enable stays high.
// On the first pixel of every group of eight in the active area it pops one
// word and then sends its pixels one per clock. If the FIFO is empty there,
// the eight pixels are sent black and underflow_cnt counts it. During vertical
// blanking any head word that is not the first word of a frame is dropped
// (resync_cnt counts them), so after an underflow the next frame starts at
// the right word again. Outputs are registered: rgb/de/hs/vs change one clock
// after the counters. frame_start pulses for one clock at the start of each
// frame. The frame size, 240 Hz and 16,000-clock fill time follow the design;
// porches, sync polarity and the underflow and resync behaviour are this
// design's choices.
module video_controller
  import mr_pkg::*;
#(
  parameter int FILL_CYCLES = 16000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        fifo_empty,
  input  vword_t      fifo_data,
  output logic        fifo_pop,
  output rgb_t        rgb,
  output logic        de,
  output logic        hs,
  output logic        vs,
  output logic        frame_start,
  output logic        running,
  output logic [15:0] underflow_cnt,
  output logic [15:0] resync_cnt,
  output logic [15:0] frame_cnt
);
  typedef enum logic [1:0] {S_IDLE, S_FILL, S_RUN} state_t;
  state_t state;
  logic [$clog2(FILL_CYCLES+1)-1:0] fill;
  logic [9:0] h;
  logic [9:0] v;
  rgb_t [LANES-1:0] sr;

  logic active, need, vblank, drop;
  assign running = (state == S_RUN);
  assign active  = running && (h < 10'(H_ACTIVE)) && (v < 10'(V_ACTIVE));
  assign need    = active && (h[2:0] == 3'd0);
  assign vblank  = running && (v >= 10'(V_ACTIVE));
  assign drop    = vblank && !fifo_empty && !fifo_data.sof;
  assign fifo_pop = (need && !fifo_empty) || drop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      fill <= '0;
      h <= '0; v <= '0;
      sr <= '0;
      rgb <= '0; de <= 1'b0; hs <= 1'b1; vs <= 1'b1;
      frame_start <= 1'b0;
      underflow_cnt <= '0; resync_cnt <= '0; frame_cnt <= '0;
    end else begin
      frame_start <= 1'b0;
      case (state)
        S_IDLE: begin
          h <= '0; v <= '0;
          fill <= '0;
          if (enable) state <= S_FILL;
        end
        S_FILL: begin
          if (!enable) state <= S_IDLE;
          else if (32'(fill) == FILL_CYCLES - 1) begin
            state <= S_RUN;
            frame_start <= 1'b1;
          end else fill <= fill + 1'b1;
        end
        default: begin
          if (!enable) state <= S_IDLE;
          if (h == 10'(H_TOTAL - 1)) begin
            h <= '0;
            if (v == 10'(V_TOTAL - 1)) begin
              v <= '0;
              frame_cnt <= frame_cnt + 1'b1;
              frame_start <= enable;
            end else v <= v + 1'b1;
          end else h <= h + 1'b1;
        end
      endcase

      // pixel path
      if (need) begin
        if (!fifo_empty) begin
          sr  <= fifo_data.pix;
          rgb <= fifo_data.pix[0];
        end else begin
          sr  <= '0;
          rgb <= '0;
          underflow_cnt <= underflow_cnt + 1'b1;
        end
      end else if (active) rgb <= sr[h[2:0]];
      else rgb <= '0;
      if (drop) resync_cnt <= resync_cnt + 1'b1;
      de <= active;
      hs <= !(running && h >= 10'(H_ACTIVE + H_FP) && h < 10'(H_ACTIVE + H_FP + H_SYNC));
      vs <= !(running && v >= 10'(V_ACTIVE + V_FP) && v < 10'(V_ACTIVE + V_FP + V_SYNC));
    end
  end
endmodule
