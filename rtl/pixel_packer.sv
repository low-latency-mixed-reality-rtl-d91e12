// pixel_packer: packs the pixels of the eight lanes into one wide word.
//
// Lane i always carries pixel x0+i of the current group. When every lane
// offers a pixel and the output is free, one pixel is taken from each lane
// and a word {sof, y, x0, pix[7:0]} is formed. The packer keeps its own raster
// position, since pixels arrive in raster order: x0 steps by 8 across 640
// columns, y across 480 rows, and sof marks the word at (0, 0). The output is
// registered (one word per clock at most, one clock of latency). Packing the
// lanes into one word follows the design; the all-lanes rule and the raster
// tag are this design's choices.
module pixel_packer
  import mr_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LANES-1:0] in_valid,
  output logic [LANES-1:0] in_ready,
  input  rgb_t             in_pix [LANES],
  output logic             out_valid,
  input  logic             out_ready,
  output pixword_t         out_word
);
  logic [9:0] x0;
  logic [8:0] y;
  logic take;

  assign take     = (&in_valid) && (!out_valid || out_ready);
  assign in_ready = {LANES{take}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x0 <= '0;
      y  <= '0;
      out_valid <= 1'b0;
      out_word  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        out_valid     <= 1'b1;
        out_word.sof  <= (x0 == '0) && (y == '0);
        out_word.x0   <= x0;
        out_word.y    <= y;
        for (int i = 0; i < LANES; i++) out_word.pix[i] <= in_pix[i];
        if (x0 == 10'(H_ACTIVE - LANES)) begin
          x0 <= '0;
          y  <= (y == 9'(V_ACTIVE - 1)) ? '0 : y + 1'b1;
        end else begin
          x0 <= x0 + 10'(LANES);
        end
      end
    end
  end
endmodule
