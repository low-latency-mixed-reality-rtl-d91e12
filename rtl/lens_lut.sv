// lens_lut: one bank of the lens distortion map.
//
// For each destination pixel the map gives the column and row of the source
// image pixel to show there, so that the image reflected by the curved
// combiner appears undistorted. The full 640x480 map of one eye is split into
// eight banks by x mod 8, so each of the eight lanes reads its own bank once
// per clock; a bank therefore holds DEPTH = 480*80 entries addressed by
// y*80 + x/8. Read latency is one clock: rd_data holds the entry addressed in
// the last cycle that had rd_en high and keeps it while rd_en is low, which
// lets the index pipeline stall. The write port loads the map from the
// processor. Contents are not reset. One entry per destination pixel and the
// one-cycle read follow the design; the banking and load port are this
// design's choices.
module lens_lut
  import mr_pkg::*;
#(
  parameter int DEPTH = (H_ACTIVE / LANES) * V_ACTIVE
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output lut_entry_t               rd_data,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  lut_entry_t               wr_data
);
  lut_entry_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
