// pixel_streaming_engine: produces the warped, lens-corrected video of one eye.
//
// A raster dispatcher walks the 640x480 destination image eight pixels at a
// time and hands pixel x0+i to lane i. Each lane has its bank of the lens
// distortion map, an index calculation unit (map lookup, inverse rotation,
// cube face, DRAM address), an index FIFO and a pixel fetch unit that keeps
// several DRAM reads in flight. The pixel packer joins the eight lanes into a
// word, the vector graphics unit draws the AR polygons over it, and the word
// enters the video FIFO, from which the video controller sends one pixel per
// clock. FIFOs between the units let each run at its own rate; the video FIFO
// absorbs DRAM latency and is refilled during blanking.
// Frames: the dispatcher samples the configuration and rotation at the start
// of each frame, after the index pipelines have drained (a few clocks), so one
// frame is computed with one pose. It then runs ahead of the display until
// the video FIFO is full. Memory side: one request port per lane (valid/ready,
// byte address) and one response port per lane (valid, 32-bit data, in order).
// The unit structure, eight lanes, FIFO depth (16,384 words of 8x24 bits) and
// fill time follow the design; the dispatcher, FIFO depths between units and
// the per-frame sampling rule are this design's choices.
module pixel_streaming_engine
  import mr_pkg::*;
#(
  parameter int VFIFO_DEPTH = 16384,
  parameter int FILL_CYCLES = 16000,
  parameter int IDX_DEPTH   = 16,
  parameter int OUTST       = 16,
  parameter int NP          = N_POLY
) (
  input  logic        clk,
  input  logic        rst_n,
  input  stream_cfg_t cfg,
  input  rot_elem_t   rot [3][3],
  input  poly_t       polys [NP],
  // lens map load for this eye
  input  logic        lut_we,
  input  logic [9:0]  lut_x,
  input  logic [8:0]  lut_y,
  input  lut_entry_t  lut_data,
  // DRAM read, one port per lane
  output logic [LANES-1:0] req_valid,
  input  logic [LANES-1:0] req_ready,
  output logic [31:0]      req_addr [LANES],
  input  logic [LANES-1:0] rsp_valid,
  input  logic [31:0]      rsp_data [LANES],
  // video
  output rgb_t        rgb,
  output logic        de,
  output logic        hs,
  output logic        vs,
  output logic        frame_start,
  output logic [15:0] underflow_cnt,
  output logic [15:0] resync_cnt,
  output logic [15:0] frame_cnt
);
  localparam int LUT_DEPTH = WORDS_PER_LINE * V_ACTIVE;
  localparam int LUT_AW    = $clog2(LUT_DEPTH);

  // ---------------- raster dispatcher ----------------
  typedef enum logic [1:0] {D_IDLE, D_DRAIN, D_RUN} dstate_t;
  dstate_t dstate;
  stream_cfg_t fcfg;
  rot_elem_t   frot [3][3];
  logic [9:0]  dx0;
  logic [8:0]  dy;
  logic [LANES-1:0] ic_in_ready, ic_busy;
  logic issue;

  assign issue = (dstate == D_RUN) && (&ic_in_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dstate <= D_IDLE;
      fcfg <= '0;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) frot[i][j] <= '0;
      dx0 <= '0; dy <= '0;
    end else begin
      case (dstate)
        D_IDLE: if (cfg.enable) dstate <= D_DRAIN;
        D_DRAIN: begin
          if (!cfg.enable) dstate <= D_IDLE;
          else if (ic_busy == '0) begin
            fcfg <= cfg;
            frot <= rot;
            dx0 <= '0; dy <= '0;
            dstate <= D_RUN;
          end
        end
        default: begin
          if (issue) begin
            if (dx0 == 10'(H_ACTIVE - LANES)) begin
              dx0 <= '0;
              if (dy == 9'(V_ACTIVE - 1)) dstate <= D_DRAIN;
              else dy <= dy + 1'b1;
            end else dx0 <= dx0 + 10'(LANES);
          end
        end
      endcase
    end
  end

  // ---------------- lanes ----------------
  logic [LANES-1:0] fx_valid, fx_ready;
  rgb_t             fx_pix [LANES];

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    logic              lut_rd_en;
    logic [LUT_AW-1:0] lut_rd_addr;
    lut_entry_t        lut_rd_data;
    logic              ic_out_valid, ic_out_ready;
    idx_t              ic_out;
    logic              q_empty, q_full;
    idx_t              q_head;
    logic              pf_idx_ready;

    lens_lut #(.DEPTH(LUT_DEPTH)) u_lut (
      .clk,
      .rd_en(lut_rd_en), .rd_addr(lut_rd_addr), .rd_data(lut_rd_data),
      .wr_en(lut_we && lut_x[2:0] == 3'(i)),
      .wr_addr(LUT_AW'(lut_y * WORDS_PER_LINE + 32'(lut_x[9:3]))),
      .wr_data(lut_data));

    index_calc #(.LUT_AW(LUT_AW)) u_ic (
      .clk, .rst_n, .cfg(fcfg), .rot(frot),
      .in_valid(issue), .in_ready(ic_in_ready[i]),
      .in_x(dx0 + 10'(i)), .in_y(dy),
      .lut_rd_en, .lut_rd_addr, .lut_rd_data,
      .out_valid(ic_out_valid), .out_ready(ic_out_ready), .out_idx(ic_out),
      .busy(ic_busy[i]));

    assign ic_out_ready = !q_full;

    sync_fifo #(.WIDTH($bits(idx_t)), .DEPTH(IDX_DEPTH)) u_idxq (
      .clk, .rst_n,
      .push(ic_out_valid && !q_full), .wr_data(ic_out),
      .pop(!q_empty && pf_idx_ready), .rd_data(q_head),
      .empty(q_empty), .full(q_full), .count());

    pixel_fetch #(.OUTST(OUTST)) u_pf (
      .clk, .rst_n,
      .idx_valid(!q_empty), .idx_ready(pf_idx_ready), .idx(q_head),
      .req_valid(req_valid[i]), .req_ready(req_ready[i]), .req_addr(req_addr[i]),
      .rsp_valid(rsp_valid[i]), .rsp_data(rsp_data[i]),
      .pix_valid(fx_valid[i]), .pix_ready(fx_ready[i]), .pix(fx_pix[i]));
  end

  // ---------------- packing, vector graphics, video FIFO ----------------
  logic     pk_valid, pk_ready;
  pixword_t pk_word;
  logic     vg_valid, vg_ready;
  pixword_t vg_word;
  logic     vf_empty, vf_full, vf_pop;
  vword_t   vf_head;

  pixel_packer u_pack (
    .clk, .rst_n,
    .in_valid(fx_valid), .in_ready(fx_ready), .in_pix(fx_pix),
    .out_valid(pk_valid), .out_ready(pk_ready), .out_word(pk_word));

  vector_graphics #(.NP(NP)) u_vg (
    .clk, .rst_n, .polys,
    .in_valid(pk_valid), .in_ready(pk_ready), .in_word(pk_word),
    .out_valid(vg_valid), .out_ready(vg_ready), .out_word(vg_word));

  assign vg_ready = !vf_full;

  sync_fifo #(.WIDTH($bits(vword_t)), .DEPTH(VFIFO_DEPTH)) u_vfifo (
    .clk, .rst_n,
    .push(vg_valid && !vf_full), .wr_data({vg_word.sof, vg_word.pix}),
    .pop(vf_pop), .rd_data(vf_head),
    .empty(vf_empty), .full(vf_full), .count());

  video_controller #(.FILL_CYCLES(FILL_CYCLES)) u_vc (
    .clk, .rst_n, .enable(cfg.enable),
    .fifo_empty(vf_empty), .fifo_data(vf_head), .fifo_pop(vf_pop),
    .rgb, .de, .hs, .vs, .frame_start, .running(),
    .underflow_cnt, .resync_cnt, .frame_cnt);
endmodule
