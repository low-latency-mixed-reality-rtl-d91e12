// headset_top: programmable-logic part of a stereo low-latency headset.
//
// The processor writes the newest head pose into memory-mapped registers;
// two pixel streaming engines (index 0 = left eye, 1 = right eye) each read a
// pre-rendered cubemap from DRAM through the inverse of that pose and the
// eye's lens distortion map, draw the AR polygons, and stream 640x480 video
// at 240 frames/s straight to the eye's HDMI transmitter, one pixel per clock,
// without writing the warped image back to memory. The whole design runs on
// the pixel clock (9.92 ns).
// Blocks: pose_regs (AXI4-Lite registers and lens map load path),
// quat_to_rot (pose quaternion to rotation matrix, shared by both eyes), two
// pixel_streaming_engine instances, and four mem_arbiter instances that put
// the 16 fetch units onto the four DRAM read ports (HP port 2e+k serves lanes
// 4k..4k+3 of eye e). Memory port: valid/ready request with a 32-bit byte
// address and a 2-bit ID (the lane within the group); response with valid,
// 32-bit data and ID, in order per ID, never back-pressured.
// Stereo engines, AXI4-Lite pose registers and four HP ports follow the
// design; the lane-to-port assignment is this design's choice.
module headset_top
  import mr_pkg::*;
#(
  parameter int N_HP        = 4,
  parameter int VFIFO_DEPTH = 16384,
  parameter int FILL_CYCLES = 16000
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave from the processor
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [23:0] s_awaddr,
  input  logic        s_wvalid,
  output logic        s_wready,
  input  logic [31:0] s_wdata,
  output logic        s_bvalid,
  input  logic        s_bready,
  output logic [1:0]  s_bresp,
  input  logic        s_arvalid,
  output logic        s_arready,
  input  logic [23:0] s_araddr,
  output logic        s_rvalid,
  input  logic        s_rready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  // DRAM read ports
  output logic [N_HP-1:0] hp_ar_valid,
  input  logic [N_HP-1:0] hp_ar_ready,
  output logic [31:0]     hp_ar_addr [N_HP],
  output logic [1:0]      hp_ar_id   [N_HP],
  input  logic [N_HP-1:0] hp_r_valid,
  input  logic [31:0]     hp_r_data  [N_HP],
  input  logic [1:0]      hp_r_id    [N_HP],
  // video to the two HDMI transmitters
  output rgb_t        hdmi_rgb [2],
  output logic [1:0]  hdmi_de,
  output logic [1:0]  hdmi_hs,
  output logic [1:0]  hdmi_vs
);
  localparam int GRP = LANES / (N_HP / 2);   // lanes per HP port

  stream_cfg_t cfg;
  q14_t        qw, qx, qy, qz;
  rot_elem_t   rot [3][3];
  poly_t       polys [2][N_POLY];
  logic        lut_we, lut_eye;
  logic [9:0]  lut_x;
  logic [8:0]  lut_y;
  lut_entry_t  lut_data;
  logic [15:0] underflow [2], frames [2];

  pose_regs u_regs (
    .clk, .rst_n,
    .s_awvalid, .s_awready, .s_awaddr, .s_wvalid, .s_wready, .s_wdata,
    .s_bvalid, .s_bready, .s_bresp,
    .s_arvalid, .s_arready, .s_araddr, .s_rvalid, .s_rready, .s_rdata, .s_rresp,
    .cfg, .qw, .qx, .qy, .qz, .polys_l(polys[0]), .polys_r(polys[1]),
    .lut_we, .lut_eye, .lut_x, .lut_y, .lut_data,
    .underflow_l(underflow[0]), .underflow_r(underflow[1]),
    .frames_l(frames[0]), .frames_r(frames[1]));

  quat_to_rot u_q2r (.clk, .rst_n, .qw, .qx, .qy, .qz, .r(rot));

  for (genvar e = 0; e < 2; e++) begin : g_eye
    logic [LANES-1:0] req_valid, req_ready, rsp_valid;
    logic [31:0]      req_addr [LANES];
    logic [31:0]      rsp_data [LANES];

    pixel_streaming_engine #(.VFIFO_DEPTH(VFIFO_DEPTH), .FILL_CYCLES(FILL_CYCLES)) u_pse (
      .clk, .rst_n, .cfg, .rot, .polys(polys[e]),
      .lut_we(lut_we && lut_eye == 1'(e)), .lut_x, .lut_y, .lut_data,
      .req_valid, .req_ready, .req_addr, .rsp_valid, .rsp_data,
      .rgb(hdmi_rgb[e]), .de(hdmi_de[e]), .hs(hdmi_hs[e]), .vs(hdmi_vs[e]),
      .frame_start(), .underflow_cnt(underflow[e]), .resync_cnt(), .frame_cnt(frames[e]));

    for (genvar k = 0; k < N_HP / 2; k++) begin : g_port
      localparam int P = e * (N_HP / 2) + k;
      logic [31:0] a_addr [GRP];
      logic [31:0] a_data [GRP];
      for (genvar l = 0; l < GRP; l++) begin : g_l
        assign a_addr[l] = req_addr[k * GRP + l];
        assign rsp_data[k * GRP + l] = a_data[l];
      end

      mem_arbiter #(.N(GRP), .IW(2)) u_arb (
        .clk, .rst_n,
        .req_valid(req_valid[k*GRP +: GRP]), .req_ready(req_ready[k*GRP +: GRP]),
        .req_addr(a_addr),
        .rsp_valid(rsp_valid[k*GRP +: GRP]), .rsp_data(a_data),
        .m_ar_valid(hp_ar_valid[P]), .m_ar_ready(hp_ar_ready[P]),
        .m_ar_addr(hp_ar_addr[P]), .m_ar_id(hp_ar_id[P]),
        .m_r_valid(hp_r_valid[P]), .m_r_data(hp_r_data[P]), .m_r_id(hp_r_id[P]));
    end
  end
endmodule
