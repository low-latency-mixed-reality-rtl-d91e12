// index_calc: pixel index calculation unit of one lane.
//
// For a destination pixel (x, y) of the displayed image it finds the DRAM byte
// address of the cubemap pixel to show there:
//   1. lens map lookup: (sx, sy) = LUT(x, y)          (lens correction)
//   2. view ray:        p = (sx - 320, sy - 240, FOCAL), minus the translation
//                       (tx, ty, tz) when translation is enabled
//   3. inverse warp:    r = R^T * p (the inverse of a rotation is its transpose)
//   4. cube face:       the component of r with the largest magnitude selects
//                       one of six faces; the other two components sc, tc give
//                       u = 500 + 500*sc/|m|, v = 500 + 500*tc/|m| (clamped to 999)
//   5. address:         base + 4*(face*1000*1000 + v*1000 + u)
// The lens map and the inverse homography follow the design; FOCAL = 320
// matches a 90 degree horizontal field of view over 640 pixels. The cube face
// convention is the common one of graphics APIs: +X: (-z,-y), -X: (z,-y),
// +Y: (x,z), -Y: (x,-z), +Z: (x,-y), -Z: (-x,-y) for (sc, tc), with faces
// numbered +X,-X,+Y,-Y,+Z,-Z = 0..5; x points right, y down, z forward.
// Fixed point (this design's choice): r keeps 4 fraction bits; the two
// quotients come from a 10-stage radix-2 restoring divider that truncates.
// A pixel whose map entry is invalid, or any pixel in AR mode, leaves with
// skip=1 and is shown black without a memory read.
//
// Interface: valid/ready on both sides. The pipeline is 15 stages deep (one
// result per clock, latency 15 clocks) and stalls as a whole when its last
// stage holds a result that out_ready does not take. The lens map bank is
// outside; it is read with rd_en = in_ready so that a stall holds its output.
// busy is high while any stage holds a pixel. cfg and rot must be stable
// while busy.
module index_calc
  import mr_pkg::*;
#(
  parameter int FOCAL = 320,
  parameter int FACE  = 1000,
  parameter int LUT_AW = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  stream_cfg_t       cfg,
  input  rot_elem_t         rot [3][3],
  // destination pixel
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [9:0]        in_x,
  input  logic [8:0]        in_y,
  // lens map bank
  output logic              lut_rd_en,
  output logic [LUT_AW-1:0] lut_rd_addr,
  input  lut_entry_t        lut_rd_data,
  // source pixel request
  output logic              out_valid,
  input  logic              out_ready,
  output idx_t              out_idx,
  output logic              busy
);
  localparam int HALF = FACE / 2;
  localparam int QB   = 10;            // quotient bits: HALF < 2**QB
  localparam int RW   = 23;            // signed width of r (Q.4)
  localparam int NW   = RW + 10;       // numerator width

  logic advance;

  // stage 1: lens map entry (held in the bank's output register)
  logic v1;
  // stage 2: view ray
  logic v2, skip2;
  logic signed [13:0] p2 [3];
  // stage 3: rotated ray
  logic v3, skip3;
  logic signed [RW-1:0] r3 [3];
  // stage 4 and divider stages 0..QB-1, index 0 = stage 4
  logic            vd    [QB+1];
  logic            skipd [QB+1];
  logic [2:0]      faced [QB+1];
  logic            ssgn  [QB+1], tsgn [QB+1];
  logic [NW-1:0]   rems  [QB+1], remt [QB+1];
  logic [RW-1:0]   divd  [QB+1];
  logic [QB-1:0]   qs    [QB+1], qt   [QB+1];

  assign advance   = !(out_valid && !out_ready);
  assign in_ready  = advance;
  assign lut_rd_en = advance;
  assign lut_rd_addr = LUT_AW'(in_y * (H_ACTIVE / LANES) + 32'(in_x[9:3]));

  always_comb begin
    busy = v1 || v2 || v3 || out_valid;
    for (int k = 0; k <= QB; k++) busy = busy || vd[k];
  end

  // combinational parts of each stage
  logic signed [13:0] p_n [3];
  logic signed [RW-1:0] r_n [3];
  always_comb begin
    p_n[0] = 14'(signed'({1'b0, lut_rd_data.x})) - 14'sd320;
    p_n[1] = 14'(signed'({1'b0, lut_rd_data.y})) - 14'sd240;
    p_n[2] = 14'(FOCAL);
    if (cfg.tr_en) begin
      p_n[0] = p_n[0] - 14'(cfg.tx);
      p_n[1] = p_n[1] - 14'(cfg.ty);
      p_n[2] = p_n[2] - 14'(cfg.tz);
    end
    for (int i = 0; i < 3; i++) begin
      logic signed [33:0] acc;
      acc = '0;
      for (int j = 0; j < 3; j++) acc = acc + 34'(rot[j][i] * p2[j]);
      r_n[i] = RW'(acc >>> 10);
    end
  end

  // face selection
  logic [RW-1:0] ax, ay, az, ma;
  logic signed [RW-1:0] sc, tc;
  logic [2:0] face_n;
  always_comb begin
    ax = r3[0][RW-1] ? RW'(-r3[0]) : RW'(r3[0]);
    ay = r3[1][RW-1] ? RW'(-r3[1]) : RW'(r3[1]);
    az = r3[2][RW-1] ? RW'(-r3[2]) : RW'(r3[2]);
    if (ax >= ay && ax >= az) begin
      ma = ax;
      if (!r3[0][RW-1]) begin face_n = 3'd0; sc = -r3[2]; tc = -r3[1]; end
      else              begin face_n = 3'd1; sc =  r3[2]; tc = -r3[1]; end
    end else if (ay >= az) begin
      ma = ay;
      if (!r3[1][RW-1]) begin face_n = 3'd2; sc = r3[0]; tc =  r3[2]; end
      else              begin face_n = 3'd3; sc = r3[0]; tc = -r3[2]; end
    end else begin
      ma = az;
      if (!r3[2][RW-1]) begin face_n = 3'd4; sc =  r3[0]; tc = -r3[1]; end
      else              begin face_n = 3'd5; sc = -r3[0]; tc = -r3[1]; end
    end
  end

  // final stage: face coordinates and address
  logic [10:0] u_n, v_n;
  logic [31:0] addr_n;
  always_comb begin
    u_n = ssgn[QB] ? 11'(HALF) - 11'(qs[QB]) : 11'(HALF) + 11'(qs[QB]);
    v_n = tsgn[QB] ? 11'(HALF) - 11'(qt[QB]) : 11'(HALF) + 11'(qt[QB]);
    if (u_n > 11'(FACE - 1)) u_n = 11'(FACE - 1);
    if (v_n > 11'(FACE - 1)) v_n = 11'(FACE - 1);
    addr_n = cfg.base + ((32'(faced[QB]) * 32'(FACE * FACE) + 32'(v_n) * 32'(FACE) + 32'(u_n)) << 2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; out_valid <= 1'b0;
      for (int k = 0; k <= QB; k++) vd[k] <= 1'b0;
    end else if (advance) begin
      v1 <= in_valid;
      v2 <= v1;
      v3 <= v2;
      vd[0] <= v3;
      for (int k = 1; k <= QB; k++) vd[k] <= vd[k-1];
      out_valid <= vd[QB];
    end
  end

  always_ff @(posedge clk) begin
    if (advance) begin
      // stage 2
      p2    <= p_n;
      skip2 <= !lut_rd_data.valid || cfg.ar_mode;
      // stage 3
      r3    <= r_n;
      skip3 <= skip2;
      // stage 4 (divider input)
      faced[0] <= face_n;
      skipd[0] <= skip3;
      ssgn[0]  <= sc[RW-1];
      tsgn[0]  <= tc[RW-1];
      rems[0]  <= NW'(sc[RW-1] ? RW'(-sc) : RW'(sc)) * NW'(HALF);
      remt[0]  <= NW'(tc[RW-1] ? RW'(-tc) : RW'(tc)) * NW'(HALF);
      divd[0]  <= (ma == '0) ? RW'(1) : ma;
      qs[0]    <= '0;
      qt[0]    <= '0;
      // divider: stage k decides quotient bit QB-k
      for (int k = 1; k <= QB; k++) begin
        logic [NW-1:0] dsh;
        dsh = NW'(divd[k-1]) << (QB - k);
        faced[k] <= faced[k-1];
        skipd[k] <= skipd[k-1];
        ssgn[k]  <= ssgn[k-1];
        tsgn[k]  <= tsgn[k-1];
        divd[k]  <= divd[k-1];
        rems[k]  <= (rems[k-1] >= dsh) ? rems[k-1] - dsh : rems[k-1];
        remt[k]  <= (remt[k-1] >= dsh) ? remt[k-1] - dsh : remt[k-1];
        qs[k]    <= qs[k-1] | ((rems[k-1] >= dsh) ? QB'(1) << (QB - k) : '0);
        qt[k]    <= qt[k-1] | ((remt[k-1] >= dsh) ? QB'(1) << (QB - k) : '0);
      end
      // output
      out_idx.skip <= skipd[QB];
      out_idx.addr <= skipd[QB] ? '0 : addr_n;
    end
  end
endmodule
