// pose_regs: memory-mapped registers written by the processor over AXI4-Lite.
//
// The processor writes the latest head pose here (quaternion and optional
// translation), the DRAM address of the cubemap, the image-space polygons of
// the AR objects for each eye, and the lens distortion maps. The engines
// sample these registers once per frame. Register map (byte addresses, all
// accesses full 32-bit words; byte strobes are ignored):
//   0x000 CTRL    [0] enable  [1] AR mode (no DRAM reads)  [2] translation enable
//   0x004 BASE    byte address of cubemap face 0
//   0x008 QW  0x00C QX  0x010 QY  0x014 QZ   signed Q1.14 in bits 15:0
//   0x018 TX  0x01C TY  0x020 TZ             signed pixels in bits 11:0
//   0x024 UNDERFLOW (read only) {right[15:0], left[15:0]} underflow counts
//   0x028 FRAMES    (read only) {right[15:0], left[15:0]} frame counts
//   0x100 + eye*0x200 + p*0x20 + j*4, j=0..3   vertex j of polygon p:
//         x in bits 11:0, y in bits 27:16 (signed)
//   0x100 + eye*0x200 + p*0x20 + 0x10          [24] enable, [23:0] RGB colour
//   addr[23]=1: lens map entry, eye = addr[22], y = addr[20:12], x = addr[11:2],
//         data {valid[31], source y[24:16], source x[9:0]} (write only)
// Writes: AW and W are taken together in one clock, the response follows one
// clock later (always OKAY). Reads: the data follows one clock after AR is
// taken; lens map entries read as 0. A lens map write leaves as a one-clock
// strobe on lut_we with the eye, position and entry. The pose and polygon
// registers and the AXI4-Lite path follow the design; the map itself is this
// design's choice. Reset: identity quaternion, everything else zero.
module pose_regs
  import mr_pkg::*;
#(
  parameter int NP = N_POLY
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
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
  // register contents
  output stream_cfg_t cfg,
  output q14_t        qw, qx, qy, qz,
  output poly_t       polys_l [NP],
  output poly_t       polys_r [NP],
  // lens map load
  output logic        lut_we,
  output logic        lut_eye,
  output logic [9:0]  lut_x,
  output logic [8:0]  lut_y,
  output lut_entry_t  lut_data,
  // status
  input  logic [15:0] underflow_l, underflow_r,
  input  logic [15:0] frames_l, frames_r
);
  logic wr;
  assign wr        = s_awvalid && s_wvalid && !s_bvalid;
  assign s_awready = wr;
  assign s_wready  = wr;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;
  assign s_arready = !s_rvalid;

  function automatic logic [31:0] poly_word(poly_t p, int k);
    if (k < 4) return {4'b0, p.v[k].y, 4'b0, p.v[k].x};
    return {7'b0, p.en, p.color};
  endfunction

  // decode of a polygon register address: valid, eye, polygon, word
  function automatic logic [8:0] poly_dec(logic [23:0] a);
    int off, p, k;
    if (a[23] || a[23:2] < 22'h40 || a[23:2] >= 22'(9'h40 + 2 * 9'h80)) return '0;
    off = int'(a[11:0]) - 'h100;
    p = (off % 'h200) / 'h20;
    k = (off % 'h20) / 4;
    if (p >= NP || k > 4) return '0;
    return {1'b1, 1'(off / 'h200), 4'(p), 3'(k)};
  endfunction

  // decoded write and read addresses, and the polygon after the write
  logic [8:0] pdw, pdr;
  poly_t      np;
  always_comb begin
    pdw = poly_dec(s_awaddr);
    pdr = poly_dec(s_araddr);
    np  = pdw[7] ? polys_r[pdw[6:3]] : polys_l[pdw[6:3]];
    if (pdw[2:0] == 3'd4) begin
      np.en    = s_wdata[24];
      np.color = s_wdata[23:0];
    end else begin
      np.v[pdw[1:0]].x = s_wdata[11:0];
      np.v[pdw[1:0]].y = s_wdata[27:16];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= '0;
      qw <= 16'sd16384; qx <= '0; qy <= '0; qz <= '0;
      for (int p = 0; p < NP; p++) begin
        polys_l[p] <= '0;
        polys_r[p] <= '0;
      end
      s_bvalid <= 1'b0;
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
      lut_we   <= 1'b0;
      lut_eye  <= 1'b0; lut_x <= '0; lut_y <= '0; lut_data <= '0;
    end else begin
      lut_we <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (wr) begin
        s_bvalid <= 1'b1;
        if (s_awaddr[23]) begin
          lut_we   <= 1'b1;
          lut_eye  <= s_awaddr[22];
          lut_y    <= s_awaddr[20:12];
          lut_x    <= s_awaddr[11:2];
          lut_data <= '{valid: s_wdata[31], y: s_wdata[24:16], x: s_wdata[9:0]};
        end else if (pdw[8]) begin
          if (pdw[7]) polys_r[pdw[6:3]] <= np;
          else        polys_l[pdw[6:3]] <= np;
        end else begin
          case (s_awaddr[11:0])
            12'h000: begin
              cfg.enable  <= s_wdata[0];
              cfg.ar_mode <= s_wdata[1];
              cfg.tr_en   <= s_wdata[2];
            end
            12'h004: cfg.base <= s_wdata;
            12'h008: qw <= s_wdata[15:0];
            12'h00C: qx <= s_wdata[15:0];
            12'h010: qy <= s_wdata[15:0];
            12'h014: qz <= s_wdata[15:0];
            12'h018: cfg.tx <= s_wdata[11:0];
            12'h01C: cfg.ty <= s_wdata[11:0];
            12'h020: cfg.tz <= s_wdata[11:0];
            default: ;
          endcase
        end
      end

      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (s_arvalid && s_arready) begin
        s_rvalid <= 1'b1;
        if (s_araddr[23]) s_rdata <= '0;
        else if (pdr[8])
          s_rdata <= poly_word(pdr[7] ? polys_r[pdr[6:3]] : polys_l[pdr[6:3]], int'(pdr[2:0]));
        else begin
          case (s_araddr[11:0])
            12'h000: s_rdata <= {29'b0, cfg.tr_en, cfg.ar_mode, cfg.enable};
            12'h004: s_rdata <= cfg.base;
            12'h008: s_rdata <= 32'(qw);
            12'h00C: s_rdata <= 32'(qx);
            12'h010: s_rdata <= 32'(qy);
            12'h014: s_rdata <= 32'(qz);
            12'h018: s_rdata <= 32'(cfg.tx);
            12'h01C: s_rdata <= 32'(cfg.ty);
            12'h020: s_rdata <= 32'(cfg.tz);
            12'h024: s_rdata <= {underflow_r, underflow_l};
            12'h028: s_rdata <= {frames_r, frames_l};
            default: s_rdata <= '0;
          endcase
        end
      end
    end
  end

  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_bvalid && !s_bready |=> s_bvalid) else $error("pose_regs: bvalid dropped");
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata)) else $error("pose_regs: rvalid dropped");
endmodule
