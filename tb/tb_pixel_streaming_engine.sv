// tb_pixel_streaming_engine: one eye's engine at full size, driven directly
// (no register bus). The lens map is loaded through the load port, each
// lane has its own DRAM model (20..60 clocks, random back-pressure), and the
// pose, mode and polygons are changed between frames. Every displayed pixel
// is compared with the reference model for the settings its frame was
// computed with; the frame period and the fill wait are checked.
module tb_pixel_streaming_engine;
  import mr_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  stream_cfg_t cfg;
  rot_elem_t rot [3][3];
  poly_t polys [N_POLY];
  logic lut_we;
  logic [9:0] lut_x;
  logic [8:0] lut_y;
  lut_entry_t lut_data;
  logic [LANES-1:0] req_valid, req_ready, rsp_valid;
  logic [31:0] req_addr [LANES], rsp_data [LANES];
  rgb_t rgb;
  logic de, hs, vs, frame_start;
  logic [15:0] underflow_cnt, resync_cnt, frame_cnt;

  pixel_streaming_engine dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // settings: s selects pose, mode and polygons
  rot_i_t set_rot [3];
  stream_cfg_t set_cfg [3];
  poly_t set_poly [3][N_POLY];
  int cur_set = -1;

  task automatic apply(int s);
    cur_set = -1;
    @(negedge clk);
    cfg = set_cfg[s];
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) rot[i][j] = rot_elem_t'(set_rot[s][i][j]);
    polys = set_poly[s];
    cur_set = s;
  endtask

  // DRAM model, one in-order queue per lane
  logic [31:0] mq_addr [LANES][$];
  int          mq_due  [LANES][$];
  always @(posedge clk) if (rst_n)
    for (int l = 0; l < LANES; l++)
      if (req_valid[l] && req_ready[l]) begin
        mq_addr[l].push_back(req_addr[l]);
        mq_due[l].push_back(cyc + $urandom_range(20, 60));
      end
  always @(negedge clk)
    for (int l = 0; l < LANES; l++) begin
      rsp_valid[l] = 0;
      if (mq_due[l].size() > 0 && mq_due[l][0] <= cyc) begin
        rsp_valid[l] = 1;
        rsp_data[l] = mem_word(mq_addr[l][0]);
        void'(mq_addr[l].pop_front()); void'(mq_due[l].pop_front());
      end
      req_ready[l] = $urandom_range(0, 7) != 0;
    end

  // monitor
  int pose_of [$], poly_of [$];
  int n_sofpop = 0, pix = 0, fr = -1, frames_done = 0, n_cmp = 0, n_bad = 0, bad_this = 0;
  int vs_fall [$];
  int en_cyc = -1, first_de = 0, n_full = 0;
  logic dly_vs = 1;
  bit fr_ok = 0;

  always @(posedge clk) if (rst_n) begin
    if (en_cyc < 0 && cfg.enable) en_cyc = cyc;
    if (dut.dstate == 2'd1 && dut.ic_busy == '0 && cfg.enable) pose_of.push_back(cur_set);
    if (dut.u_vg.in_valid && dut.u_vg.in_ready && dut.u_vg.in_word.sof) poly_of.push_back(cur_set);
    if (dut.vf_full) n_full++;
    if (dut.u_vc.fifo_pop && dut.u_vc.need && dut.u_vc.fifo_data.sof) begin
      fr = n_sofpop; n_sofpop++; fr_ok = 1;
    end
    if (!vs && dly_vs) begin
      vs_fall.push_back(cyc);
      if (pix == H_ACTIVE * V_ACTIVE && fr_ok) begin n_cmp++; if (bad_this > 0) n_bad++; end
      if (pix > 0) frames_done++;
      pix = 0; fr_ok = 0; bad_this = 0;
    end
    dly_vs = vs;
    if (de) begin
      if (first_de == 0) first_de = cyc;
      if (fr_ok && fr < pose_of.size() && fr < poly_of.size() && pose_of[fr] >= 0 && poly_of[fr] >= 0) begin
        int x, y, sx, sy, ps, pp;
        bit v;
        longint a;
        rgb_t e;
        x = pix % H_ACTIVE; y = pix / H_ACTIVE;
        ps = pose_of[fr]; pp = poly_of[fr];
        ref_lut(0, x, y, v, sx, sy);
        a = ref_addr(v, sx, sy, set_cfg[ps].ar_mode, set_cfg[ps].tr_en, set_cfg[ps].tx, set_cfg[ps].ty,
                     set_cfg[ps].tz, set_cfg[ps].base, set_rot[ps]);
        e = (a < 0) ? '0 : mem_word(32'(a))[23:0];
        for (int p = 0; p < N_POLY; p++) begin
          int vx [4], vy [4];
          for (int j = 0; j < 4; j++) begin vx[j] = set_poly[pp][p].v[j].x; vy[j] = set_poly[pp][p].v[j].y; end
          if (set_poly[pp][p].en && ref_inside(vx, vy, x, y)) e = set_poly[pp][p].color;
        end
        if (rgb != e) begin
          if (bad_this < 3) $display("frame %0d (%0d,%0d): got %h exp %h", fr, x, y, rgb, e);
          bad_this++;
        end
      end
      pix++;
    end
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 3; s++) begin
      set_cfg[s] = '0;
      set_cfg[s].enable = 1;
      set_cfg[s].ar_mode = (s == 2);
      set_cfg[s].tr_en = (s == 1);
      set_cfg[s].tx = -30; set_cfg[s].ty = 17; set_cfg[s].tz = -50;
      set_cfg[s].base = 32'h4000_0000 + 32'(s) * 32'h40;
      ref_rot((s == 1) ? 15000 : 16000, (s == 1) ? 6000 : 0, 3000, (s == 1) ? -2000 : 1000, set_rot[s]);
      for (int p = 0; p < N_POLY; p++) begin
        int cx, cy, r;
        cx = 50 + (p * 67 + s * 91) % 540; cy = 40 + (p * 53 + s * 29) % 400; r = 10 + p * 4;
        set_poly[s][p].en = (p % 2 == 0) || (s == 2);
        set_poly[s][p].color = rgb_t'(24'h10_20_30 * (p + 1) + s);
        set_poly[s][p].v[0] = '{x: 12'(cx - r), y: 12'(cy)};
        set_poly[s][p].v[1] = '{x: 12'(cx), y: 12'(cy - r)};
        set_poly[s][p].v[2] = '{x: 12'(cx + r), y: 12'(cy)};
        set_poly[s][p].v[3] = '{x: 12'(cx), y: 12'(cy + r)};
      end
    end
    cfg = '0; lut_we = 0; lut_x = 0; lut_y = 0; lut_data = '0;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) rot[i][j] = '0;
    for (int p = 0; p < N_POLY; p++) polys[p] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < V_ACTIVE; y++)
      for (int x = 0; x < H_ACTIVE; x++) begin
        bit v;
        int sx, sy;
        ref_lut(0, x, y, v, sx, sy);
        @(negedge clk);
        lut_we = 1; lut_x = 10'(x); lut_y = 9'(y);
        lut_data = '{valid: v, y: 9'(sy), x: 10'(sx)};
      end
    @(negedge clk);
    lut_we = 0;
    apply(0);
    wait (frames_done == 1);
    apply(1);
    wait (frames_done == 3);
    apply(2);
    wait (frames_done == 6);
    repeat (10) @(posedge clk);
    check(first_de - en_cyc == 16000 + 2, $sformatf("fill wait %0d", first_de - en_cyc));
    for (int i = 1; i < vs_fall.size(); i++)
      check(vs_fall[i] - vs_fall[i-1] == H_TOTAL * V_TOTAL, "frame period 420000 clocks");
    check(n_cmp >= 5 && n_bad == 0, $sformatf("frames compared %0d, wrong %0d", n_cmp, n_bad));
    check(n_full > 0, "video FIFO filled");
    check(underflow_cnt == 0, "no underflow at nominal DRAM latency");
    check(frame_cnt >= 5, "frame counter");
    $display("frames compared %0d, settings per frame:", n_cmp);
    foreach (pose_of[i]) $display("  frame %0d pose %0d polygons %0d", i, pose_of[i], i < poly_of.size() ? poly_of[i] : -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
