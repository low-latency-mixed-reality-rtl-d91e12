// tb_headset_top: end-to-end test of the stereo design at its full size.
//
// A processor model loads both lens maps and the settings over AXI4-Lite; a
// DRAM model behind the four read ports answers after 20..60 clocks with a
// hash of the address. Every pixel of both HDMI outputs is compared with a
// reference model (lens map, inverse rotation, cube face, DRAM word, polygon
// overlay) for the settings that the frame was computed with. The run goes
// through: VR frames, a new pose with translation and new polygons, a switch
// to AR mode, and back to VR with DRAM slowed down so that the video FIFO
// runs dry (underflow), after which the display must re-align. Counted and
// required: the full video FIFO stalling the engine, contention in the
// interconnect, DRAM back-pressure, lens-map pixels outside the view, AR
// frames, translation, polygon pixels, underflow and re-alignment. Also
// checked: the 16,000-clock fill wait and the 420,000-clock frame period.
module tb_headset_top;
  import mr_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  logic        s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic        s_arvalid, s_arready, s_rvalid, s_rready;
  logic [23:0] s_awaddr, s_araddr;
  logic [31:0] s_wdata, s_rdata;
  logic [1:0]  s_bresp, s_rresp;
  logic [3:0]  hp_ar_valid, hp_ar_ready, hp_r_valid;
  logic [31:0] hp_ar_addr [4], hp_r_data [4];
  logic [1:0]  hp_ar_id [4], hp_r_id [4];
  rgb_t        hdmi_rgb [2];
  logic [1:0]  hdmi_de, hdmi_hs, hdmi_vs;

  headset_top dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- settings ----------------
  typedef struct {
    bit ar, tr;
    int tx, ty, tz;
    longint base;
    int q [4];
    int pv [2][N_POLY][4][2];   // eye, polygon, vertex, x/y
    int pc [2][N_POLY];
    bit pe [2][N_POLY];
  } set_t;
  set_t sets [4];
  int cur_set = -1;

  function automatic void make_quat(real ax, ay, az, real deg, output int q [4]);
    real n, h;
    n = $sqrt(ax*ax + ay*ay + az*az);
    h = deg * 3.14159265358979 / 360.0;
    q[0] = $rtoi($cos(h) * 16384.0);
    q[1] = $rtoi(ax / n * $sin(h) * 16384.0);
    q[2] = $rtoi(ay / n * $sin(h) * 16384.0);
    q[3] = $rtoi(az / n * $sin(h) * 16384.0);
  endfunction

  task automatic make_sets();
    for (int s = 0; s < 4; s++) begin
      sets[s].ar = (s == 2);
      sets[s].tr = (s == 1);
      sets[s].tx = 40; sets[s].ty = -25; sets[s].tz = 60;
      sets[s].base = 64'h2000_0000 + s * 64'h100;
      case (s)
        0: make_quat(0.0, 1.0, 0.0, 20.0, sets[s].q);
        1: make_quat(0.2, 0.1, 1.0, 90.0, sets[s].q);   // roll
        2: make_quat(1.0, 0.0, 0.0, 10.0, sets[s].q);
        default: make_quat(0.3, 1.0, 0.2, 200.0, sets[s].q);
      endcase
      for (int e = 0; e < 2; e++)
        for (int p = 0; p < N_POLY; p++) begin
          int cx, cy, r;
          cx = 60 + ((p * 131 + s * 57 + e * 23) % 520); cy = 40 + ((p * 71 + s * 33) % 400); r = 15 + (p * 7 + s) % 40;
          sets[s].pv[e][p][0] = '{cx - r, cy - r / 2};
          sets[s].pv[e][p][1] = '{cx + r / 2, cy - r};
          sets[s].pv[e][p][2] = '{cx + r, cy + r};
          sets[s].pv[e][p][3] = (p % 3 == 0) ? '{cx + r, cy + r} : '{cx - r / 3, cy + r / 2};
          sets[s].pc[e][p] = 32'h00FF_0000 >> (p % 3 * 8) | (s * 40 + p);
          sets[s].pe[e][p] = (s == 2) ? 1'b1 : (p < 3);
        end
    end
  endtask

  // ---------------- AXI4-Lite master ----------------
  task automatic axi_write(logic [23:0] a, logic [31:0] d);
    s_awvalid = 1; s_awaddr = a; s_wvalid = 1; s_wdata = d; s_bready = 1;
    do @(posedge clk); while (!(s_awready && s_wready));
    #1 s_awvalid = 0; s_wvalid = 0;
    while (!s_bvalid) @(posedge clk);
    @(posedge clk);
    #1;
  endtask

  task automatic apply_set(int s, bit enable);
    cur_set = -1;
    axi_write(24'h004, 32'(sets[s].base));
    for (int i = 0; i < 4; i++) axi_write(24'(8 + 4 * i), 32'(sets[s].q[i]));
    axi_write(24'h018, 32'(sets[s].tx)); axi_write(24'h01C, 32'(sets[s].ty)); axi_write(24'h020, 32'(sets[s].tz));
    for (int e = 0; e < 2; e++)
      for (int p = 0; p < N_POLY; p++) begin
        for (int j = 0; j < 4; j++)
          axi_write(24'(32'h100 + e * 32'h200 + p * 32'h20 + j * 4),
                    {4'b0, 12'(sets[s].pv[e][p][j][1]), 4'b0, 12'(sets[s].pv[e][p][j][0])});
        axi_write(24'(32'h100 + e * 32'h200 + p * 32'h20 + 32'h10), {7'b0, sets[s].pe[e][p], 24'(sets[s].pc[e][p])});
      end
    axi_write(24'h000, {29'b0, 1'(sets[s].tr), 1'(sets[s].ar), enable});
    @(posedge clk); @(posedge clk); #1;   // rotation matrix register
    cur_set = s;
  endtask

  // ---------------- DRAM model ----------------
  bit slow_mem = 0;
  logic [31:0] mq_addr [4][$];
  logic [1:0]  mq_id   [4][$];
  int          mq_due  [4][$];
  int n_backpressure = 0, n_contention = 0;

  always @(posedge clk) if (rst_n) begin
    if (en_cyc < 0 && dut.cfg.enable) en_cyc = cyc;   // first clock with enable set
    for (int p = 0; p < 4; p++) begin
      if (hp_ar_valid[p] && hp_ar_ready[p]) begin
        mq_addr[p].push_back(hp_ar_addr[p]);
        mq_id[p].push_back(hp_ar_id[p]);
        mq_due[p].push_back(cyc + (slow_mem ? 400 : $urandom_range(20, 60)));
      end
      if (hp_ar_valid[p] && !hp_ar_ready[p]) n_backpressure++;
    end
  end

  always @(negedge clk) begin
    for (int p = 0; p < 4; p++) begin
      hp_r_valid[p] = 0;
      if (mq_due[p].size() > 0 && mq_due[p][0] <= cyc) begin
        hp_r_valid[p] = 1;
        hp_r_data[p] = mem_word(mq_addr[p][0]);
        hp_r_id[p] = mq_id[p][0];
        void'(mq_addr[p].pop_front()); void'(mq_id[p].pop_front()); void'(mq_due[p].pop_front());
      end
      hp_ar_ready[p] = slow_mem ? ($urandom_range(0, 99) == 0) : ($urandom_range(0, 9) != 0);
    end
  end

  // ---------------- display monitor, per eye ----------------
  int pose_of [2][$];      // settings used by the n-th frame computed
  int poly_of [2][$];      // settings used by the n-th frame drawn
  int n_sofpop [2];
  int n_full [2], n_under_seen = 0, n_resync_seen = 0;
  int n_cmp_frames [2], n_bad [2], n_skip_pix = 0, n_poly_pix = 0, n_ar_frames = 0, n_tr_frames = 0;
  int frames_done [2];
  int vs_fall [2][$];
  int first_de [2];
  int en_cyc = -1;
  logic [15:0] resync_v [2], under_v [2];

  for (genvar e = 0; e < 2; e++) begin : g_mon
    logic dly_vs = 1;
    int pix = 0, fr_engine = -1;
    bit fr_ok = 0;
    logic [15:0] under0;
    int bad_this;
    assign resync_v[e] = dut.g_eye[e].u_pse.resync_cnt;
    assign under_v[e]  = dut.g_eye[e].u_pse.underflow_cnt;

    always @(posedge clk) if (rst_n) begin
      // frame bookkeeping inside the engine
      if (dut.g_eye[e].u_pse.dstate == 2'd1 && dut.g_eye[e].u_pse.ic_busy == '0 && dut.cfg.enable)
        pose_of[e].push_back(cur_set);
      if (dut.g_eye[e].u_pse.u_vg.in_valid && dut.g_eye[e].u_pse.u_vg.in_ready &&
          dut.g_eye[e].u_pse.u_vg.in_word.sof)
        poly_of[e].push_back(cur_set);
      if (dut.g_eye[e].u_pse.vf_full) n_full[e]++;
      for (int k = 0; k < 2; k++)
        if ($countones(dut.g_eye[e].req_valid[k*4 +: 4]) > 1) n_contention++;
      if (dut.g_eye[e].u_pse.u_vc.fifo_pop && dut.g_eye[e].u_pse.u_vc.need &&
          dut.g_eye[e].u_pse.u_vc.fifo_data.sof) begin
        fr_engine = n_sofpop[e];
        n_sofpop[e]++;
        fr_ok = 1;
        under0 = dut.g_eye[e].u_pse.underflow_cnt;
      end
      // video output
      if (!hdmi_vs[e] && dly_vs) begin
        vs_fall[e].push_back(cyc);
        if (pix == H_ACTIVE * V_ACTIVE && fr_ok && fr_engine >= 0 &&
            dut.g_eye[e].u_pse.underflow_cnt == under0) begin
          n_cmp_frames[e]++;
          if (bad_this > 0) n_bad[e]++;
        end
        if (pix > 0) frames_done[e]++;
        pix = 0; fr_ok = 0; bad_this = 0;
      end
      dly_vs = hdmi_vs[e];
      if (hdmi_de[e]) begin
        if (first_de[e] == 0) first_de[e] = cyc;
        if (fr_ok && fr_engine >= 0 && fr_engine < pose_of[e].size() && fr_engine < poly_of[e].size() &&
            pose_of[e][fr_engine] >= 0 && poly_of[e][fr_engine] >= 0 &&
            dut.g_eye[e].u_pse.underflow_cnt == under0) begin
          int x, y, ps, pp, sx, sy;
          bit v;
          rgb_t exp_pix;
          rot_i_t rr;
          longint a;
          x = pix % H_ACTIVE; y = pix / H_ACTIVE;
          ps = pose_of[e][fr_engine]; pp = poly_of[e][fr_engine];
          ref_lut(e, x, y, v, sx, sy);
          ref_rot(sets[ps].q[0], sets[ps].q[1], sets[ps].q[2], sets[ps].q[3], rr);
          a = ref_addr(v, sx, sy, sets[ps].ar, sets[ps].tr, sets[ps].tx, sets[ps].ty, sets[ps].tz, sets[ps].base, rr);
          exp_pix = (a < 0) ? '0 : mem_word(32'(a))[23:0];
          if (!v && !sets[ps].ar) n_skip_pix++;
          if (x == 0 && y == 0 && sets[ps].ar) n_ar_frames++;
          if (x == 0 && y == 0 && sets[ps].tr) n_tr_frames++;
          for (int p = 0; p < N_POLY; p++) begin
            int vx [4], vy [4];
            for (int j = 0; j < 4; j++) begin vx[j] = sets[pp].pv[e][p][j][0]; vy[j] = sets[pp].pv[e][p][j][1]; end
            if (sets[pp].pe[e][p] && ref_inside(vx, vy, x, y)) exp_pix = rgb_t'(sets[pp].pc[e][p]);
          end
          if (hdmi_rgb[e] != exp_pix) begin
            if (bad_this < 3) $display("eye %0d frame %0d (%0d,%0d): got %h exp %h", e, fr_engine, x, y, hdmi_rgb[e], exp_pix);
            bad_this++;
          end
          if (exp_pix != ((a < 0) ? 24'h0 : mem_word(32'(a))[23:0])) n_poly_pix++;
        end
        pix++;
      end
    end
  end

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog: frames %0d %0d", frames_done[0], frames_done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_awvalid = 0; s_wvalid = 0; s_bready = 1; s_arvalid = 0; s_rready = 1;
    s_awaddr = 0; s_araddr = 0; s_wdata = 0;
    for (int p = 0; p < 4; p++) begin hp_r_valid[p] = 0; hp_r_data[p] = 0; hp_r_id[p] = 0; end
    make_sets();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // lens maps of both eyes
    for (int e = 0; e < 2; e++)
      for (int y = 0; y < V_ACTIVE; y++)
        for (int x = 0; x < H_ACTIVE; x++) begin
          bit v;
          int sx, sy;
          ref_lut(e, x, y, v, sx, sy);
          axi_write({1'b1, 1'(e), 1'b0, 9'(y), 10'(x), 2'b00}, {v, 6'b0, 9'(sy), 6'b0, 10'(sx)});
        end
    $display("lens maps loaded at clock %0d", cyc);
    apply_set(0, 1'b1);
    wait (frames_done[0] == 2);
    apply_set(1, 1'b1);                       // new pose, translation, new polygons
    wait (frames_done[0] == 4);
    apply_set(2, 1'b1);                       // AR mode
    wait (frames_done[0] == 6);
    apply_set(3, 1'b1);                       // VR again, DRAM slowed down
    slow_mem = 1;
    wait (dut.g_eye[0].u_pse.underflow_cnt != 0 && dut.g_eye[1].u_pse.underflow_cnt != 0);
    repeat (200000) @(posedge clk);
    slow_mem = 0;
    wait (frames_done[0] == 11 && frames_done[1] == 11);
    repeat (10) @(posedge clk);

    // enable is seen at clock en_cyc, the fill wait starts there, the first
    // active pixel is registered one clock after it ends and sampled a clock later
    check(first_de[0] - en_cyc == FILL_CYCLES_EXP + 2,
          $sformatf("fill wait %0d", first_de[0] - en_cyc));
    for (int e = 0; e < 2; e++) begin
      for (int i = 1; i < vs_fall[e].size(); i++)
        check(vs_fall[e][i] - vs_fall[e][i-1] == H_TOTAL * V_TOTAL, $sformatf("frame period %0d", vs_fall[e][i] - vs_fall[e][i-1]));
      check(n_bad[e] == 0, $sformatf("eye %0d: %0d frames with wrong pixels", e, n_bad[e]));
      check(n_cmp_frames[e] >= 7, $sformatf("eye %0d: %0d frames compared", e, n_cmp_frames[e]));
      check(n_full[e] > 0, "video FIFO full (engine stalled)");
      check(resync_v[e] > 0, "re-alignment after underflow");
      check(under_v[e] > 0, "underflow");
    end
    check(n_contention > 0, "interconnect contention");
    check(n_backpressure > 0, "DRAM back-pressure");
    check(n_skip_pix > 0, "pixels outside the lens map");
    check(n_ar_frames > 0, "AR frames");
    check(n_tr_frames > 0, "translation frames");
    check(n_poly_pix > 0, "polygon pixels");
    $display("frames compared %0d/%0d, fifo-full clocks %0d/%0d, underflows %0d/%0d, resync drops %0d/%0d",
             n_cmp_frames[0], n_cmp_frames[1], n_full[0], n_full[1],
             dut.g_eye[0].u_pse.underflow_cnt, dut.g_eye[1].u_pse.underflow_cnt,
             dut.g_eye[0].u_pse.resync_cnt, dut.g_eye[1].u_pse.resync_cnt);
    $display("contention %0d, dram back-pressure %0d, off-map pixels %0d, AR frames %0d, translation frames %0d, polygon pixels %0d",
             n_contention, n_backpressure, n_skip_pix, n_ar_frames, n_tr_frames, n_poly_pix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int FILL_CYCLES_EXP = 16000;
endmodule
