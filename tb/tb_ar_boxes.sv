// tb_ar_boxes: the static AR overlay workload on the full-size stereo design.
// Three boxes are placed in front of the viewer. For each of two head poses
// the testbench does what the host processor does in the application: it
// moves the box corners into each eye's view (eye offset of 32 mm to either
// side), projects them with a pinhole model (focal length 320 pixels, centre
// (320, 240)), keeps the faces that point at the eye (at most three per box,
// nine quadrilaterals in all) and writes them to the polygon registers, far
// box first so that nearer boxes win where they overlap. The design runs in
// AR mode: no DRAM reads, black background, polygons drawn by the vector
// graphics unit. Every pixel of every complete frame of both eyes is compared
// with an edge-test reference. It also checks that each box is drawn in both
// eyes, that a box appears further right in the left eye than in the right
// (stereo disparity), and that turning the head to the right moves every box
// to the left on the display. Frame rate: one frame per 420,000 clocks.
module tb_ar_boxes;
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

  assign hp_ar_ready = '1;
  assign hp_r_valid  = '0;
  for (genvar p = 0; p < 4; p++) begin : g_hp
    assign hp_r_data[p] = '0;
    assign hp_r_id[p]   = '0;
  end

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- scene and projection ----------------
  localparam int NSET = 2;
  int  pv  [NSET][2][N_POLY][4][2];   // set, eye, polygon, vertex, x/y
  int  pc  [NSET][2][N_POLY];
  bit  pe  [NSET][2][N_POLY];
  int  pbox [NSET][2][N_POLY];        // box drawn by each polygon slot

  // corner k of box b: bit 0 -> x, bit 1 -> y, bit 2 -> z
  real box_c [3][3] = '{'{-0.60, 0.50, 3.0}, '{0.50, -0.50, 2.5}, '{0.90, 0.60, 4.5}};
  real box_h [3]    = '{0.25, 0.20, 0.30};
  // faces as corner lists in cyclic order, and the axis/sign of the outward normal
  int  face_k [6][4] = '{'{0, 2, 6, 4}, '{1, 3, 7, 5}, '{0, 1, 5, 4}, '{2, 3, 7, 6}, '{0, 1, 3, 2}, '{4, 5, 7, 6}};
  int  face_ax [6]   = '{0, 0, 1, 1, 2, 2};
  int  face_sg [6]   = '{-1, 1, -1, 1, -1, 1};

  // view of a world point from eye e at pose s: yaw about y, then translation
  function automatic void to_eye(int s, int e, real pw [3], output real pc3 [3]);
    real th, c, sn, d [3];
    th = (s == 0) ? 0.0 : 3.0 * 3.14159265358979 / 180.0;
    c = $cos(th); sn = $sin(th);
    d[0] = pw[0] - ((s == 0) ? 0.0 : 0.05);
    d[1] = pw[1];
    d[2] = pw[2] - ((s == 0) ? 0.0 : 0.20);
    // R is the head rotation; the eye sees R^T * d, shifted by the eye offset
    pc3[0] = c * d[0] - sn * d[2] - ((e == 0) ? -0.032 : 0.032);
    pc3[1] = d[1];
    pc3[2] = sn * d[0] + c * d[2];
  endfunction

  task automatic make_set(int s);
    int order [3];
    real zc [3];
    for (int e = 0; e < 2; e++) begin
      int slot;
      slot = 0;
      for (int p = 0; p < N_POLY; p++) begin
        pe[s][e][p] = 0; pc[s][e][p] = 0; pbox[s][e][p] = -1;
        for (int j = 0; j < 4; j++) begin pv[s][e][p][j][0] = 0; pv[s][e][p][j][1] = 0; end
      end
      // far to near
      for (int b = 0; b < 3; b++) begin
        real q [3];
        to_eye(s, e, box_c[b], q);
        zc[b] = q[2]; order[b] = b;
      end
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 2 - i; j++)
          if (zc[order[j]] < zc[order[j + 1]]) begin
            int t;
            t = order[j]; order[j] = order[j + 1]; order[j + 1] = t;
          end
      for (int i = 0; i < 3; i++) begin
        int b;
        real ce [3];
        b = order[i];
        to_eye(s, e, box_c[b], ce);
        for (int f = 0; f < 6; f++) begin
          real fc [3], fe [3], nrm [3];
          // face centre and normal in eye space (normal: difference of two points)
          for (int a = 0; a < 3; a++) fc[a] = box_c[b][a];
          fc[face_ax[f]] += face_sg[f] * box_h[b];
          to_eye(s, e, fc, fe);
          for (int a = 0; a < 3; a++) nrm[a] = fe[a] - ce[a];
          if (nrm[0] * fe[0] + nrm[1] * fe[1] + nrm[2] * fe[2] < 0.0) begin
            for (int j = 0; j < 4; j++) begin
              int k;
              real cw [3], cv [3];
              k = face_k[f][j];
              cw[0] = box_c[b][0] + ((k & 1) != 0 ? box_h[b] : -box_h[b]);
              cw[1] = box_c[b][1] + ((k & 2) != 0 ? box_h[b] : -box_h[b]);
              cw[2] = box_c[b][2] + ((k & 4) != 0 ? box_h[b] : -box_h[b]);
              to_eye(s, e, cw, cv);
              pv[s][e][slot][j][0] = $rtoi(320.0 + 320.0 * cv[0] / cv[2] + 1000.5) - 1000;
              pv[s][e][slot][j][1] = $rtoi(240.0 + 320.0 * cv[1] / cv[2] + 1000.5) - 1000;
            end
            pe[s][e][slot] = 1;
            pc[s][e][slot] = (b == 0) ? 32'hE0_30_30 - f * 32'h10_00_00 :
                             (b == 1) ? 32'h30_E0_30 - f * 32'h00_10_00 :
                                        32'h30_30_E0 - f * 32'h00_00_10;
            pbox[s][e][slot] = b;
            slot++;
          end
        end
      end
      check(slot == 9, $sformatf("set %0d eye %0d: three faces of each box visible (%0d)", s, e, slot));
    end
  endtask

  // ---------------- AXI4-Lite master ----------------
  int cur_set = -1;

  task automatic axi_write(logic [23:0] a, logic [31:0] d);
    s_awvalid = 1; s_awaddr = a; s_wvalid = 1; s_wdata = d; s_bready = 1;
    do @(posedge clk); while (!(s_awready && s_wready));
    #1 s_awvalid = 0; s_wvalid = 0;
    while (!s_bvalid) @(posedge clk);
    @(posedge clk);
    #1;
  endtask

  task automatic apply_set(int s);
    cur_set = -1;
    for (int e = 0; e < 2; e++)
      for (int p = 0; p < N_POLY; p++) begin
        for (int j = 0; j < 4; j++)
          axi_write(24'(32'h100 + e * 32'h200 + p * 32'h20 + j * 4),
                    {4'b0, 12'(pv[s][e][p][j][1]), 4'b0, 12'(pv[s][e][p][j][0])});
        axi_write(24'(32'h100 + e * 32'h200 + p * 32'h20 + 32'h10), {7'b0, pe[s][e][p], 24'(pc[s][e][p])});
      end
    @(posedge clk); #1;
    cur_set = s;
  endtask

  // ---------------- display monitor, per eye ----------------
  int poly_of [2][$];                  // polygon set used by the n-th frame drawn
  int n_sofpop [2];
  int n_cmp [NSET][2], n_badfr [NSET][2];
  longint bsum [NSET][2][3];
  int     bcnt [NSET][2][3];
  int n_reads = 0;

  always @(posedge clk) if (rst_n) n_reads += $countones(hp_ar_valid);

  for (genvar e = 0; e < 2; e++) begin : g_mon
    logic dly_vs = 1;
    int pix = 0, fr = -1, bad_this = 0;
    bit fr_ok = 0;
    always @(posedge clk) if (rst_n) begin
      if (dut.g_eye[e].u_pse.u_vg.in_valid && dut.g_eye[e].u_pse.u_vg.in_ready &&
          dut.g_eye[e].u_pse.u_vg.in_word.sof)
        poly_of[e].push_back(cur_set);
      if (dut.g_eye[e].u_pse.u_vc.fifo_pop && dut.g_eye[e].u_pse.u_vc.need &&
          dut.g_eye[e].u_pse.u_vc.fifo_data.sof) begin
        fr = n_sofpop[e];
        n_sofpop[e]++;
        fr_ok = fr < poly_of[e].size() && poly_of[e][fr] >= 0;
      end
      if (!hdmi_vs[e] && dly_vs) begin
        if (pix == H_ACTIVE * V_ACTIVE && fr_ok) begin
          n_cmp[poly_of[e][fr]][e]++;
          if (bad_this > 0) n_badfr[poly_of[e][fr]][e]++;
        end
        pix = 0; fr_ok = 0; bad_this = 0;
      end
      dly_vs = hdmi_vs[e];
      if (hdmi_de[e]) begin
        if (fr_ok) begin
          int x, y, s, hit;
          rgb_t exp_pix;
          x = pix % H_ACTIVE; y = pix / H_ACTIVE;
          s = poly_of[e][fr];
          exp_pix = '0;
          hit = -1;
          for (int p = 0; p < N_POLY; p++) begin
            int vx [4], vy [4];
            for (int j = 0; j < 4; j++) begin vx[j] = pv[s][e][p][j][0]; vy[j] = pv[s][e][p][j][1]; end
            if (pe[s][e][p] && ref_inside(vx, vy, x, y)) begin
              exp_pix = rgb_t'(pc[s][e][p]);
              hit = p;
            end
          end
          if (hdmi_rgb[e] != exp_pix) begin
            if (bad_this < 3) $display("eye %0d frame %0d (%0d,%0d): got %h exp %h", e, fr, x, y, hdmi_rgb[e], exp_pix);
            bad_this++;
          end else if (hit >= 0) begin
            bsum[s][e][pbox[s][e][hit]] += x;
            bcnt[s][e][pbox[s][e][hit]]++;
          end
        end
        pix++;
      end
    end
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog: frames compared %0d %0d / %0d %0d", n_cmp[0][0], n_cmp[0][1], n_cmp[1][0], n_cmp[1][1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real cx [NSET][2][3];
    s_awvalid = 0; s_wvalid = 0; s_bready = 1; s_arvalid = 0; s_rready = 1;
    s_awaddr = 0; s_araddr = 0; s_wdata = 0;
    make_set(0);
    make_set(1);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    apply_set(0);
    axi_write(24'h000, 32'h3);                // enable, AR mode
    wait (n_cmp[0][0] >= 2 && n_cmp[0][1] >= 2);
    apply_set(1);
    wait (n_cmp[1][0] >= 2 && n_cmp[1][1] >= 2);
    for (int s = 0; s < NSET; s++)
      for (int e = 0; e < 2; e++) begin
        check(n_badfr[s][e] == 0, $sformatf("pose %0d eye %0d: %0d of %0d frames differ",
                                             s, e, n_badfr[s][e], n_cmp[s][e]));
        for (int b = 0; b < 3; b++) begin
          check(bcnt[s][e][b] > 0, $sformatf("pose %0d eye %0d: box %0d drawn", s, e, b));
          cx[s][e][b] = (bcnt[s][e][b] > 0) ? real'(bsum[s][e][b]) / bcnt[s][e][b] : 0.0;
        end
      end
    for (int b = 0; b < 3; b++) begin
      $display("box %0d: mean column left/right %0.1f / %0.1f at pose 0, %0.1f / %0.1f at pose 1",
               b, cx[0][0][b], cx[0][1][b], cx[1][0][b], cx[1][1][b]);
      for (int s = 0; s < NSET; s++)
        check(cx[s][0][b] > cx[s][1][b], $sformatf("pose %0d box %0d: stereo disparity", s, b));
      for (int e = 0; e < 2; e++)
        check(cx[1][e][b] < cx[0][e][b], $sformatf("eye %0d box %0d: moves left when the head turns right", e, b));
    end
    check(n_reads == 0, "AR mode makes no DRAM reads");
    check(dut.underflow[0] == 0 && dut.underflow[1] == 0, "no video underflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
