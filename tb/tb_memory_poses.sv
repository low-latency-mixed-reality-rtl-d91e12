// tb_memory_poses: DRAM access pattern of the cubemap workload for three head
// poses: nearly straight ahead, rolled 90 degrees and rolled 180 degrees about
// the viewing axis. The full-size stereo design runs one frame per pose. For
// every lane, the sequence of DRAM reads seen at the four read ports is
// compared, in order, with the reference addresses of that lane's pixels.
// For the first 8 scanlines of each frame the testbench reports how many
// distinct 64-byte DRAM lines each eye touches and how many lines the two
// eyes share, the locality measure behind the access-pattern study. The
// output must stay steady whatever the pose: no video FIFO underflow in
// either eye over the three frames, at 20-60 clock DRAM latency.
module tb_memory_poses;
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

  localparam longint BASE = 64'h3000_0000;
  int quat [3][4];
  int cur_pose = -1;
  int pose_of [$], pose_of_r [$];

  task automatic axi_write(logic [23:0] a, logic [31:0] d);
    s_awvalid = 1; s_awaddr = a; s_wvalid = 1; s_wdata = d; s_bready = 1;
    do @(posedge clk); while (!(s_awready && s_wready));
    #1 s_awvalid = 0; s_wvalid = 0;
    while (!s_bvalid) @(posedge clk);
    @(posedge clk);
    #1;
  endtask

  task automatic set_pose(int k);
    cur_pose = -1;
    for (int i = 0; i < 4; i++) axi_write(24'(8 + 4 * i), 32'(quat[k][i]));
    @(posedge clk); @(posedge clk); #1;
    cur_pose = k;
  endtask

  // DRAM model and request capture per eye and lane
  logic [31:0] mq_addr [4][$];
  logic [1:0]  mq_id   [4][$];
  int          mq_due  [4][$];
  logic [31:0] reqs [2][LANES][$];

  always @(posedge clk) if (rst_n) begin
    if (dut.g_eye[0].u_pse.dstate == 2'd1 && dut.g_eye[0].u_pse.ic_busy == '0 && dut.cfg.enable)
      pose_of.push_back(cur_pose);
    if (dut.g_eye[1].u_pse.dstate == 2'd1 && dut.g_eye[1].u_pse.ic_busy == '0 && dut.cfg.enable)
      pose_of_r.push_back(cur_pose);
    for (int p = 0; p < 4; p++)
      if (hp_ar_valid[p] && hp_ar_ready[p]) begin
        mq_addr[p].push_back(hp_ar_addr[p]);
        mq_id[p].push_back(hp_ar_id[p]);
        mq_due[p].push_back(cyc + $urandom_range(20, 60));
        reqs[p / 2][(p % 2) * 4 + int'(hp_ar_id[p])].push_back(hp_ar_addr[p]);
      end
  end

  always @(negedge clk)
    for (int p = 0; p < 4; p++) begin
      hp_r_valid[p] = 0;
      if (mq_due[p].size() > 0 && mq_due[p][0] <= cyc) begin
        hp_r_valid[p] = 1;
        hp_r_data[p] = mem_word(mq_addr[p][0]);
        hp_r_id[p] = mq_id[p][0];
        void'(mq_addr[p].pop_front()); void'(mq_id[p].pop_front()); void'(mq_due[p].pop_front());
      end
      hp_ar_ready[p] = $urandom_range(0, 9) != 0;
    end

  // reference addresses of one lane for one pose, whole frame or first 8 lines
  function automatic void ref_lane(int eye, int lane, int k, int lines, ref longint q [$]);
    rot_i_t rr;
    ref_rot(quat[k][0], quat[k][1], quat[k][2], quat[k][3], rr);
    q.delete();
    for (int y = 0; y < lines; y++)
      for (int x = lane; x < H_ACTIVE; x += LANES) begin
        bit v;
        int sx, sy;
        ref_lut(eye, x, y, v, sx, sy);
        if (v) q.push_back(ref_addr(v, sx, sy, 1'b0, 1'b0, 0, 0, 0, BASE, rr));
      end
  endfunction

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nlane [2][LANES];
    int distinct [3][2], shared [3];
    s_awvalid = 0; s_wvalid = 0; s_bready = 1; s_arvalid = 0; s_rready = 1;
    s_awaddr = 0; s_araddr = 0; s_wdata = 0;
    for (int p = 0; p < 4; p++) begin hp_r_valid[p] = 0; hp_r_data[p] = 0; hp_r_id[p] = 0; end
    // pose 1: 5 degrees about y; pose 2: 90 degrees roll; pose 3: 180 degrees roll
    quat[0] = '{16335, 0, 714, 0};
    quat[1] = '{11585, 0, 0, 11585};
    quat[2] = '{0, 0, 0, 16384};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int e = 0; e < 2; e++)
      for (int y = 0; y < V_ACTIVE; y++)
        for (int x = 0; x < H_ACTIVE; x++) begin
          bit v;
          int sx, sy;
          ref_lut(e, x, y, v, sx, sy);
          axi_write({1'b1, 1'(e), 1'b0, 9'(y), 10'(x), 2'b00}, {v, 6'b0, 9'(sy), 6'b0, 10'(sx)});
        end
    axi_write(24'h004, 32'(BASE));
    set_pose(0);
    axi_write(24'h000, 32'h1);
    for (int k = 1; k < 3; k++) begin
      wait (pose_of.size() == k && pose_of_r.size() == k);
      set_pose(k);
    end
    wait (pose_of.size() == 4 && pose_of_r.size() == 4);
    repeat (200) @(posedge clk);
    check(pose_of[0] == 0 && pose_of[1] == 1 && pose_of[2] == 2 &&
          pose_of_r[0] == 0 && pose_of_r[1] == 1 && pose_of_r[2] == 2, "one pose per frame");

    // frame f of lane i is the f-th block of n requests, n = valid pixels of the lane
    for (int e = 0; e < 2; e++)
      for (int l = 0; l < LANES; l++) begin
        longint q [$];
        ref_lane(e, l, 0, V_ACTIVE, q);
        nlane[e][l] = q.size();
      end
    for (int k = 0; k < 3; k++) begin
      int lines [2][int];
      lines[0].delete();
      lines[1].delete();
      for (int e = 0; e < 2; e++)
        for (int l = 0; l < LANES; l++) begin
          longint full [$], first8 [$];
          int bad;
          ref_lane(e, l, k, V_ACTIVE, full);
          ref_lane(e, l, k, 8, first8);
          bad = 0;
          for (int j = 0; j < full.size(); j++)
            if (reqs[e][l].size() <= k * nlane[e][l] + j ||
                longint'(reqs[e][l][k * nlane[e][l] + j]) != full[j]) bad++;
          check(bad == 0, $sformatf("pose %0d eye %0d lane %0d: %0d reads differ", k + 1, e, l, bad));
          foreach (first8[j]) lines[e][int'(first8[j] >> 6)] = 1;
        end
      distinct[k][0] = lines[0].num();
      distinct[k][1] = lines[1].num();
      shared[k] = 0;
      foreach (lines[0][a]) if (lines[1].exists(a)) shared[k]++;
      $display("pose %0d: first 8 scanlines touch %0d / %0d DRAM lines (left/right), %0d shared",
               k + 1, distinct[k][0], distinct[k][1], shared[k]);
    end
    check(dut.underflow[0] == 0 && dut.underflow[1] == 0,
          "video output steady for every pose (no underflow)");
    check(distinct[0][0] < distinct[1][0], "pose 1 has more locality than the 90 degree roll");
    check(shared[0] < distinct[0][0] && shared[1] < distinct[1][0], "eyes overlap only partly");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
