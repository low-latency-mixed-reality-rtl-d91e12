// tb_video_controller: feeds the controller from a FIFO model with four
// frames of numbered pixels, the third cut short to force an underflow.
// Checks the 16,000-clock fill wait, every displayed pixel of the complete
// frames, 307,200 active pixels per frame, the 420,000-clock frame period
// (240 frames/s at 9.92 ns), the sync pulse widths, the underflow count and
// that the frame after the underflow is aligned again.
module tb_video_controller;
  import mr_pkg::*;
  localparam int FILL = 16000;
  localparam int WPF = (H_ACTIVE / LANES) * V_ACTIVE;
  logic clk = 0, rst_n = 0, enable;
  logic fifo_empty, fifo_pop, de, hs, vs, frame_start, running;
  vword_t fifo_data;
  rgb_t rgb;
  logic [15:0] underflow_cnt, resync_cnt, frame_cnt;
  vword_t q [$];
  int checks = 0, failures = 0, cyc = 0;
  int en_cyc, first_de = -1, npix = 0, frame_first [$];
  int hs_w = 0, hs_cnt = 0, vs_w = 0, vs_cnt = 0;
  int bad_pix [4];

  video_controller #(.FILL_CYCLES(FILL)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic rgb_t pix_of(int f, int w, int l);
    return rgb_t'((f << 20) ^ (w * 8 + l) ^ 24'h135);
  endfunction

  task automatic push_frame(int f, int from, int to);
    for (int w = from; w < to; w++) begin
      vword_t v;
      v.sof = (w == 0);
      for (int l = 0; l < LANES; l++) v.pix[l] = pix_of(f, w, l);
      q.push_back(v);
    end
  endtask

  always_comb begin
    fifo_empty = (q.size() == 0);
    fifo_data  = fifo_empty ? '0 : q[0];
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (fifo_pop) void'(q.pop_front());
    if (rst_n && de) begin
      int f, i, x, y;
      f = npix / (H_ACTIVE * V_ACTIVE);
      i = npix % (H_ACTIVE * V_ACTIVE);
      x = i % H_ACTIVE; y = i / H_ACTIVE;
      if (i == 0) frame_first.push_back(cyc);
      if (first_de < 0) first_de = cyc;
      if (f < 4 && rgb != pix_of(f, y * (H_ACTIVE / LANES) + x / LANES, x % LANES)) bad_pix[f]++;
      npix++;
    end
    if (!rst_n) ;
    else if (!hs) hs_w++;
    else if (hs_w > 0) begin check(hs_w == H_SYNC, $sformatf("hsync width %0d", hs_w)); hs_w = 0; hs_cnt++; end
    if (!rst_n) ;
    else if (!vs) vs_w++;
    else if (vs_w > 0) begin check(vs_w == V_SYNC * H_TOTAL, $sformatf("vsync width %0d", vs_w)); vs_w = 0; vs_cnt++; end
  end

  initial begin
    repeat (FILL + 5 * H_TOTAL * V_TOTAL) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 0;
    push_frame(0, 0, WPF);
    push_frame(1, 0, WPF);
    push_frame(2, 0, 20000);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    enable = 1;
    en_cyc = cyc;
    // wait until frame 2 runs dry, then deliver the rest of it late and frame 3
    wait (underflow_cnt != 0);
    repeat (150 * H_TOTAL) @(posedge clk);
    @(negedge clk);
    push_frame(2, 20000, WPF);
    push_frame(3, 0, WPF);
    wait (npix == 4 * H_ACTIVE * V_ACTIVE);
    repeat (10) @(posedge clk);
    // de rises FILL+1 clocks after the enable edge and is sampled one clock later
    check(first_de - en_cyc == FILL + 2, $sformatf("fill wait %0d", first_de - en_cyc));
    check(frame_first.size() == 4, "four frames");
    for (int f = 1; f < frame_first.size(); f++)
      check(frame_first[f] - frame_first[f-1] == H_TOTAL * V_TOTAL,
            $sformatf("frame period %0d", frame_first[f] - frame_first[f-1]));
    check(bad_pix[0] == 0 && bad_pix[1] == 0, $sformatf("frames 0/1 bad %0d %0d", bad_pix[0], bad_pix[1]));
    check(bad_pix[2] > 0, "frame 2 damaged by underflow");
    check(bad_pix[3] == 0, $sformatf("frame 3 after resync bad %0d", bad_pix[3]));
    check(underflow_cnt > 0 && resync_cnt > 0, $sformatf("underflow %0d resync %0d", underflow_cnt, resync_cnt));
    check(hs_cnt >= 3 * V_TOTAL + V_ACTIVE - 2 && vs_cnt == 3, $sformatf("syncs %0d %0d", hs_cnt, vs_cnt));
    check(frame_cnt >= 3, "frame counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
