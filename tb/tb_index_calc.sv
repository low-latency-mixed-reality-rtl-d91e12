// tb_index_calc: drives random destination pixels through one index
// calculation unit with a lens map bank model, random poses, translation and
// AR mode, and random back-pressure; every address is compared with the
// integer reference model. Checks the 15-clock latency and one result per
// clock when not back-pressured.
module tb_index_calc;
  import mr_pkg::*;
  import tb_ref_pkg::*;
  localparam int LUT_AW = 16;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset
  stream_cfg_t cfg;
  rot_elem_t rot [3][3];
  logic in_valid, in_ready, out_valid, out_ready, busy;
  logic [9:0] in_x;
  logic [8:0] in_y;
  logic lut_rd_en;
  logic [LUT_AW-1:0] lut_rd_addr;
  lut_entry_t lut_rd_data;
  idx_t out_idx;
  int checks = 0, failures = 0;
  longint expq [$];
  int cyc = 0;

  index_calc dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // lens map bank model: entry is a function of the address
  function automatic lut_entry_t lut_of(int a);
    lut_entry_t e;
    e.valid = (a % 7) != 3;
    e.x = 10'((a * 37) % 640);
    e.y = 9'((a * 11) % 480);
    return e;
  endfunction
  always_ff @(posedge clk) if (lut_rd_en) lut_rd_data <= lut_of(int'(lut_rd_addr));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  rot_i_t rr;
  // output checker
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    longint e;
    e = expq.pop_front();
    check(e == -1 ? out_idx.skip : (!out_idx.skip && longint'(out_idx.addr) == e),
          $sformatf("addr %h skip %b exp %h", out_idx.addr, out_idx.skip, e));
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_pose(int a, b, c, d);
    real nn;
    q14_t q [4];
    nn = $sqrt(real'(a)*a + real'(b)*b + real'(c)*c + real'(d)*d);
    q[0] = q14_t'($rtoi(a / nn * 16384.0)); q[1] = q14_t'($rtoi(b / nn * 16384.0));
    q[2] = q14_t'($rtoi(c / nn * 16384.0)); q[3] = q14_t'($rtoi(d / nn * 16384.0));
    ref_rot(q[0], q[1], q[2], q[3], rr);
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) rot[i][j] = rot_elem_t'(rr[i][j]);
  endtask

  task automatic push_pixel(int x, int y);
    lut_entry_t e;
    int a;
    in_valid = 1; in_x = 10'(x); in_y = 9'(y);
    a = y * 80 + x / 8;
    e = lut_of(a);
    expq.push_back(ref_addr(e.valid, e.x, e.y, cfg.ar_mode, cfg.tr_en, cfg.tx, cfg.ty, cfg.tz, cfg.base, rr));
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 0;
  endtask

  initial begin
    int t0, lat;
    cfg = '0; cfg.base = 32'h1000_0000;
    set_pose(1, 0, 0, 0);
    in_valid = 0; in_x = 0; in_y = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency of one pixel
    @(negedge clk);
    t0 = cyc;
    push_pixel(8, 0);
    while (!out_valid) @(posedge clk);
    lat = cyc - t0;
    check(lat == 15, $sformatf("latency %0d", lat));
    @(negedge clk);
    // throughput: 64 back-to-back pixels leave in 64 consecutive clocks
    begin
      int first, last, n;
      n = 0;
      fork
        for (int i = 0; i < 64; i++) push_pixel(i * 8, 5);
        begin
          while (n < 64) begin
            @(posedge clk);
            if (out_valid) begin
              if (n == 0) first = cyc;
              last = cyc; n++;
            end
          end
        end
      join
      check(last - first == 63, $sformatf("throughput %0d", last - first));
    end
    // random poses, modes and back-pressure
    for (int seg = 0; seg < 24; seg++) begin
      while (busy) @(posedge clk);
      @(negedge clk);
      set_pose($urandom_range(0, 2000) - 1000, $urandom_range(0, 2000) - 1000,
               $urandom_range(0, 2000) - 1000, $urandom_range(0, 2000) - 1000);
      cfg.ar_mode = (seg % 6) == 5;
      cfg.tr_en   = (seg % 3) == 1;
      cfg.tx = 12'($urandom_range(0, 400) - 200);
      cfg.ty = 12'($urandom_range(0, 400) - 200);
      cfg.tz = 12'($urandom_range(0, 400) - 200);
      cfg.base = $urandom & 32'hFFFF_FFFC;
      fork
        for (int i = 0; i < 300; i++) begin
          if ($urandom_range(0, 3) == 0) @(negedge clk);
          push_pixel($urandom_range(0, 639), $urandom_range(0, 479));
        end
        repeat (700) begin
          @(negedge clk);
          out_ready = (seg % 2) ? ($urandom_range(0, 2) != 0) : 1'b1;
        end
      join
      out_ready = 1;
    end
    while (busy) @(posedge clk);
    check(expq.size() == 0, "all results seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
