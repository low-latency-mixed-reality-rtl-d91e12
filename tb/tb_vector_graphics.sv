// tb_vector_graphics: random triangles and quadrilaterals (both windings,
// partly off screen, some disabled) over random pixel words; every output
// pixel is compared with a reference edge test where the highest-numbered
// covering polygon wins. Polygons change only at frame starts and the check
// uses the set sampled with that frame. Checks the three-clock latency and
// stalls with random back-pressure.
module tb_vector_graphics;
  import mr_pkg::*;
  import tb_ref_pkg::*;
  localparam int NP = N_POLY;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset
  poly_t polys [NP];
  poly_t frame_polys [$][NP];
  logic in_valid, in_ready, out_valid, out_ready;
  pixword_t in_word, out_word;
  pixword_t expq [$];
  int checks = 0, failures = 0, cyc = 0, n_drawn = 0;

  vector_graphics dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic pixword_t model(pixword_t w, poly_t ps [NP]);
    pixword_t r;
    r = w;
    for (int l = 0; l < LANES; l++)
      for (int p = 0; p < NP; p++) begin
        int vx [4], vy [4];
        for (int j = 0; j < 4; j++) begin vx[j] = ps[p].v[j].x; vy[j] = ps[p].v[j].y; end
        if (ps[p].en && ref_inside(vx, vy, int'(w.x0) + l, int'(w.y))) r.pix[l] = ps[p].color;
      end
    return r;
  endfunction

  task automatic random_polys();
    for (int p = 0; p < NP; p++) begin
      int cx, cy, rr;
      cx = $urandom_range(0, 700) - 30; cy = $urandom_range(0, 520) - 20; rr = $urandom_range(5, 120);
      polys[p].en = $urandom_range(0, 4) != 0;
      polys[p].color = rgb_t'($urandom);
      // a convex quad around (cx, cy); p odd: reversed winding; p%3==0: triangle
      polys[p].v[0] = '{x: 12'(cx - rr), y: 12'(cy - rr / 2)};
      polys[p].v[1] = '{x: 12'(cx + rr / 2), y: 12'(cy - rr)};
      polys[p].v[2] = '{x: 12'(cx + rr), y: 12'(cy + rr)};
      polys[p].v[3] = (p % 3 == 0) ? polys[p].v[2] : '{x: 12'(cx - rr / 3), y: 12'(cy + rr / 2)};
      if (p % 2) begin
        vertex_t t;
        t = polys[p].v[0]; polys[p].v[0] = polys[p].v[3]; polys[p].v[3] = t;
        t = polys[p].v[1]; polys[p].v[1] = polys[p].v[2]; polys[p].v[2] = t;
      end
    end
  endtask

  always @(negedge clk) out_ready = $urandom_range(0, 3) != 0;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    pixword_t e;
    e = expq.pop_front();
    check(out_word == e, $sformatf("word x0=%0d y=%0d", out_word.x0, out_word.y));
    for (int l = 0; l < LANES; l++) if (out_word.pix[l] != rgb_t'(out_word.x0 + 10'(l))) n_drawn++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    poly_t cur [NP];
    int t0;
    in_valid = 0; in_word = '0; out_ready = 1;
    random_polys();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int fr = 0; fr < 6; fr++) begin
      for (int n = 0; n < 2000; n++) begin
        @(negedge clk);
        if (n == 10) random_polys();          // change mid frame: must not take effect yet
        if ($urandom_range(0, 5) == 0) @(negedge clk);
        in_valid = 1;
        in_word.sof = (n == 0);
        if (n == 0) cur = polys;
        in_word.x0 = 10'(8 * $urandom_range(0, 79));
        in_word.y  = 9'($urandom_range(0, 479));
        for (int l = 0; l < LANES; l++) in_word.pix[l] = rgb_t'(in_word.x0 + 10'(l));
        expq.push_back(model(in_word, cur));
        do @(posedge clk); while (!in_ready);
        #1 in_valid = 0;
      end
    end
    while (expq.size() > 0) @(posedge clk);
    // latency with a free output: 3 clocks
    @(negedge clk);
    out_ready = 1;
    force out_ready = 1;
    in_valid = 1; in_word.sof = 0; expq.push_back(model(in_word, cur));
    t0 = cyc;
    @(posedge clk); #1 in_valid = 0;
    while (!out_valid) @(posedge clk);
    check(cyc - t0 == 3, $sformatf("latency %0d", cyc - t0));
    @(posedge clk);
    release out_ready;
    check(n_drawn > 1000, $sformatf("pixels drawn %0d", n_drawn));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
