// tb_pixel_packer: eight lanes deliver pixels at independent random times and
// the consumer stalls at random. Checks that each word holds the right pixel
// in every lane, that x0/y walk the 640x480 raster with sof on the first word
// of each frame, and that a word leaves one clock after the last lane is
// ready when the output is free.
module tb_pixel_packer;
  import mr_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset
  logic [LANES-1:0] in_valid, in_ready;
  rgb_t in_pix [LANES];
  logic out_valid, out_ready;
  pixword_t out_word;
  int checks = 0, failures = 0;
  int nword = 0;
  localparam int WORDS = 2 * (H_ACTIVE / LANES) * V_ACTIVE + 500;  // two frames and a bit

  pixel_packer dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic rgb_t pix_of(int w, int l);
    return rgb_t'(w * 8 + l) ^ 24'hA5A5A5;
  endfunction

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    initial begin
      in_valid[l] = 0; in_pix[l] = '0;
      wait (rst_n);
      for (int w = 0; w < WORDS; w++) begin
        @(negedge clk);
        if ($urandom_range(0, 7) == 0) @(negedge clk);
        in_valid[l] = 1; in_pix[l] = pix_of(w, l);
        do @(posedge clk); while (!in_ready[l]);
        #1 in_valid[l] = 0;
      end
    end
  end

  always @(negedge clk) out_ready = $urandom_range(0, 4) != 0;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int f, xw, y;
    f  = nword % ((H_ACTIVE / LANES) * V_ACTIVE);
    xw = f % (H_ACTIVE / LANES);
    y  = f / (H_ACTIVE / LANES);
    check(out_word.x0 == 10'(xw * 8) && out_word.y == 9'(y) && out_word.sof == (f == 0),
          $sformatf("position word %0d", nword));
    for (int l = 0; l < LANES; l++)
      check(out_word.pix[l] == pix_of(nword, l), $sformatf("lane %0d word %0d", l, nword));
    nword++;
  end

  initial begin
    repeat (4 * WORDS) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // one-clock latency with a free output
    wait (nword == WORDS);
    check(1'b1, "done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency: in a clock where all lanes are valid and the output is empty,
  // the word is visible right after the edge
  always @(posedge clk) if (rst_n && (&in_valid) && !out_valid) begin
    #1 check(out_valid, "one-clock latency");
  end
endmodule
