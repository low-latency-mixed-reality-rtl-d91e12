// tb_quat_to_rot: random unit quaternions in Q1.14; the matrix is compared
// bit for bit with an integer model and, for orientation, with a real-valued
// rotation of known vectors. Checks the one-clock latency.
module tb_quat_to_rot;
  import mr_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset
  q14_t qw, qx, qy, qz;
  rot_elem_t r [3][3];
  int checks = 0, failures = 0;

  quat_to_rot dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rot_i_t e;
    qw = 16384; qx = 0; qy = 0; qz = 0;
    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
      check(r[i][j] == ((i == j) ? 18'sd16384 : 18'sd0), "reset identity");
    rst_n = 1;
    // 90 degrees about z: q = (cos45, 0, 0, sin45) -> x axis maps to y axis
    @(negedge clk);
    qw = 11585; qx = 0; qy = 0; qz = 11585;
    @(posedge clk); #1;
    check(r[1][0] > 16370 && r[0][1] < -16370 && r[2][2] > 16370, "rot z 90");
    for (int n = 0; n < 500; n++) begin
      real a, b, c, d, nn;
      a = $urandom_range(0, 20000) - 10000.0; b = $urandom_range(0, 20000) - 10000.0;
      c = $urandom_range(0, 20000) - 10000.0; d = $urandom_range(0, 20000) - 10000.0;
      nn = $sqrt(a*a + b*b + c*c + d*d) + 1.0;
      @(negedge clk);
      qw = q14_t'($rtoi(a / nn * 16384.0)); qx = q14_t'($rtoi(b / nn * 16384.0));
      qy = q14_t'($rtoi(c / nn * 16384.0)); qz = q14_t'($rtoi(d / nn * 16384.0));
      @(posedge clk); #1;
      // value must not be visible before the clock edge: sampled after it
      ref_rot(qw, qx, qy, qz, e);
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
        check(longint'(r[i][j]) == e[i][j], $sformatf("r[%0d][%0d]=%0d exp %0d", i, j, r[i][j], e[i][j]));
      // rows are unit vectors (within rounding)
      for (int i = 0; i < 3; i++) begin
        real s;
        s = 0;
        for (int j = 0; j < 3; j++) s += (r[i][j] / 16384.0) * (r[i][j] / 16384.0);
        check(s > 0.995 && s < 1.005, "orthonormal row");
      end
    end
    // latency: a change shows only after one clock
    @(negedge clk);
    qw = 0; qx = 16384; qy = 0; qz = 0;
    #1;
    @(posedge clk); #1;
    check(r[0][0] == 18'sd16384 && r[1][1] == -18'sd16384 && r[2][2] == -18'sd16384, "rot x 180");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
