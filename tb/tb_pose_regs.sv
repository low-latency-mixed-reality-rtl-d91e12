// tb_pose_regs: AXI4-Lite writes and reads of every register class: control,
// base, quaternion, translation, polygon vertices and colours of both eyes,
// status inputs and lens map entries. Checks the register outputs, read
// data, the one-clock lens map strobe and that responses wait for bready.
module tb_pose_regs;
  import mr_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rvalid, s_rready;
  logic [23:0] s_awaddr, s_araddr;
  logic [31:0] s_wdata, s_rdata;
  logic [1:0] s_bresp, s_rresp;
  stream_cfg_t cfg;
  q14_t qw, qx, qy, qz;
  poly_t polys_l [N_POLY], polys_r [N_POLY];
  logic lut_we, lut_eye;
  logic [9:0] lut_x;
  logic [8:0] lut_y;
  lut_entry_t lut_data;
  logic [15:0] underflow_l = 16'h1234, underflow_r = 16'h5678, frames_l = 16'd7, frames_r = 16'd9;
  int checks = 0, failures = 0, n_strobe = 0;

  pose_regs dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic axi_write(logic [23:0] a, logic [31:0] d, int bdelay = 0);
    @(negedge clk);
    s_awvalid = 1; s_awaddr = a; s_wvalid = 1; s_wdata = d;
    do @(posedge clk); while (!(s_awready && s_wready));
    #1 s_awvalid = 0; s_wvalid = 0;
    s_bready = 0;
    repeat (bdelay) begin
      @(negedge clk);
      check(s_bvalid, "bvalid held");
    end
    @(negedge clk);
    s_bready = 1;
    do @(posedge clk); while (!s_bvalid);
    check(s_bresp == 2'b00, "bresp");
    #1 s_bready = 0;
  endtask

  task automatic axi_read(logic [23:0] a, output logic [31:0] d);
    @(negedge clk);
    s_arvalid = 1; s_araddr = a;
    do @(posedge clk); while (!s_arready);
    #1 s_arvalid = 0;
    s_rready = 1;
    do @(posedge clk); while (!s_rvalid);
    d = s_rdata;
    #1 s_rready = 0;
  endtask

  logic [23:0] last_lut_a;
  logic [31:0] last_lut_d;
  always @(posedge clk) if (rst_n && lut_we) begin
    n_strobe++;
    check(lut_x == last_lut_a[11:2] && lut_y == last_lut_a[20:12] && lut_eye == last_lut_a[22] &&
          lut_data.valid == last_lut_d[31] && lut_data.x == last_lut_d[9:0] && lut_data.y == last_lut_d[24:16],
          "lens map strobe");
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_arvalid = 0; s_rready = 0;
    s_awaddr = 0; s_araddr = 0; s_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(qw == 16384 && qx == 0 && cfg == '0, "reset values");
    axi_write(24'h000, 32'h7, 3);
    check(cfg.enable && cfg.ar_mode && cfg.tr_en, "ctrl");
    axi_write(24'h004, 32'h8000_0040);
    check(cfg.base == 32'h8000_0040, "base");
    axi_write(24'h008, 32'h0000_C000); axi_write(24'h00C, 32'h0000_1111);
    axi_write(24'h010, 32'h0000_2222); axi_write(24'h014, 32'h0000_F333);
    check(qw == -16'sd16384 && qx == 16'h1111 && qy == 16'h2222 && qz == 16'hF333, "quaternion");
    axi_write(24'h018, 32'hFFF); axi_write(24'h01C, 32'h123); axi_write(24'h020, 32'h800);
    check(cfg.tx == -12'sd1 && cfg.ty == 12'h123 && cfg.tz == 12'h800, "translation");
    axi_read(24'h00C, d); check(d[15:0] == 16'h1111, "read qx");
    axi_read(24'h004, d); check(d == 32'h8000_0040, "read base");
    axi_read(24'h024, d); check(d == 32'h5678_1234, "read underflow");
    axi_read(24'h028, d); check(d == {16'd9, 16'd7}, "read frames");
    for (int e = 0; e < 2; e++)
      for (int p = 0; p < N_POLY; p++) begin
        for (int j = 0; j < 4; j++)
          axi_write(24'(32'h100 + e * 32'h200 + p * 32'h20 + j * 4),
                    {4'b0, 12'(p * 10 + j + e), 4'b0, 12'(-(p * 3 + j) - e)});
        axi_write(24'(32'h100 + e * 32'h200 + p * 32'h20 + 32'h10), {7'b0, 1'(p % 2), 24'(p * 1000 + e)});
      end
    for (int e = 0; e < 2; e++)
      for (int p = 0; p < N_POLY; p++) begin
        poly_t pp;
        pp = e ? polys_r[p] : polys_l[p];
        check(pp.en == 1'(p % 2) && pp.color == 24'(p * 1000 + e), "poly colour");
        for (int j = 0; j < 4; j++)
          check(pp.v[j].y == 12'(p * 10 + j + e) && pp.v[j].x == 12'(-(p * 3 + j) - e), "poly vertex");
        axi_read(24'(32'h100 + e * 32'h200 + p * 32'h20 + 8), d);
        check(d == {4'b0, 12'(p * 10 + 2 + e), 4'b0, 12'(-(p * 3 + 2) - e)}, "read vertex");
      end
    for (int n = 0; n < 200; n++) begin
      last_lut_a = {1'b1, 1'($urandom), 1'b0, 9'($urandom_range(0, 479)), 10'($urandom_range(0, 639)), 2'b00};
      last_lut_d = $urandom;
      axi_write(last_lut_a, last_lut_d);
    end
    check(n_strobe == 200, $sformatf("strobes %0d", n_strobe));
    // control still intact after all the other writes
    check(cfg.base == 32'h8000_0040 && qz == 16'hF333, "no aliasing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
