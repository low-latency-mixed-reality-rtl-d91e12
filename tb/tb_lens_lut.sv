// tb_lens_lut: fills a bank of the lens map with random entries and reads
// them back in random order; checks the one-clock read latency and that the
// output holds while rd_en is low.
module tb_lens_lut;
  import mr_pkg::*;
  localparam int DEPTH = 38400, AW = 16;
  logic clk = 0;
  logic rd_en, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  lut_entry_t rd_data, wr_data;
  lut_entry_t model [DEPTH];
  int checks = 0, failures = 0;

  lens_lut #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = 0; wr_addr = 0; wr_data = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = lut_entry_t'($urandom);
      model[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    for (int n = 0; n < 20000; n++) begin
      int a;
      lut_entry_t held;
      a = $urandom_range(0, DEPTH - 1);
      @(negedge clk);
      rd_en = 1; rd_addr = AW'(a);
      @(negedge clk);
      check(rd_data == model[a], $sformatf("read %0d", a));
      held = rd_data;
      rd_en = 0; rd_addr = AW'($urandom_range(0, DEPTH - 1));
      @(negedge clk);
      check(rd_data == held, "hold while rd_en low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
