// tb_sync_fifo: random push/pop traffic against a queue model; checks data
// order, empty, full and count every clock, including pushes while full and
// simultaneous push and pop.
module tb_sync_fifo;
  localparam int W = 12, D = 16;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset
  logic push, pop, empty, full;
  logic [W-1:0] wd, rd;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q [$];
  int n_full = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*, .wr_data(wd), .rd_data(rd));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; wd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int bias;
      bias = (cyc / 500) % 2;      // alternate fill-heavy and drain-heavy phases
      @(negedge clk);
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == D), "full");
      check(count == ($clog2(D)+1)'(q.size()), "count");
      if (q.size() > 0) check(rd == q[0], $sformatf("data %h exp %h", rd, q[0]));
      if (full) n_full++;
      push = ($urandom_range(0, 3) < (bias ? 3 : 1)) && !full;
      pop  = ($urandom_range(0, 3) < (bias ? 1 : 3)) && !empty;
      wd   = W'($urandom);
      @(posedge clk);
      #1;
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(wd);
    end
    check(n_full > 0, "full reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
