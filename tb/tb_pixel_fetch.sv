// tb_pixel_fetch: random address stream with skipped pixels; the memory model
// accepts requests at random and answers in order after a random latency
// (5..60 clocks). Checks pixel order and value, that skipped pixels are black
// and cause no read, that reads overlap (several in flight) and that the
// response FIFO never overflows.
module tb_pixel_fetch;
  import mr_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset
  logic idx_valid, idx_ready, req_valid, req_ready, rsp_valid, pix_valid, pix_ready;
  idx_t idx;
  logic [31:0] req_addr, rsp_data;
  rgb_t pix;
  int checks = 0, failures = 0;
  rgb_t expq [$];
  int n_reads = 0, n_skip = 0, max_inflight = 0, inflight = 0, cyc = 0;
  // memory model: in-order pipe with a ready time per entry
  logic [31:0] mq_addr [$];
  int          mq_time [$];

  pixel_fetch dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (req_valid && req_ready) begin
        mq_addr.push_back(req_addr);
        mq_time.push_back(cyc + $urandom_range(5, 60) + ((mq_time.size() > 0) ? 0 : 0));
        n_reads++;
      end
      if (pix_valid && pix_ready) begin
        rgb_t e;
        e = expq.pop_front();
        check(pix == e, $sformatf("pix %h exp %h", pix, e));
      end
      inflight = mq_addr.size();
      if (inflight > max_inflight) max_inflight = inflight;
    end
  end

  // response driver: head of the pipe leaves once its time has come
  always @(negedge clk) begin
    rsp_valid = 0;
    if (mq_time.size() > 0 && mq_time[0] <= cyc) begin
      rsp_valid = 1;
      rsp_data = mem_word(mq_addr[0]);
      void'(mq_time.pop_front());
      void'(mq_addr.pop_front());
    end
    req_ready = $urandom_range(0, 4) != 0;
    pix_ready = $urandom_range(0, 5) != 0;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idx_valid = 0; idx = '0; rsp_valid = 0; rsp_data = 0; req_ready = 0; pix_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      idx_valid = 1;
      idx.skip = $urandom_range(0, 5) == 0;
      idx.addr = $urandom & 32'hFFFF_FFFC;
      expq.push_back(idx.skip ? 24'h0 : mem_word(idx.addr)[23:0]);
      if (idx.skip) n_skip++;
      do @(posedge clk); while (!idx_ready);
      #1 idx_valid = 0;
    end
    while (expq.size() > 0) @(posedge clk);
    check(n_reads == 5000 - n_skip, $sformatf("reads %0d exp %0d", n_reads, 5000 - n_skip));
    check(max_inflight > 4, $sformatf("max in flight %0d", max_inflight));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
