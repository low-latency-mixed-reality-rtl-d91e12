// tb_mem_arbiter: four requesters share one port. The memory model answers
// after a random latency, in order per ID but interleaving IDs. Checks that
// every requester receives exactly its own data in order, that the grant
// rotates when all units request, and that each unit is served.
module tb_mem_arbiter;
  import tb_ref_pkg::*;
  localparam int N = 4, IW = 2;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset
  logic [N-1:0] req_valid, req_ready, rsp_valid;
  logic [31:0] req_addr [N], rsp_data [N];
  logic m_ar_valid, m_ar_ready, m_r_valid;
  logic [31:0] m_ar_addr, m_r_data;
  logic [IW-1:0] m_ar_id, m_r_id;
  int checks = 0, failures = 0, cyc = 0;
  logic [31:0] expq [N][$];
  logic [31:0] pend_addr [N][$];
  int pend_time [N][$];
  int served [N];
  int sent [N];
  int last_gnt = -1, rot_ok = 0, rot_bad = 0;

  mem_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (m_ar_valid && m_ar_ready) begin
        pend_addr[m_ar_id].push_back(m_ar_addr);
        pend_time[m_ar_id].push_back(cyc + $urandom_range(3, 30));
        if (&req_valid && last_gnt >= 0) begin
          if (int'(m_ar_id) == (last_gnt + 1) % N) rot_ok++; else rot_bad++;
        end
        last_gnt = m_ar_id;
      end
      for (int i = 0; i < N; i++) if (rsp_valid[i]) begin
        logic [31:0] e;
        e = expq[i].pop_front();
        check(rsp_data[i] == mem_word(e), $sformatf("unit %0d data", i));
        served[i]++;
      end
    end
  end

  // memory: one response per clock from a random ID whose head is due
  always @(negedge clk) begin
    int start;
    m_r_valid = 0;
    start = $urandom_range(0, N - 1);
    for (int k = 0; k < N; k++) begin
      int i;
      i = (start + k) % N;
      if (!m_r_valid && pend_time[i].size() > 0 && pend_time[i][0] <= cyc) begin
        m_r_valid = 1; m_r_id = IW'(i);
        m_r_data = mem_word(pend_addr[i][0]);
        void'(pend_addr[i].pop_front()); void'(pend_time[i].pop_front());
      end
    end
    m_ar_ready = $urandom_range(0, 3) != 0;
  end

  for (genvar g = 0; g < N; g++) begin : g_req
    initial begin
      req_valid[g] = 0; req_addr[g] = 0;
      wait (rst_n);
      for (int n = 0; n < 400; n++) begin
        @(negedge clk);
        if (n > 100 && $urandom_range(0, 3) == 0) begin @(negedge clk); end
        req_valid[g] = 1;
        req_addr[g] = {$urandom} & 32'hFFFF_FFFC;
        expq[g].push_back(req_addr[g]);
        do @(posedge clk); while (!req_ready[g]);
        sent[g]++;
        #1 req_valid[g] = 0;
      end
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_r_valid = 0; m_r_data = 0; m_r_id = 0; m_ar_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (sent[0] == 400 && sent[1] == 400 && sent[2] == 400 && sent[3] == 400);
    repeat (100) @(posedge clk);
    for (int i = 0; i < N; i++) check(served[i] == 400, $sformatf("unit %0d served %0d", i, served[i]));
    check(rot_ok > 100 && rot_bad == 0, $sformatf("round robin ok %0d bad %0d", rot_ok, rot_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
