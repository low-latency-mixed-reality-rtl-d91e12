// mem_arbiter: memory interconnect from N fetch units onto one DRAM read port.
//
// Requests are granted round-robin, one per clock, starting after the last
// unit granted. The port's request carries the unit number as its ID; the
// response ID selects the unit the data goes back to. The memory must return
// responses of one ID in order (as AXI does); responses of different IDs may
// interleave. Responses are not back-pressured: each fetch unit reserves room
// before it issues a read. Request grant is combinational (the port's ready
// flows back to the granted unit in the same clock). The design uses vendor
// AXI crossbars here; this simple arbiter is this design's replacement.
module mem_arbiter #(
  parameter int N  = 4,
  parameter int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // unit side
  input  logic [N-1:0]      req_valid,
  output logic [N-1:0]      req_ready,
  input  logic [31:0]       req_addr [N],
  output logic [N-1:0]      rsp_valid,
  output logic [31:0]       rsp_data [N],
  // port side
  output logic              m_ar_valid,
  input  logic              m_ar_ready,
  output logic [31:0]       m_ar_addr,
  output logic [IW-1:0]     m_ar_id,
  input  logic              m_r_valid,
  input  logic [31:0]       m_r_data,
  input  logic [IW-1:0]     m_r_id
);
  logic [IW-1:0] last;      // last unit granted
  logic [IW-1:0] gnt;
  logic          any;

  always_comb begin
    gnt = last;
    any = 1'b0;
    // scan from the farthest unit back to the next one, so the next wins
    for (int k = N; k >= 1; k--) begin
      if (req_valid[(int'(last) + k) % N]) begin
        gnt = IW'((int'(last) + k) % N);
        any = 1'b1;
      end
    end
  end

  assign m_ar_valid = any;
  assign m_ar_addr  = req_addr[gnt];
  assign m_ar_id    = gnt;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      req_ready[i] = any && (gnt == IW'(i)) && m_ar_ready;
      rsp_valid[i] = m_r_valid && (m_r_id == IW'(i));
      rsp_data[i]  = m_r_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= IW'(N - 1);
    else if (any && m_ar_ready) last <= gnt;
  end

  a_id_range: assert property (@(posedge clk) disable iff (!rst_n) m_r_valid |-> (int'(m_r_id) < N))
    else $error("mem_arbiter: response ID out of range");
endmodule
