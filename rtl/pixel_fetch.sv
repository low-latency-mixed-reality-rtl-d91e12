// pixel_fetch: pixel fetch unit of one lane.
//
// Takes source-pixel requests from the index FIFO and reads each pixel from
// DRAM. Because DRAM latency is long and unpredictable, up to OUTST reads are
// kept in flight; the pixels leave in request order. A tag FIFO remembers, for
// every accepted request, whether it was skipped (no read, black pixel) or
// read; a data FIFO collects read responses, which the memory returns in
// order for one unit. A request is accepted only while the tag FIFO has room,
// so the data FIFO (same depth) can never overflow and the response channel
// needs no ready signal.
// Interface: idx valid/ready in; req valid/ready + 32-bit byte address out;
// rsp_valid + 32-bit data in (the pixel is bits 23:0); pix valid/ready out.
// A skipped request is accepted without waiting for the memory port.
// Parallel fetch units with several outstanding reads follow the design; the
// depth OUTST and the tag scheme are this design's choices.
module pixel_fetch
  import mr_pkg::*;
#(
  parameter int OUTST = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        idx_valid,
  output logic        idx_ready,
  input  idx_t        idx,
  output logic        req_valid,
  input  logic        req_ready,
  output logic [31:0] req_addr,
  input  logic        rsp_valid,
  input  logic [31:0] rsp_data,
  output logic        pix_valid,
  input  logic        pix_ready,
  output rgb_t        pix
);
  logic tag_empty, tag_full, tag_head;
  logic dat_empty, dat_full;
  logic [31:0] dat_head;
  logic tag_push, tag_pop, dat_pop;

  assign req_valid = idx_valid && !idx.skip && !tag_full;
  assign req_addr  = idx.addr;
  assign idx_ready = !tag_full && (idx.skip || req_ready);
  assign tag_push  = idx_valid && idx_ready;

  assign pix_valid = !tag_empty && (tag_head || !dat_empty);
  assign pix       = tag_head ? '0 : dat_head[23:0];
  assign tag_pop   = pix_valid && pix_ready;
  assign dat_pop   = tag_pop && !tag_head;

  sync_fifo #(.WIDTH(1), .DEPTH(OUTST)) u_tag (
    .clk, .rst_n, .push(tag_push), .wr_data(idx.skip), .pop(tag_pop),
    .rd_data(tag_head), .empty(tag_empty), .full(tag_full), .count());

  sync_fifo #(.WIDTH(32), .DEPTH(OUTST)) u_dat (
    .clk, .rst_n, .push(rsp_valid), .wr_data(rsp_data), .pop(dat_pop),
    .rd_data(dat_head), .empty(dat_empty), .full(dat_full), .count());

  a_rsp_room: assert property (@(posedge clk) disable iff (!rst_n) rsp_valid |-> !dat_full)
    else $error("pixel_fetch: response with no room");
endmodule
