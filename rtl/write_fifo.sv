// write_fifo - DFI-to-AXI clock crossing of the write path.
//
// Two dual-clock queues side by side: the write-address queue (160-bit address
// packets) and the write-data queue (one whole DRAM burst, 128 data bits and 16
// strobes, per entry). The DFI side always pushes both together, so the pair is
// seen as one queue: push_full is high when either is full, and on the AXI side
// pop_valid needs both heads present and pop removes both. The two queues are kept
// separate, rather than merged into one wide entry, so that the address can be
// sent on AW while the data still streams out on W.
//
// Timing: an entry is visible on the AXI side after the second axi_clk edge that
// follows the push.
// The queue depth (16 entries) is this design's own choice.
module write_fifo
  import ddr_bridge_pkg::*;
#(
  parameter int unsigned DEPTH_LOG2 = 4
) (
  input  logic       dfi_clk,
  input  logic       dfi_rst_n,
  input  logic       push,
  input  addr_pkt_t  push_addr,
  input  wdata_pkt_t push_data,
  output logic       push_full,

  input  logic       axi_clk,
  input  logic       axi_rst_n,
  input  logic       pop,
  output logic       pop_valid,
  output addr_pkt_t  pop_addr,
  output wdata_pkt_t pop_data
);
  logic a_full, d_full, a_empty, d_empty;
  logic [DEPTH_LOG2:0] a_cnt, d_cnt;

  async_fifo #(.WIDTH($bits(addr_pkt_t)), .DEPTH_LOG2(DEPTH_LOG2)) u_waddr_q (
    .wr_clk(dfi_clk), .wr_rst_n(dfi_rst_n), .wr_en(push && !push_full), .wr_data(push_addr),
    .full(a_full), .wr_count(a_cnt),
    .rd_clk(axi_clk), .rd_rst_n(axi_rst_n), .rd_en(pop && pop_valid), .rd_data(pop_addr),
    .empty(a_empty));

  async_fifo #(.WIDTH($bits(wdata_pkt_t)), .DEPTH_LOG2(DEPTH_LOG2)) u_wdata_q (
    .wr_clk(dfi_clk), .wr_rst_n(dfi_rst_n), .wr_en(push && !push_full), .wr_data(push_data),
    .full(d_full), .wr_count(d_cnt),
    .rd_clk(axi_clk), .rd_rst_n(axi_rst_n), .rd_en(pop && pop_valid), .rd_data(pop_data),
    .empty(d_empty));

  assign push_full = a_full || d_full;
  assign pop_valid = !a_empty && !d_empty;

  // Both queues move in lock step, so their fill levels never differ
  a_lockstep: assert property (@(posedge dfi_clk) disable iff (!dfi_rst_n) a_cnt == d_cnt)
    else $error("write_fifo: address and data queues out of step");

endmodule
