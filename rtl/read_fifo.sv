// read_fifo - clock crossings of the read path.
//
// The read-address queue carries 160-bit address packets from the DFI clock to the
// AXI clock (raddr_q). The read data goes back through NRQ = 16 read-data queues
// (all_r_q[0..15]), one per value of RID[3:0], each carrying 531-bit AXI R beats
// (512 data bits, RID, RRESP, RLAST, RUSER) from the AXI clock to the DFI clock.
// Each queue has its own push, pop, full, empty and 8-bit fill level (AXI side),
// so the read channel can hold RREADY low while the queue of the current ID is
// full, and the DFI side can take the beats of the read it is waiting for. Every
// queue is 16 entries deep; the input beat is shared and the push vector selects
// the queue.
//
// Timing: an entry is visible on the far side after the second clock edge of that
// side that follows the push. The entry format, the sixteen queues with their
// 8-bit counts and the depth of 16 follow the design's read-path waveforms; the
// crossing scheme is this design's own.
module read_fifo
  import ddr_bridge_pkg::*;
#(
  parameter int unsigned DEPTH_LOG2 = 4
) (
  input  logic       dfi_clk,
  input  logic       dfi_rst_n,
  input  logic       axi_clk,
  input  logic       axi_rst_n,

  // read address: DFI -> AXI
  input  logic       raddr_push,
  input  addr_pkt_t  raddr_in,
  output logic       raddr_full,
  input  logic       raddr_pop,
  output addr_pkt_t  raddr_out,
  output logic       raddr_empty,

  // read data: AXI -> DFI
  input  logic [NRQ-1:0]             rdata_push,
  input  rdata_pkt_t                 rdata_in,
  output logic [NRQ-1:0]             rdata_full,
  output logic [NRQ-1:0][7:0]        rdata_count,
  input  logic [NRQ-1:0]             rdata_pop,
  output rdata_pkt_t [NRQ-1:0]       rdata_out,
  output logic [NRQ-1:0]             rdata_empty
);
  logic [DEPTH_LOG2:0] ra_cnt;

  async_fifo #(.WIDTH($bits(addr_pkt_t)), .DEPTH_LOG2(DEPTH_LOG2)) u_raddr_q (
    .wr_clk(dfi_clk), .wr_rst_n(dfi_rst_n), .wr_en(raddr_push), .wr_data(raddr_in),
    .full(raddr_full), .wr_count(ra_cnt),
    .rd_clk(axi_clk), .rd_rst_n(axi_rst_n), .rd_en(raddr_pop), .rd_data(raddr_out),
    .empty(raddr_empty));

  for (genvar q = 0; q < NRQ; q++) begin : g_all_r_q
    logic [DEPTH_LOG2:0] cnt;

    async_fifo #(.WIDTH($bits(rdata_pkt_t)), .DEPTH_LOG2(DEPTH_LOG2)) u_all_r_q (
      .wr_clk(axi_clk), .wr_rst_n(axi_rst_n), .wr_en(rdata_push[q]), .wr_data(rdata_in),
      .full(rdata_full[q]), .wr_count(cnt),
      .rd_clk(dfi_clk), .rd_rst_n(dfi_rst_n), .rd_en(rdata_pop[q]), .rd_data(rdata_out[q]),
      .empty(rdata_empty[q]));

    assign rdata_count[q] = 8'(cnt);
  end

endmodule
