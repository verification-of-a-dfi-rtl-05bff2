// dfi_axi_bridge - DFI DDR4 PHY bridge: a DDR4 memory controller's DFI port in,
// an AXI master out.
//
// The bridge takes the place of the PHY and the DRAM behind a DDR4 memory
// controller, so the controller can be run against an ordinary AXI memory (for
// example in an emulator). Three clock domains meet here:
//   DFI clock   - cmd_decode turns DFI command phases into RD/WR with a flat AXI
//                 address (tracking the open row of each bank); write_fsm collects
//                 the write words of each burst; read_fsm sends read requests and
//                 returns reassembled read bursts on dfi_rddata; init_ctrl answers
//                 dfi_init_start and latches the frequency ratio; the interaction
//                 FSM classifies update, PHY-master, init and low-power requests;
//                 scemi_ctrl holds the configuration registers.
//   AXI clock   - axi_write_channel and axi_read_channel, the AXI master.
//   SCE-MI clock- the message side of scemi_ctrl.
// write_fifo and read_fifo carry addresses and data between the DFI and AXI clocks.
// Read data comes back through sixteen queues, one per value of RID[3:0]; the
// read ID is set in the AR parameter registers.
//
// Interface: DFI signals are arrays over PHASES (= 4) phases, phase 0 first; at the
// 1:1 ratio only phase 0 is live, at 1:2 phases 0-1. The PHY-update and PHY-master
// requests of the bridge come from the CTRL register. Status words readable over
// the message port:
//   0: [3:0] interaction state, [5:4] frequency ratio, [6] dfi_init_complete,
//      [7] dfi_phyupd_ack, [8] dfi_phymstr_ack, [31:16] completed initializations
//   1: [15:0] write bursts collected, [31:16] read bursts returned
//   2: [15:0] ACT count, [31:16] REF count
//   3: [15:0] PRE count, [31:16] MRS + ZQ count
//   4: [15:0] DFI-side error count
// Timing: a BL8 write leaves on AXI a few DFI plus AXI cycles after its last data
// word; a read returns after the AXI round trip plus about six cycles of crossing
// and reassembly. The block structure follows the design's architecture diagram;
// the status map and counters are this design's own.
module dfi_axi_bridge
  import ddr_bridge_pkg::*;
(
  input  logic                              dfi_clk,
  input  logic                              dfi_rst_n,
  input  logic                              axi_clk,
  input  logic                              axi_rst_n,
  input  logic                              scemi_clk,
  input  logic                              scemi_rst_n,

  // DFI control interface
  input  logic [PHASES-1:0]                 dfi_cs_n,
  input  logic [PHASES-1:0]                 dfi_act_n,
  input  logic [PHASES-1:0]                 dfi_ras_n,
  input  logic [PHASES-1:0]                 dfi_cas_n,
  input  logic [PHASES-1:0]                 dfi_we_n,
  input  logic [PHASES-1:0][DFI_ADDR_W-1:0] dfi_address,
  input  logic [PHASES-1:0][BA_W-1:0]       dfi_bank,
  input  logic [PHASES-1:0][BG_W-1:0]       dfi_bg,
  input  logic [PHASES-1:0]                 dfi_cke,
  input  logic [PHASES-1:0]                 dfi_reset_n,

  // DFI write data interface
  input  logic [PHASES-1:0]                 dfi_wrdata_en,
  input  logic [PHASES-1:0][DFI_DATA_W-1:0] dfi_wrdata,
  input  logic [PHASES-1:0][DFI_MASK_W-1:0] dfi_wrdata_mask,

  // DFI read data interface
  input  logic [PHASES-1:0]                 dfi_rddata_en,
  output logic [PHASES-1:0][DFI_DATA_W-1:0] dfi_rddata,
  output logic [PHASES-1:0]                 dfi_rddata_valid,

  // DFI update, PHY master, status and low-power interfaces
  input  logic                              dfi_ctrlupd_req,
  output logic                              dfi_ctrlupd_ack,
  output logic                              dfi_phyupd_req,
  output logic [1:0]                        dfi_phyupd_type,
  input  logic                              dfi_phyupd_ack,
  output logic                              dfi_phymstr_req,
  input  logic                              dfi_phymstr_ack,
  input  logic                              dfi_init_start,
  input  logic [1:0]                        dfi_freq_ratio,
  output logic                              dfi_init_complete,
  input  logic                              dfi_lp_ctrl_req,
  input  logic                              dfi_lp_data_req,
  output logic                              dfi_lp_ctrl_ack,
  output logic                              dfi_lp_data_ack,

  // AXI master
  output logic [AXI_ID_W-1:0]               m_axi_awid,
  output logic [AXI_ADDR_W-1:0]             m_axi_awaddr,
  output logic [7:0]                        m_axi_awlen,
  output logic [2:0]                        m_axi_awsize,
  output logic [1:0]                        m_axi_awburst,
  output logic                              m_axi_awlock,
  output logic [3:0]                        m_axi_awcache,
  output logic [2:0]                        m_axi_awprot,
  output logic [3:0]                        m_axi_awqos,
  output logic [3:0]                        m_axi_awregion,
  output logic [AXI_USER_W-1:0]             m_axi_awuser,
  output logic                              m_axi_awvalid,
  input  logic                              m_axi_awready,
  output logic [AXI_DATA_W-1:0]             m_axi_wdata,
  output logic [AXI_STRB_W-1:0]             m_axi_wstrb,
  output logic                              m_axi_wlast,
  output logic                              m_axi_wvalid,
  input  logic                              m_axi_wready,
  input  logic [AXI_ID_W-1:0]               m_axi_bid,
  input  logic [1:0]                        m_axi_bresp,
  input  logic                              m_axi_bvalid,
  output logic                              m_axi_bready,
  output logic [AXI_ID_W-1:0]               m_axi_arid,
  output logic [AXI_ADDR_W-1:0]             m_axi_araddr,
  output logic [7:0]                        m_axi_arlen,
  output logic [2:0]                        m_axi_arsize,
  output logic [1:0]                        m_axi_arburst,
  output logic                              m_axi_arlock,
  output logic [3:0]                        m_axi_arcache,
  output logic [2:0]                        m_axi_arprot,
  output logic [3:0]                        m_axi_arqos,
  output logic [3:0]                        m_axi_arregion,
  output logic [AXI_USER_W-1:0]             m_axi_aruser,
  output logic                              m_axi_arvalid,
  input  logic                              m_axi_arready,
  input  logic [AXI_ID_W-1:0]               m_axi_rid,
  input  logic [AXI_DATA_W-1:0]             m_axi_rdata,
  input  logic [1:0]                        m_axi_rresp,
  input  logic                              m_axi_rlast,
  input  logic [AXI_USER_W-1:0]             m_axi_ruser,
  input  logic                              m_axi_rvalid,
  output logic                              m_axi_rready,

  // SCE-MI message port
  input  logic                              msg_in_valid,
  output logic                              msg_in_ready,
  input  logic [39:0]                       msg_in_data,
  output logic                              msg_out_valid,
  input  logic                              msg_out_ready,
  output logic [39:0]                       msg_out_data,

  // observation
  output interaction_e                      interaction_state,
  output logic [15:0]                       axi_writes,
  output logic [15:0]                       axi_reads,
  output logic                              axi_err
);

  // ---------------- configuration ----------------
  burst_mode_e           burst_mode;
  logic [15:0]           t_init;
  logic [AXI_ADDR_W-1:0] axi_base;
  axi_param_t            aw_prm, ar_prm;
  logic [7:0][31:0]      status;

  scemi_ctrl u_scemi_ctrl (
    .scemi_clk, .scemi_rst_n, .msg_in_valid, .msg_in_ready, .msg_in_data,
    .msg_out_valid, .msg_out_ready, .msg_out_data,
    .clk(dfi_clk), .rst_n(dfi_rst_n), .status,
    .burst_mode, .phyupd_req(dfi_phyupd_req), .phymstr_req(dfi_phymstr_req),
    .phyupd_type(dfi_phyupd_type), .t_init, .axi_base, .aw_prm, .ar_prm);

  // ---------------- initialization / control ----------------
  logic [1:0]  freq_ratio;
  logic        cmd_enable;
  logic [15:0] init_count;

  init_ctrl u_init_ctrl (
    .clk(dfi_clk), .rst_n(dfi_rst_n), .t_init, .dfi_init_start, .dfi_freq_ratio,
    .dfi_reset_n(dfi_reset_n[0]), .dfi_cke(dfi_cke[0]), .dfi_init_complete,
    .freq_ratio, .cmd_enable, .init_count);

  // ---------------- DFI interactions ----------------
  logic ia_busy;

  dfi_interaction_fsm u_interaction (
    .clk(dfi_clk), .rst_n(dfi_rst_n), .dfi_phyupd_req, .dfi_phymstr_req,
    .dfi_ctrlupd_req, .dfi_init_start, .dfi_lp_ctrl_req, .dfi_lp_data_req,
    .state(interaction_state), .dfi_ctrlupd_ack, .dfi_lp_ctrl_ack, .dfi_lp_data_ack,
    .busy(ia_busy));

  // ---------------- command decode ----------------
  logic                  col_valid, col_write, col_ap;
  logic [AXI_ADDR_W-1:0] col_addr;
  burst_e                col_burst;
  logic                  ev_act, ev_pre, ev_ref, ev_mrs, ev_zqc, dec_err;

  cmd_decode u_decode (
    .clk(dfi_clk), .rst_n(dfi_rst_n), .enable(cmd_enable), .freq_ratio, .burst_mode,
    .axi_base, .dfi_cs_n, .dfi_act_n, .dfi_ras_n, .dfi_cas_n, .dfi_we_n, .dfi_address,
    .dfi_bank, .dfi_bg, .col_valid, .col_write, .col_ap, .col_addr, .col_burst,
    .ev_act, .ev_pre, .ev_ref, .ev_mrs, .ev_zqc, .err_pulse(dec_err));

  // ---------------- write path ----------------
  logic       wf_push, wf_full, wf_valid, wf_pop;
  addr_pkt_t  wf_addr_in, wf_addr_out;
  wdata_pkt_t wf_data_in, wf_data_out;
  logic [15:0] wr_bursts;
  logic        wr_err;

  write_fsm u_write_fsm (
    .clk(dfi_clk), .rst_n(dfi_rst_n), .freq_ratio, .aw_prm,
    .cmd_valid(col_valid && col_write), .cmd_addr(col_addr), .cmd_burst(col_burst),
    .dfi_wrdata_en, .dfi_wrdata, .dfi_wrdata_mask,
    .fifo_full(wf_full), .fifo_push(wf_push), .waddr_pkt(wf_addr_in), .wdata_pkt(wf_data_in),
    .bursts(wr_bursts), .err_pulse(wr_err));

  write_fifo u_write_fifo (
    .dfi_clk, .dfi_rst_n, .push(wf_push), .push_addr(wf_addr_in), .push_data(wf_data_in),
    .push_full(wf_full), .axi_clk, .axi_rst_n, .pop(wf_pop), .pop_valid(wf_valid),
    .pop_addr(wf_addr_out), .pop_data(wf_data_out));

  logic wch_err;
  axi_write_channel u_axi_wr (
    .clk(axi_clk), .rst_n(axi_rst_n), .q_valid(wf_valid), .q_addr(wf_addr_out),
    .q_data(wf_data_out), .q_pop(wf_pop),
    .m_axi_awid, .m_axi_awaddr, .m_axi_awlen, .m_axi_awsize, .m_axi_awburst, .m_axi_awlock,
    .m_axi_awcache, .m_axi_awprot, .m_axi_awqos, .m_axi_awregion, .m_axi_awuser,
    .m_axi_awvalid, .m_axi_awready, .m_axi_wdata, .m_axi_wstrb, .m_axi_wlast, .m_axi_wvalid,
    .m_axi_wready, .m_axi_bid, .m_axi_bresp, .m_axi_bvalid, .m_axi_bready,
    .writes(axi_writes), .err_pulse(wch_err));

  // ---------------- read path ----------------
  logic       ra_push, ra_full, ra_pop, ra_empty;
  addr_pkt_t  ra_in, ra_out;
  logic [NRQ-1:0]       rq_push, rq_full, rq_pop, rq_empty;
  rdata_pkt_t           rq_in;
  rdata_pkt_t [NRQ-1:0] rq_out;
  logic [NRQ-1:0][7:0]  rq_count;
  logic [15:0] rd_bursts, rd_stalls;
  logic        rd_err;
  logic [BURST_W-1:0] rdata_burst;

  read_fsm u_read_fsm (
    .clk(dfi_clk), .rst_n(dfi_rst_n), .freq_ratio, .ar_prm,
    .cmd_valid(col_valid && !col_write), .cmd_addr(col_addr), .cmd_burst(col_burst),
    .raddr_full(ra_full), .raddr_push(ra_push), .raddr_pkt(ra_in),
    .rq_empty, .rq_data(rq_out), .rq_pop,
    .dfi_rddata_en, .dfi_rddata, .dfi_rddata_valid,
    .rdata_burst, .bursts(rd_bursts), .err_pulse(rd_err));

  read_fifo u_read_fifo (
    .dfi_clk, .dfi_rst_n, .axi_clk, .axi_rst_n,
    .raddr_push(ra_push), .raddr_in(ra_in), .raddr_full(ra_full),
    .raddr_pop(ra_pop), .raddr_out(ra_out), .raddr_empty(ra_empty),
    .rdata_push(rq_push), .rdata_in(rq_in), .rdata_full(rq_full), .rdata_count(rq_count),
    .rdata_pop(rq_pop), .rdata_out(rq_out), .rdata_empty(rq_empty));

  axi_read_channel u_axi_rd (
    .clk(axi_clk), .rst_n(axi_rst_n), .q_valid(!ra_empty), .q_addr(ra_out), .q_pop(ra_pop),
    .rq_full, .rq_push, .rq_data(rq_in),
    .m_axi_arid, .m_axi_araddr, .m_axi_arlen, .m_axi_arsize, .m_axi_arburst, .m_axi_arlock,
    .m_axi_arcache, .m_axi_arprot, .m_axi_arqos, .m_axi_arregion, .m_axi_aruser,
    .m_axi_arvalid, .m_axi_arready, .m_axi_rid, .m_axi_rdata, .m_axi_rresp, .m_axi_rlast,
    .m_axi_ruser, .m_axi_rvalid, .m_axi_rready, .reads(axi_reads), .stall_cycles(rd_stalls));

  // sticky AXI-side error flag
  always_ff @(posedge axi_clk or negedge axi_rst_n) begin
    if (!axi_rst_n)   axi_err <= 1'b0;
    else if (wch_err) axi_err <= 1'b1;
  end

  // ---------------- DFI-side counters ----------------
  logic [15:0] n_act, n_ref, n_pre, n_mz, n_err;
  always_ff @(posedge dfi_clk or negedge dfi_rst_n) begin
    if (!dfi_rst_n) begin
      {n_act, n_ref, n_pre, n_mz, n_err} <= '0;
    end else begin
      n_act <= n_act + 16'(ev_act);
      n_ref <= n_ref + 16'(ev_ref);
      n_pre <= n_pre + 16'(ev_pre);
      n_mz  <= n_mz + 16'(ev_mrs) + 16'(ev_zqc);
      n_err <= n_err + 16'(dec_err) + 16'(wr_err) + 16'(rd_err);
    end
  end

  always_comb begin
    status    = '0;
    status[0] = {init_count, 7'd0, dfi_phymstr_ack, dfi_phyupd_ack, dfi_init_complete,
                 freq_ratio, interaction_state};
    status[1] = {rd_bursts, wr_bursts};
    status[2] = {n_ref, n_act};
    status[3] = {n_mz, n_pre};
    status[4] = {15'd0, ia_busy, n_err};
  end

endmodule
