// axi_read_channel - read half of the bridge's AXI master (AXI clock domain).
//
// Takes one address packet at a time from the read-address queue and drives AR
// from it (m_axi_araddr is the packet's address, the other AR fields its
// parameters). Every R beat is stored unchanged, with RID, RRESP, RLAST and RUSER,
// in the read-data queue selected by ARID[3:0] of the current read (one of 16)
// that carries it back to the DFI clock; RREADY is held low while that queue is
// full, so no beat is ever lost. The next AR is issued only after RLAST of the
// current read, keeping one read in flight, so the responses return in command
// order, which is what the DFI side needs.
//
// Timing: ARVALID rises the cycle after the packet is taken; each R beat is pushed
// in the cycle it is accepted. The per-ID queues follow the design's read-path
// waveforms; selecting the queue by the issued ARID and the single-outstanding
// policy are this design's own.
module axi_read_channel
  import ddr_bridge_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,

  input  logic                    q_valid,
  input  addr_pkt_t               q_addr,
  output logic                    q_pop,

  input  logic [NRQ-1:0]          rq_full,
  output logic [NRQ-1:0]          rq_push,
  output rdata_pkt_t              rq_data,

  output logic [AXI_ID_W-1:0]     m_axi_arid,
  output logic [AXI_ADDR_W-1:0]   m_axi_araddr,
  output logic [7:0]              m_axi_arlen,
  output logic [2:0]              m_axi_arsize,
  output logic [1:0]              m_axi_arburst,
  output logic                    m_axi_arlock,
  output logic [3:0]              m_axi_arcache,
  output logic [2:0]              m_axi_arprot,
  output logic [3:0]              m_axi_arqos,
  output logic [3:0]              m_axi_arregion,
  output logic [AXI_USER_W-1:0]   m_axi_aruser,
  output logic                    m_axi_arvalid,
  input  logic                    m_axi_arready,

  input  logic [AXI_ID_W-1:0]     m_axi_rid,
  input  logic [AXI_DATA_W-1:0]   m_axi_rdata,
  input  logic [1:0]              m_axi_rresp,
  input  logic                    m_axi_rlast,
  input  logic [AXI_USER_W-1:0]   m_axi_ruser,
  input  logic                    m_axi_rvalid,
  output logic                    m_axi_rready,

  output logic [15:0]             reads,
  output logic [15:0]             stall_cycles
);

  typedef enum logic [1:0] { S_IDLE, S_AR, S_R } state_e;

  state_e    state;
  addr_pkt_t a_q;
  logic [RQ_SEL_W-1:0] sel;
  logic      r_hs;
  assign sel = a_q.prm.id[RQ_SEL_W-1:0];

  assign q_pop = (state == S_IDLE) && q_valid;

  assign m_axi_arid     = a_q.prm.id;
  assign m_axi_araddr   = a_q.addr;
  assign m_axi_arlen    = a_q.prm.len;
  assign m_axi_arsize   = a_q.prm.size;
  assign m_axi_arburst  = a_q.prm.burst;
  assign m_axi_arlock   = a_q.prm.lock;
  assign m_axi_arcache  = a_q.prm.cache;
  assign m_axi_arprot   = a_q.prm.prot;
  assign m_axi_arqos    = a_q.prm.qos;
  assign m_axi_arregion = a_q.prm.region;
  assign m_axi_aruser   = a_q.prm.user;
  assign m_axi_arvalid  = (state == S_AR);
  assign m_axi_rready   = (state == S_R) && !rq_full[sel];

  assign r_hs    = m_axi_rvalid && m_axi_rready;
  assign rq_push = r_hs ? (NRQ'(1) << sel) : '0;
  assign rq_data = '{user: m_axi_ruser, last: m_axi_rlast, resp: m_axi_rresp,
                     id: m_axi_rid, data: m_axi_rdata};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      a_q          <= '0;
      reads        <= '0;
      stall_cycles <= '0;
    end else begin
      if (state == S_R && rq_full[sel] && m_axi_rvalid) stall_cycles <= stall_cycles + 16'd1;
      case (state)
        S_IDLE: if (q_valid) begin
          a_q   <= q_addr;
          state <= S_AR;
        end
        S_AR: if (m_axi_arready) state <= S_R;
        default: if (r_hs && m_axi_rlast) begin
          reads <= reads + 16'd1;
          state <= S_IDLE;
        end
      endcase
    end
  end

  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                m_axi_arvalid && !m_axi_arready |=> m_axi_arvalid && $stable(m_axi_araddr))
    else $error("axi_read_channel: AR changed before ARREADY");

endmodule
