// axi_write_channel - write half of the bridge's AXI master (AXI clock domain).
//
// Takes one entry (address packet plus burst data) from the write FIFO at a time.
// AW is driven from the packet; at the same time the W beats are produced: beat k
// carries every byte j of the burst for which ((lane + j) >> AWSIZE) -
// (lane >> AWSIZE) = k, placed on bus lane (lane + j) mod 64 with its strobe, so
// narrow and unaligned INCR transfers come out right. WLAST marks beat AWLEN. After
// both AW and the last W beat are accepted the channel waits for B, counts the
// transaction and flags a non-OKAY BRESP, then takes the next entry. One write is
// in flight at a time.
//
// Timing: AWVALID and the first WVALID rise the cycle after the entry is taken;
// a write with ready slaves occupies AWLEN + 3 cycles. The AXI signal set is the
// standard one; the single-outstanding policy is this design's own choice.
module axi_write_channel
  import ddr_bridge_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,

  input  logic                    q_valid,
  input  addr_pkt_t               q_addr,
  input  wdata_pkt_t              q_data,
  output logic                    q_pop,

  output logic [AXI_ID_W-1:0]     m_axi_awid,
  output logic [AXI_ADDR_W-1:0]   m_axi_awaddr,
  output logic [7:0]              m_axi_awlen,
  output logic [2:0]              m_axi_awsize,
  output logic [1:0]              m_axi_awburst,
  output logic                    m_axi_awlock,
  output logic [3:0]              m_axi_awcache,
  output logic [2:0]              m_axi_awprot,
  output logic [3:0]              m_axi_awqos,
  output logic [3:0]              m_axi_awregion,
  output logic [AXI_USER_W-1:0]   m_axi_awuser,
  output logic                    m_axi_awvalid,
  input  logic                    m_axi_awready,

  output logic [AXI_DATA_W-1:0]   m_axi_wdata,
  output logic [AXI_STRB_W-1:0]   m_axi_wstrb,
  output logic                    m_axi_wlast,
  output logic                    m_axi_wvalid,
  input  logic                    m_axi_wready,

  input  logic [AXI_ID_W-1:0]     m_axi_bid,
  input  logic [1:0]              m_axi_bresp,
  input  logic                    m_axi_bvalid,
  output logic                    m_axi_bready,

  output logic [15:0]             writes,
  output logic                    err_pulse
);

  typedef enum logic [1:0] { S_IDLE, S_XFER, S_RESP } state_e;

  state_e     state;
  addr_pkt_t  a_q;
  wdata_pkt_t d_q;
  logic       aw_done, w_done;
  logic [7:0] beat;

  assign q_pop = (state == S_IDLE) && q_valid;

  assign m_axi_awid     = a_q.prm.id;
  assign m_axi_awaddr   = a_q.addr;
  assign m_axi_awlen    = a_q.prm.len;
  assign m_axi_awsize   = a_q.prm.size;
  assign m_axi_awburst  = a_q.prm.burst;
  assign m_axi_awlock   = a_q.prm.lock;
  assign m_axi_awcache  = a_q.prm.cache;
  assign m_axi_awprot   = a_q.prm.prot;
  assign m_axi_awqos    = a_q.prm.qos;
  assign m_axi_awregion = a_q.prm.region;
  assign m_axi_awuser   = a_q.prm.user;
  assign m_axi_awvalid  = (state == S_XFER) && !aw_done;
  assign m_axi_wvalid   = (state == S_XFER) && !w_done;
  assign m_axi_wlast    = (beat == a_q.prm.len);
  assign m_axi_bready   = (state == S_RESP);

  // lane placement of the current beat
  always_comb begin
    logic [AXI_LANE_W-1:0] lane;
    lane        = a_q.addr[AXI_LANE_W-1:0];
    m_axi_wdata = '0;
    m_axi_wstrb = '0;
    for (int j = 0; j < BURST_BYTES; j++) begin
      if (axi_beat_of(lane, a_q.prm.size, 5'(j)) == beat) begin
        m_axi_wdata[((int'(lane) + j) % AXI_STRB_W) * 8 +: 8] = d_q.data[j*8 +: 8];
        m_axi_wstrb[(int'(lane) + j) % AXI_STRB_W]           = d_q.strb[j];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      a_q       <= '0;
      d_q       <= '0;
      aw_done   <= 1'b0;
      w_done    <= 1'b0;
      beat      <= '0;
      writes    <= '0;
      err_pulse <= 1'b0;
    end else begin
      err_pulse <= 1'b0;
      case (state)
        S_IDLE: begin
          if (q_valid) begin
            a_q     <= q_addr;
            d_q     <= q_data;
            aw_done <= 1'b0;
            w_done  <= 1'b0;
            beat    <= '0;
            state   <= S_XFER;
          end
        end
        S_XFER: begin
          logic aw_fin, w_fin;
          aw_fin = aw_done || m_axi_awready;
          w_fin  = w_done || (m_axi_wready && m_axi_wlast);
          if (m_axi_awready) aw_done <= 1'b1;
          if (m_axi_wvalid && m_axi_wready) begin
            if (m_axi_wlast) w_done <= 1'b1;
            else             beat   <= beat + 8'd1;
          end
          if (aw_fin && w_fin) state <= S_RESP;
        end
        default: begin   // S_RESP
          if (m_axi_bvalid) begin
            writes    <= writes + 16'd1;
            err_pulse <= (m_axi_bresp != 2'b00) || (m_axi_bid != a_q.prm.id);
            state     <= S_IDLE;
          end
        end
      endcase
    end
  end

  // AXI: a valid address or data beat stays put until it is accepted
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                m_axi_awvalid && !m_axi_awready |=> m_axi_awvalid && $stable(m_axi_awaddr))
    else $error("axi_write_channel: AW changed before AWREADY");
  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n)
                               m_axi_wvalid && !m_axi_wready |=> m_axi_wvalid && $stable(m_axi_wdata))
    else $error("axi_write_channel: W changed before WREADY");

endmodule
