// write_fsm - DFI write path of the bridge (DFI clock domain).
//
// A decoded WR/WRA command (address and burst type) is parked in a small pending
// queue. Write data arrives later on dfi_wrdata with dfi_wrdata_en, one 32-bit
// word per enabled phase; the words of all live phases are appended, in phase
// order, to a staging buffer of eight words. As soon as the buffer holds the number
// of words the oldest pending command needs (1 for a single write, 2 for BC4, 4 for
// BL8), those words are removed and one burst is pushed into the write FIFO: an
// address packet and a data packet with byte strobes (strobe = not dfi_wrdata_mask;
// bytes the burst does not cover get strobe 0). Because a burst may end and the
// next begin inside one DFI cycle at the 1:2 and 1:4 ratios, leftover words simply
// stay in the staging buffer.
//
// The address packet carries the configured AXI write parameters, with AWBURST set
// to INCR and AWLEN computed from the burst size, the start address and the
// configured AWSIZE (clamped to the 64-byte bus). A burst is pushed in the cycle
// its last word is staged if the FIFO has room, otherwise it waits. err_pulse
// flags a staging-buffer or pending-queue overflow. bursts counts pushed bursts.
// The word counts per burst type are the design's documented behaviour; the
// queueing scheme is this design's own.
module write_fsm
  import ddr_bridge_pkg::*;
#(
  parameter int unsigned PEND_DEPTH = 4,
  parameter int unsigned SBUF       = 8
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [1:0]                       freq_ratio,
  input  axi_param_t                       aw_prm,

  input  logic                             cmd_valid,
  input  logic [AXI_ADDR_W-1:0]            cmd_addr,
  input  burst_e                           cmd_burst,

  input  logic [PHASES-1:0]                dfi_wrdata_en,
  input  logic [PHASES-1:0][DFI_DATA_W-1:0] dfi_wrdata,
  input  logic [PHASES-1:0][DFI_MASK_W-1:0] dfi_wrdata_mask,

  input  logic                             fifo_full,
  output logic                             fifo_push,
  output addr_pkt_t                        waddr_pkt,
  output wdata_pkt_t                       wdata_pkt,

  output logic [15:0]                      bursts,
  output logic                             err_pulse
);

  typedef struct packed {
    logic [AXI_ADDR_W-1:0] addr;
    burst_e                burst;
  } pend_t;

  typedef struct packed {
    logic [DFI_MASK_W-1:0] mask;
    logic [DFI_DATA_W-1:0] data;
  } word_t;

  localparam int unsigned PW = $clog2(PEND_DEPTH);
  localparam int unsigned SW = $clog2(SBUF + 1);

  pend_t         pend [PEND_DEPTH];
  logic [PW-1:0] pend_rd, pend_wr;
  logic [PW:0]   pend_cnt;

  word_t         sbuf_q [SBUF];
  word_t         sbuf_d [SBUF];
  logic [SW-1:0] scnt_q, scnt_d;

  logic       pop, ovf;
  logic [2:0] need;
  pend_t      head;

  assign head = pend[pend_rd];
  assign need = burst_words(head.burst);

  always_comb begin
    int unsigned nph;
    word_t       tmp [SBUF];
    logic [SW-1:0] c;
    nph = (freq_ratio == 2'd0) ? 1 : (freq_ratio == 2'd1) ? 2 : 4;
    tmp = sbuf_q;
    c   = scnt_q;
    ovf = 1'b0;
    // append the words of the live, enabled phases
    for (int p = 0; p < PHASES; p++) begin
      if (p < nph && dfi_wrdata_en[p]) begin
        if (c < SW'(SBUF)) begin
          tmp[c[$clog2(SBUF)-1:0]] = '{mask: dfi_wrdata_mask[p], data: dfi_wrdata[p]};
          c      = c + SW'(1);
        end else begin
          ovf = 1'b1;
        end
      end
    end
    pop = (pend_cnt != 0) && (c >= SW'(need)) && !fifo_full;
    // assemble the burst from the oldest words
    wdata_pkt = '0;
    for (int i = 0; i < MAX_WORDS; i++) begin
      if (i < int'(need)) begin
        wdata_pkt.data[i*DFI_DATA_W +: DFI_DATA_W] = tmp[i].data;
        wdata_pkt.strb[i*DFI_MASK_W +: DFI_MASK_W] = ~tmp[i].mask;
      end
    end
    // drop them from the staging buffer
    sbuf_d = tmp;
    scnt_d = c;
    if (pop) begin
      for (int i = 0; i < SBUF; i++) begin
        sbuf_d[i] = (i + int'(need) < SBUF) ? tmp[i + int'(need)] : '0;
      end
      scnt_d = c - SW'(need);
    end
  end

  always_comb begin
    logic [2:0] sz;
    waddr_pkt       = '0;
    waddr_pkt.addr  = head.addr;
    waddr_pkt.prm   = aw_prm;
    sz              = (aw_prm.size > 3'd6) ? 3'd6 : aw_prm.size;
    waddr_pkt.prm.size  = sz;
    waddr_pkt.prm.burst = 2'b01;   // INCR
    waddr_pkt.prm.len   = axi_len(head.addr[AXI_LANE_W-1:0], sz, 5'(need) << 2);
  end

  assign fifo_push = pop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_rd   <= '0;
      pend_wr   <= '0;
      pend_cnt  <= '0;
      scnt_q    <= '0;
      bursts    <= '0;
      err_pulse <= 1'b0;
      for (int i = 0; i < SBUF; i++) sbuf_q[i] <= '0;
      for (int i = 0; i < PEND_DEPTH; i++) pend[i] <= '0;
    end else begin
      logic pend_ovf;
      pend_ovf = cmd_valid && (pend_cnt == (PW+1)'(PEND_DEPTH)) && !pop;
      if (cmd_valid && !pend_ovf) begin
        pend[pend_wr] <= '{addr: cmd_addr, burst: cmd_burst};
        pend_wr       <= pend_wr + PW'(1);
      end
      if (pop) begin
        pend_rd <= pend_rd + PW'(1);
        bursts  <= bursts + 16'd1;
      end
      pend_cnt  <= pend_cnt + (PW+1)'(cmd_valid && !pend_ovf) - (PW+1)'(pop);
      sbuf_q    <= sbuf_d;
      scnt_q    <= scnt_d;
      err_pulse <= ovf || pend_ovf;
    end
  end

endmodule
