// read_fsm - DFI read path of the bridge (DFI clock domain).
//
// For each decoded RD/RDA command the FSM pushes an address packet (the configured
// AXI read parameters with ARBURST = INCR, ARSIZE clamped to the 64-byte bus and
// ARLEN computed from the burst size and start address) into the read-address
// queue, and records the burst (start lane, beat size, word count, expected ARLEN,
// ARID) in a pending queue. Read responses come back from the AXI side through
// sixteen read-data queues, one per RID[3:0], one 512-bit R beat per entry. The FSM
// pops the beats of the oldest pending read from the queue of its ID, copies the bytes each beat carries into the 128-bit RDATA
// register (byte j of the burst travels in beat ((lane + j) >> size) - (lane >> size)
// at bus lane (lane + j) mod 64), and checks RRESP and that RLAST arrives on the
// expected beat with the expected RID. When the burst is complete it is returned on dfi_rddata, lowest
// word first, with dfi_rddata_valid.
//
// The controller announces how many words it expects by asserting dfi_rddata_en
// on live phases; every such phase adds one credit, and each word returned spends
// one. Up to one word per live phase is sent per DFI cycle (one at 1:1, four at
// 1:4), never more than the credits. dfi_rddata and dfi_rddata_valid are
// registered outputs. err_pulse flags a bad response or RID, a wrong beat count or a full
// address queue or pending queue; bursts counts completed bursts.
// Word order and the RDATA register follow the design's read-path description;
// credits, queue sizes and checks are this design's own choices.
module read_fsm
  import ddr_bridge_pkg::*;
#(
  parameter int unsigned PEND_DEPTH = 16
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [1:0]                        freq_ratio,
  input  axi_param_t                        ar_prm,

  input  logic                              cmd_valid,
  input  logic [AXI_ADDR_W-1:0]             cmd_addr,
  input  burst_e                            cmd_burst,

  input  logic                              raddr_full,
  output logic                              raddr_push,
  output addr_pkt_t                         raddr_pkt,

  input  logic [NRQ-1:0]                    rq_empty,
  input  rdata_pkt_t [NRQ-1:0]              rq_data,
  output logic [NRQ-1:0]                    rq_pop,

  input  logic [PHASES-1:0]                 dfi_rddata_en,
  output logic [PHASES-1:0][DFI_DATA_W-1:0] dfi_rddata,
  output logic [PHASES-1:0]                 dfi_rddata_valid,

  output logic [BURST_W-1:0]                rdata_burst,
  output logic [15:0]                       bursts,
  output logic                              err_pulse
);

  typedef struct packed {
    logic [AXI_LANE_W-1:0] lane;
    logic [2:0]            size;
    logic [2:0]            words;
    logic [7:0]            len;
    logic [AXI_ID_W-1:0]   id;
  } pend_t;

  typedef enum logic { S_ASSEMBLE = 1'b0, S_SEND = 1'b1 } state_e;

  localparam int unsigned PW = $clog2(PEND_DEPTH);

  pend_t         pend [PEND_DEPTH];
  logic [PW-1:0] pend_rd, pend_wr;
  logic [PW:0]   pend_cnt;
  pend_t         head;
  assign head = pend[pend_rd];

  state_e        state;
  logic [7:0]    beat;
  logic [2:0]    sent;
  logic [7:0]    credits;

  int unsigned nph;
  assign nph = (freq_ratio == 2'd0) ? 1 : (freq_ratio == 2'd1) ? 2 : 4;

  // ---------------- request side ----------------
  logic [2:0] sz_req;
  logic [2:0] words_req;
  logic       pend_full, req_drop;
  assign sz_req    = (ar_prm.size > 3'd6) ? 3'd6 : ar_prm.size;
  assign words_req = burst_words(cmd_burst);
  assign pend_full = (pend_cnt == (PW+1)'(PEND_DEPTH));
  assign req_drop  = cmd_valid && (raddr_full || pend_full);

  always_comb begin
    raddr_pkt           = '0;
    raddr_pkt.addr      = cmd_addr;
    raddr_pkt.prm       = ar_prm;
    raddr_pkt.prm.size  = sz_req;
    raddr_pkt.prm.burst = 2'b01;   // INCR
    raddr_pkt.prm.len   = axi_len(cmd_addr[AXI_LANE_W-1:0], sz_req, 5'(words_req) << 2);
  end
  assign raddr_push = cmd_valid && !req_drop;

  // ---------------- response side ----------------
  logic       pend_pop;
  logic [2:0] n_send;
  logic [2:0] en_cnt;

  // the beats of the oldest read come from the queue of its ID
  logic [RQ_SEL_W-1:0] sel;
  logic                take;
  rdata_pkt_t          rbeat;
  assign sel    = head.id[RQ_SEL_W-1:0];
  assign rbeat  = rq_data[sel];
  assign take   = (state == S_ASSEMBLE) && (pend_cnt != 0) && !rq_empty[sel];
  assign rq_pop = take ? (NRQ'(1) << sel) : '0;

  always_comb begin
    logic [2:0] rem;
    en_cnt = '0;
    for (int p = 0; p < PHASES; p++)
      if (p < int'(nph) && dfi_rddata_en[p]) en_cnt = en_cnt + 3'd1;
    rem    = head.words - sent;
    n_send = rem;
    if (8'(n_send) > credits) n_send = 3'(credits);
    if (int'(n_send) > int'(nph)) n_send = 3'(nph);
    if (state != S_SEND) n_send = '0;
  end

  assign pend_pop = (state == S_SEND) && (sent + n_send == head.words);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_rd          <= '0;
      pend_wr          <= '0;
      pend_cnt         <= '0;
      state            <= S_ASSEMBLE;
      beat             <= '0;
      sent             <= '0;
      credits          <= '0;
      rdata_burst      <= '0;
      dfi_rddata       <= '0;
      dfi_rddata_valid <= '0;
      bursts           <= '0;
      err_pulse        <= 1'b0;
      for (int i = 0; i < PEND_DEPTH; i++) pend[i] <= '0;
    end else begin
      logic err;
      err = req_drop;
      if (raddr_push) begin
        pend[pend_wr] <= '{lane: cmd_addr[AXI_LANE_W-1:0], size: sz_req,
                           words: words_req, len: raddr_pkt.prm.len, id: ar_prm.id};
        pend_wr <= pend_wr + PW'(1);
      end
      pend_cnt <= pend_cnt + (PW+1)'(raddr_push) - (PW+1)'(pend_pop);
      credits  <= credits + 8'(en_cnt) - 8'(n_send);

      dfi_rddata_valid <= '0;
      case (state)
        S_ASSEMBLE: begin
          if (take) begin
            for (int j = 0; j < BURST_BYTES; j++) begin
              if (j < 4 * int'(head.words) &&
                  axi_beat_of(head.lane, head.size, 5'(j)) == beat) begin
                rdata_burst[j*8 +: 8] <= rbeat.data[(int'(head.lane) + j) % AXI_STRB_W * 8 +: 8];
              end
            end
            if (rbeat.resp != 2'b00 || rbeat.id != head.id) err = 1'b1;
            if (rbeat.last) begin
              if (beat != head.len) err = 1'b1;
              beat  <= '0;
              sent  <= '0;
              state <= S_SEND;
            end else begin
              if (beat == head.len) err = 1'b1;
              beat <= beat + 8'd1;
            end
          end
        end
        default: begin   // S_SEND
          for (int p = 0; p < PHASES; p++) begin
            if (p < int'(n_send)) begin
              dfi_rddata_valid[p] <= 1'b1;
              dfi_rddata[p]       <= rdata_burst[(int'(sent) + p) * DFI_DATA_W +: DFI_DATA_W];
            end
          end
          sent <= sent + n_send;
          if (pend_pop) begin
            pend_rd <= pend_rd + PW'(1);
            bursts  <= bursts + 16'd1;
            state   <= S_ASSEMBLE;
          end
        end
      endcase
      err_pulse <= err;
    end
  end

endmodule
