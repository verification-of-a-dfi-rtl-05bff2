// tb_axi_read_channel - self-checking test of the AXI read channel.
//
// Feeds read address packets, plays an AXI slave that answers each AR with
// ARLEN + 1 random beats after random gaps, and toggles the full flags of the
// sixteen read-data queues at random. Checks the AR fields, that each accepted R
// beat is pushed unchanged (data, ID, RESP, LAST, USER) and in order into the
// queue picked by RID[3:0] only, that RREADY is low whenever that queue is full
// (and not held low by the other queues), and that no second AR is issued before RLAST of the first.
module tb_axi_read_channel;
  import ddr_bridge_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic q_valid, q_pop;
  logic [NRQ-1:0] rq_full, rq_push;
  addr_pkt_t q_addr;
  rdata_pkt_t rq_data;
  logic [7:0] arid, arlen, rid, aruser, ruser;
  logic [63:0] araddr;
  logic [2:0] arsize, arprot;
  logic [1:0] arburst, rresp;
  logic arlock, arvalid, arready, rlast, rvalid, rready;
  logic [3:0] arcache, arqos, arregion;
  logic [511:0] rdata;
  logic [15:0] reads, stall_cycles;

  axi_read_channel dut (.clk, .rst_n, .q_valid, .q_addr, .q_pop, .rq_full, .rq_push, .rq_data,
    .m_axi_arid(arid), .m_axi_araddr(araddr), .m_axi_arlen(arlen), .m_axi_arsize(arsize),
    .m_axi_arburst(arburst), .m_axi_arlock(arlock), .m_axi_arcache(arcache),
    .m_axi_arprot(arprot), .m_axi_arqos(arqos), .m_axi_arregion(arregion),
    .m_axi_aruser(aruser), .m_axi_arvalid(arvalid), .m_axi_arready(arready),
    .m_axi_rid(rid), .m_axi_rdata(rdata), .m_axi_rresp(rresp), .m_axi_rlast(rlast),
    .m_axi_ruser(ruser), .m_axi_rvalid(rvalid), .m_axi_rready(rready),
    .reads, .stall_cycles);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  addr_pkt_t  exp_ar [$];
  rdata_pkt_t sent_beats [$];
  int outstanding = 0, pushed = 0, full_violations = 0, ar_count = 0, other_full_ready = 0;
  logic [7:0] cur_id = '0;
  logic [NRQ-1:0] used_q = '0;

  always @(negedge clk)
    for (int q = 0; q < NRQ; q++) rq_full[q] <= ($urandom_range(0, 3) == 0);

  always @(posedge clk) if (rst_n) begin
    if (rready && rq_full[cur_id[3:0]]) full_violations++;
    if (rready && rq_full != 0 && !rq_full[cur_id[3:0]]) other_full_ready++;
    if (arvalid && arready) begin
      addr_pkt_t e;
      e = exp_ar.pop_front();
      check(araddr == e.addr && arlen == e.prm.len && arsize == e.prm.size &&
            arid == e.prm.id && arqos == e.prm.qos && aruser == e.prm.user, "AR fields");
      check(outstanding == 0, "one read in flight");
      outstanding++; ar_count++; cur_id = arid;
    end
    if (rq_push != 0) begin
      check(rq_push == (NRQ'(1) << cur_id[3:0]), $sformatf("push into queue of RID %h", cur_id));
      used_q = used_q | rq_push;
      check(rq_data == sent_beats.pop_front(), $sformatf("beat %0d pushed unchanged", pushed));
      pushed++;
      if (rlast) outstanding--;
    end
  end

  // slave
  initial begin
    arready = 0; rvalid = 0; rdata = '0; rid = 0; rresp = 0; rlast = 0; ruser = 0;
    forever begin
      logic [7:0] len, id;
      @(negedge clk);
      arready = ($urandom_range(0, 1) == 0);
      @(posedge clk);
      if (arvalid && arready) begin
        len = arlen; id = arid;
        @(negedge clk); arready = 0;
        for (int k = 0; k <= int'(len); k++) begin
          repeat ($urandom_range(0, 2)) @(negedge clk);
          rvalid = 1; rid = id; rresp = 2'(k); rlast = (k == int'(len)); ruser = 8'(k + 7);
          for (int i = 0; i < 16; i++) rdata[i*32 +: 32] = $urandom;
          sent_beats.push_back('{user: ruser, last: rlast, resp: rresp, id: rid, data: rdata});
          do @(posedge clk); while (!rready);
          @(negedge clk); rvalid = 0; rlast = 0;
        end
      end
    end
  end

  initial begin
    q_valid = 0; q_addr = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      addr_pkt_t p;
      p = '0;
      p.addr = 64'h0100_0000 + 64'(t * 64);
      p.prm.len = 8'(t % 4); p.prm.size = 3'(t % 7); p.prm.burst = 1;
      p.prm.id = 8'(t); p.prm.qos = 4'(t); p.prm.user = 8'(255 - t);
      exp_ar.push_back(p);
      @(negedge clk); q_valid = 1; q_addr = p;
      do @(posedge clk); while (!q_pop);
      @(negedge clk); q_valid = 0;
    end
    while (reads != 16'd12) @(posedge clk);
    repeat (3) @(posedge clk);
    check(ar_count == 12, "12 reads issued");
    check(pushed == 30, /* sum over t of (t % 4) + 1 */ $sformatf("beats pushed %0d", pushed));
    check(full_violations == 0, "RREADY low while queue full");
    check(other_full_ready > 0, "RREADY high while only other queues were full");
    check($countones(used_q) >= 8, $sformatf("queues used %h", used_q));
    check(sent_beats.size() == 0, "every beat pushed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
