// tb_read_fsm - self-checking test of the DFI read path.
//
// Issues RD commands of the three burst types at 1:1 and 1:4, checks each read
// address packet (address, ARLEN, ARSIZE, ARBURST, ID), answers it from a memory
// model through a model of the sixteen read-data queues (every R beat carries the whole
// 64-byte bus line of its beat address), raises dfi_rddata_en for the expected
// number of words and compares the returned dfi_rddata words, in order, with the
// memory contents at the read address. Also checks that no word is returned
// before dfi_rddata_en grants it, that four words leave in one cycle at 1:4, and
// that a non-OKAY response is reported.
module tb_read_fsm;
  import ddr_bridge_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] freq_ratio;
  axi_param_t ar_prm;
  logic cmd_valid;
  logic [63:0] cmd_addr;
  burst_e cmd_burst;
  logic raddr_full, raddr_push;
  addr_pkt_t raddr_pkt;
  logic [NRQ-1:0] rq_empty, rq_pop;
  rdata_pkt_t [NRQ-1:0] rq_data;
  logic [PHASES-1:0] rd_en;
  logic [PHASES-1:0][31:0] rdata;
  logic [PHASES-1:0] rvalid;
  logic [127:0] rdata_burst;
  logic [15:0] bursts;
  logic err_pulse;

  read_fsm dut (.clk, .rst_n, .freq_ratio, .ar_prm, .cmd_valid, .cmd_addr, .cmd_burst,
    .raddr_full, .raddr_push, .raddr_pkt, .rq_empty, .rq_data, .rq_pop,
    .dfi_rddata_en(rd_en), .dfi_rddata(rdata), .dfi_rddata_valid(rvalid),
    .rdata_burst, .bursts, .err_pulse);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] mem(logic [63:0] a);
    return a[7:0] ^ (a[15:8] * 8'd3) ^ 8'h5a;
  endfunction

  // model of the sixteen read-data queues (selected by RID[3:0])
  rdata_pkt_t rq [NRQ][$];
  logic [NRQ-1:0] popped = '0;
  always_comb
    for (int q = 0; q < NRQ; q++) begin
      rq_empty[q] = (rq[q].size() == 0);
      rq_data[q]  = rq_empty[q] ? '0 : rq[q][0];
    end
  always @(posedge clk)
    for (int q = 0; q < NRQ; q++) if (rq_pop[q] && !rq_empty[q]) begin
      void'(rq[q].pop_front());
      popped[q] = 1'b1;
    end

  // AXI slave model: answer each address packet with ARLEN+1 beats
  logic [1:0] next_resp = 2'b00;
  logic [7:0] id_flip = 8'h00;
  always @(posedge clk) if (raddr_push) begin
    addr_pkt_t p;
    logic [63:0] ak;
    p = raddr_pkt;
    for (int k = 0; k <= int'(p.prm.len); k++) begin
      rdata_pkt_t b;
      ak = (k == 0) ? p.addr : ((p.addr >> p.prm.size) << p.prm.size) + 64'(k << p.prm.size);
      b = '0;
      for (int l = 0; l < 64; l++) b.data[l*8 +: 8] = mem({ak[63:6], 6'(l)});
      b.id = p.prm.id ^ id_flip; b.last = (k == int'(p.prm.len)); b.resp = next_resp;
      rq[p.prm.id[3:0]].push_back(b);
    end
  end

  // expected DFI words
  logic [31:0] expw [$];
  int got = 0, errs = 0, early = 0, max_per_cycle = 0;
  int credits = 0;
  always @(posedge clk) if (rst_n) begin
    int n;
    n = 0;
    errs += err_pulse;
    for (int p = 0; p < PHASES; p++) begin
      if (rvalid[p]) begin
        n++; got++;
        if (expw.size() == 0) check(0, "unexpected word");
        else begin
          logic [31:0] e;
          e = expw.pop_front();
          check(rdata[p] == e, $sformatf("word %h exp %h", rdata[p], e));
        end
      end
    end
    credits -= n;
    if (credits < 0) early++;
    if (n > max_per_cycle) max_per_cycle = n;
    for (int p = 0; p < PHASES; p++) credits += rd_en[p];
  end

  task automatic rd(logic [63:0] a, burst_e b);
    int nw;
    nw = (b == BURST_8) ? 4 : (b == BURST_4) ? 2 : 1;
    for (int i = 0; i < nw; i++)
      expw.push_back({mem(a + 64'(4*i+3)), mem(a + 64'(4*i+2)), mem(a + 64'(4*i+1)), mem(a + 64'(4*i))});
    @(negedge clk); cmd_valid = 1; cmd_addr = a; cmd_burst = b;
    #1;
    begin
      int lane, elen;
      lane = int'(a[5:0]);
      elen = ((lane + 4*nw - 1) >> 3) - (lane >> 3);
      check(raddr_push, "address pushed");
      check(raddr_pkt.addr == a && raddr_pkt.prm.len == 8'(elen) && raddr_pkt.prm.size == 3 &&
            raddr_pkt.prm.burst == 1 && raddr_pkt.prm.id == ar_prm.id,
            $sformatf("ar packet addr %h len %0d", raddr_pkt.addr, raddr_pkt.prm.len));
    end
    @(negedge clk); cmd_valid = 0;
  endtask

  // assert rddata_en for nw words, nph per cycle, after a delay
  task automatic en_words(int nph, int nw, int delay);
    repeat (delay) @(negedge clk);
    while (nw > 0) begin
      @(negedge clk); rd_en = '0;
      for (int p = 0; p < nph && nw > 0; p++) begin rd_en[p] = 1; nw--; end
    end
    @(negedge clk); rd_en = '0;
  endtask

  initial begin
    ar_prm = '0; ar_prm.size = 3; ar_prm.len = 1; ar_prm.burst = 1; ar_prm.id = 8'h0e;
    freq_ratio = 0; cmd_valid = 0; cmd_addr = 0; cmd_burst = BURST_8;
    raddr_full = 0; rd_en = '0;
    repeat (2) @(posedge clk); rst_n = 1;

    // 1:1 BL8: data must wait for rddata_en, which comes late
    rd(64'h0100_0000, BURST_8);
    repeat (10) @(posedge clk);
    check(got == 0, "nothing sent before dfi_rddata_en");
    en_words(1, 4, 0);
    repeat (4) @(posedge clk);
    check(got == 4, $sformatf("BL8 words %0d", got));
    check(rdata_burst[31:0] == {mem(64'h0100_0003), mem(64'h0100_0002), mem(64'h0100_0001), mem(64'h0100_0000)},
          "RDATA register low word");
    // BC4 and single at unaligned 8-byte lanes
    rd(64'h0100_0038, BURST_4);
    en_words(1, 2, 2);
    rd(64'h0100_0024, BURST_1);
    en_words(1, 1, 2);
    repeat (10) @(posedge clk);
    check(got == 7, $sformatf("words after BC4+single %0d", got));

    // 1:4: two BL8 back to back, four words per cycle
    freq_ratio = 2;
    rd(64'h0200_0030, BURST_8);
    ar_prm.id = 8'h03;                    // second read answered through queue 3
    rd(64'h0200_0040, BURST_8);
    en_words(4, 8, 3);
    repeat (10) @(posedge clk);
    check(got == 15, $sformatf("words after 1:4 %0d", got));
    check(max_per_cycle == 4, $sformatf("max words per cycle %0d", max_per_cycle));

    // error response is flagged
    freq_ratio = 0;
    next_resp = 2'b10;
    rd(64'h0300_0000, BURST_4);
    en_words(1, 2, 1);
    repeat (10) @(posedge clk);
    check(errs == 1, $sformatf("error pulses %0d", errs));
    check(got == 17, "words of failed read still returned");
    // a beat in the right queue but with the wrong RID is flagged
    next_resp = 2'b00; id_flip = 8'h40;
    rd(64'h0300_0040, BURST_1);
    en_words(1, 1, 1);
    repeat (10) @(posedge clk);
    check(errs == 2, $sformatf("error pulses after wrong RID %0d", errs));
    check(got == 18, "word of the wrong-RID read returned");
    check(popped == 16'h4008, $sformatf("queues used %h (14 and 3)", popped));
    check(early == 0, "no word before its dfi_rddata_en");
    check(expw.size() == 0, "all expected words seen");
    check(bursts == 16'd7, "burst counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
