// tb_axi_write_channel - self-checking test of the AXI write channel.
//
// Feeds write bursts (1, 2 or 4 words; beat sizes of 4, 8 and 64 bytes; various
// start lanes; some strobes cleared) and plays an AXI slave with random
// AWREADY/WREADY stalls and a delayed B. The slave writes each accepted W beat into
// a byte memory using WSTRB; afterwards every byte of every burst is compared with
// what was sent (strobed bytes written, others untouched). Also checks the beat
// count against AWLEN, WLAST, the AW fields and the error flag on SLVERR.
module tb_axi_write_channel;
  import ddr_bridge_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic q_valid, q_pop;
  addr_pkt_t q_addr;
  wdata_pkt_t q_data;
  logic [7:0] awid, awlen, bid;
  logic [63:0] awaddr;
  logic [2:0] awsize, awprot;
  logic [1:0] awburst, bresp;
  logic awlock, awvalid, awready, wlast, wvalid, wready, bvalid, bready, err_pulse;
  logic [3:0] awcache, awqos, awregion;
  logic [7:0] awuser;
  logic [511:0] wdata;
  logic [63:0] wstrb;
  logic [15:0] writes;

  axi_write_channel dut (.clk, .rst_n, .q_valid, .q_addr, .q_data, .q_pop,
    .m_axi_awid(awid), .m_axi_awaddr(awaddr), .m_axi_awlen(awlen), .m_axi_awsize(awsize),
    .m_axi_awburst(awburst), .m_axi_awlock(awlock), .m_axi_awcache(awcache),
    .m_axi_awprot(awprot), .m_axi_awqos(awqos), .m_axi_awregion(awregion),
    .m_axi_awuser(awuser), .m_axi_awvalid(awvalid), .m_axi_awready(awready),
    .m_axi_wdata(wdata), .m_axi_wstrb(wstrb), .m_axi_wlast(wlast), .m_axi_wvalid(wvalid),
    .m_axi_wready(wready), .m_axi_bid(bid), .m_axi_bresp(bresp), .m_axi_bvalid(bvalid),
    .m_axi_bready(bready), .writes, .err_pulse);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // byte memory of the slave (sparse)
  logic [7:0] mem [logic [63:0]];

  // slave: AW and W accepted with random stalls
  logic [63:0] cur_addr;
  logic [2:0]  cur_size;
  logic [7:0]  cur_len;
  int beats_seen = 0, errs = 0;
  bit aw_seen = 0, w_last_seen = 0;
  logic [1:0] resp_to_give = 2'b00;
  always @(negedge clk) begin
    awready <= ($urandom_range(0, 2) == 0);
    wready  <= ($urandom_range(0, 1) == 0);
  end
  always @(posedge clk) if (rst_n) begin
    errs += err_pulse;
    if (awvalid && awready) begin
      aw_seen = 1; cur_addr = awaddr; cur_size = awsize; cur_len = awlen;
      check(awburst == 2'b01 && awid == 8'h21 && awcache == 4'h2 && awprot == 3'h1,
            "AW fields");
    end
    if (wvalid && wready) begin
      for (int l = 0; l < 64; l++) if (wstrb[l]) begin
        // byte address of lane l in this beat
        logic [63:0] ba;
        ba = {awaddr[63:6], 6'(l)};
        mem[ba] = wdata[l*8 +: 8];
      end
      check(wlast == (beats_seen == int'(awlen)), "WLAST on beat AWLEN");
      beats_seen++;
      if (wlast) w_last_seen = 1;
    end
  end

  // B after both AW and the last W beat
  initial begin
    bvalid = 0; bresp = 0; bid = 0;
    forever begin
      @(posedge clk);
      if (aw_seen && w_last_seen) begin
        repeat ($urandom_range(0, 3)) @(posedge clk);
        @(negedge clk); bvalid = 1; bresp = resp_to_give; bid = 8'h21;
        do @(posedge clk); while (!bready);
        @(negedge clk); bvalid = 0;
        aw_seen = 0; w_last_seen = 0;
      end
    end
  end

  // send one burst and check memory afterwards
  task automatic burst(logic [63:0] a, logic [2:0] size, int nw, logic [15:0] strb);
    addr_pkt_t p; wdata_pkt_t d;
    int w0, nb, elen;
    w0 = int'(writes); nb = 4 * nw;
    p = '0; p.addr = a; p.prm.size = size; p.prm.burst = 1; p.prm.id = 8'h21;
    p.prm.cache = 4'h2; p.prm.prot = 3'h1;
    elen = ((int'(a[5:0]) + nb - 1) >> size) - (int'(a[5:0]) >> size);
    p.prm.len = 8'(elen);
    d = '0;
    for (int j = 0; j < 16; j++) d.data[j*8 +: 8] = 8'($urandom);
    for (int j = 0; j < nb; j++) d.strb[j] = strb[j];
    for (int j = 0; j < nb; j++) mem[a + 64'(j)] = 8'hee;   // marker
    beats_seen = 0;
    @(negedge clk); q_valid = 1; q_addr = p; q_data = d;
    do @(posedge clk); while (!q_pop);
    @(negedge clk); q_valid = 0;
    while (writes == 16'(w0)) @(posedge clk);
    check(beats_seen == elen + 1, $sformatf("beats %0d exp %0d", beats_seen, elen + 1));
    for (int j = 0; j < nb; j++) begin
      logic [7:0] e;
      e = d.strb[j] ? d.data[j*8 +: 8] : 8'hee;
      check(mem[a + 64'(j)] == e, $sformatf("byte %0d of burst at %h", j, a));
    end
  endtask

  initial begin
    q_valid = 0; q_addr = '0; q_data = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    burst(64'h0100_0000, 3, 4, 16'hffff);   // BL8, 8-byte beats: 2 beats
    burst(64'h0100_0030, 3, 4, 16'hfdff);   // BL8 crossing into the next 8-byte beat
    burst(64'h0100_0038, 3, 2, 16'h00ff);   // BC4
    burst(64'h0100_0044, 2, 1, 16'h000e);   // single word, 4-byte beat
    burst(64'h0100_0010, 6, 4, 16'hffff);   // one full-bus beat
    burst(64'h0100_0040, 2, 4, 16'hff0f);   // four 4-byte beats
    resp_to_give = 2'b10;
    burst(64'h0200_0000, 3, 2, 16'h00ff);
    repeat (3) @(posedge clk);
    check(errs == 1, $sformatf("SLVERR flagged %0d", errs));
    check(writes == 16'd7, "write counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
