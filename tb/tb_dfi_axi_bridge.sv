// tb_dfi_axi_bridge - end-to-end self-checking test of the whole bridge at its
// default size.
//
// The testbench plays three parts around the bridge:
//   * a DDR4 memory controller on DFI (10 ns clock): initialization and
//     frequency-ratio changes through dfi_init_start, MRS/ZQ/REF/PRE/ACT commands,
//     WR/WRA with write data and masks, RD/RDA with dfi_rddata_en, controller
//     update and low-power requests, acknowledges of PHY update / PHY master;
//   * an AXI slave memory (8 ns clock) with random ready/valid delays that keeps
//     a byte array, honours write strobes and answers reads with the whole 64-byte
//     bus line of each beat address;
//   * a configuration host on the message port (13 ns clock) that writes the
//     registers and reads status words back.
// An independent model computes, from the DFI commands alone, the AXI byte address
// of every burst and the expected memory contents; every returned dfi_rddata word
// is compared with it. The test runs write and read batches in every burst mode
// (BL8, on-the-fly, BC4, single) at the 1:1, 1:2 and 1:4 ratios, giving each batch
// a new ARID so that twelve of the sixteen per-ID read-data queues carry data,
// fills a read-data queue so that RREADY must drop, and steps the interaction state machine through
// all of its request states. Each mechanism is counted, and a mechanism that never
// happened is a failure. A watchdog ends a hung run.
module tb_dfi_axi_bridge;
  import ddr_bridge_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic dfi_clk = 0, axi_clk = 0, scemi_clk = 0;
  logic dfi_rst_n = 0, axi_rst_n = 0, scemi_rst_n = 0;
  always #5   dfi_clk = ~dfi_clk;
  always #4   axi_clk = ~axi_clk;
  always #6.5 scemi_clk = ~scemi_clk;

  // ---------------- DUT ----------------
  logic [PHASES-1:0] cs_n, act_n, ras_n, cas_n, we_n, cke, reset_n;
  logic [PHASES-1:0][DFI_ADDR_W-1:0] address;
  logic [PHASES-1:0][BA_W-1:0] bank;
  logic [PHASES-1:0][BG_W-1:0] bg;
  logic [PHASES-1:0] wrdata_en, rddata_en, rddata_valid;
  logic [PHASES-1:0][DFI_DATA_W-1:0] wrdata, rddata;
  logic [PHASES-1:0][DFI_MASK_W-1:0] wrdata_mask;
  logic ctrlupd_req, ctrlupd_ack, phyupd_req, phyupd_ack, phymstr_req, phymstr_ack;
  logic [1:0] phyupd_type, freq_ratio;
  logic init_start, init_complete, lp_ctrl_req, lp_data_req, lp_ctrl_ack, lp_data_ack;

  logic [7:0] awid, awlen, awuser, arid, arlen, aruser, bid, rid, ruser;
  logic [63:0] awaddr, araddr;
  logic [2:0] awsize, awprot, arsize, arprot;
  logic [1:0] awburst, arburst, bresp, rresp;
  logic awlock, arlock, awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rlast, rvalid, rready;
  logic [3:0] awcache, awqos, awregion, arcache, arqos, arregion;
  logic [511:0] wdata, rdata;
  logic [63:0] wstrb;

  logic msg_in_valid, msg_in_ready, msg_out_valid, msg_out_ready;
  logic [39:0] msg_in_data, msg_out_data;
  interaction_e ia_state;
  logic [15:0] axi_writes, axi_reads;
  logic axi_err;

  dfi_axi_bridge dut (
    .dfi_clk, .dfi_rst_n, .axi_clk, .axi_rst_n, .scemi_clk, .scemi_rst_n,
    .dfi_cs_n(cs_n), .dfi_act_n(act_n), .dfi_ras_n(ras_n), .dfi_cas_n(cas_n),
    .dfi_we_n(we_n), .dfi_address(address), .dfi_bank(bank), .dfi_bg(bg),
    .dfi_cke(cke), .dfi_reset_n(reset_n),
    .dfi_wrdata_en(wrdata_en), .dfi_wrdata(wrdata), .dfi_wrdata_mask(wrdata_mask),
    .dfi_rddata_en(rddata_en), .dfi_rddata(rddata), .dfi_rddata_valid(rddata_valid),
    .dfi_ctrlupd_req(ctrlupd_req), .dfi_ctrlupd_ack(ctrlupd_ack),
    .dfi_phyupd_req(phyupd_req), .dfi_phyupd_type(phyupd_type), .dfi_phyupd_ack(phyupd_ack),
    .dfi_phymstr_req(phymstr_req), .dfi_phymstr_ack(phymstr_ack),
    .dfi_init_start(init_start), .dfi_freq_ratio(freq_ratio),
    .dfi_init_complete(init_complete), .dfi_lp_ctrl_req(lp_ctrl_req),
    .dfi_lp_data_req(lp_data_req), .dfi_lp_ctrl_ack(lp_ctrl_ack), .dfi_lp_data_ack(lp_data_ack),
    .m_axi_awid(awid), .m_axi_awaddr(awaddr), .m_axi_awlen(awlen), .m_axi_awsize(awsize),
    .m_axi_awburst(awburst), .m_axi_awlock(awlock), .m_axi_awcache(awcache),
    .m_axi_awprot(awprot), .m_axi_awqos(awqos), .m_axi_awregion(awregion),
    .m_axi_awuser(awuser), .m_axi_awvalid(awvalid), .m_axi_awready(awready),
    .m_axi_wdata(wdata), .m_axi_wstrb(wstrb), .m_axi_wlast(wlast), .m_axi_wvalid(wvalid),
    .m_axi_wready(wready), .m_axi_bid(bid), .m_axi_bresp(bresp), .m_axi_bvalid(bvalid),
    .m_axi_bready(bready),
    .m_axi_arid(arid), .m_axi_araddr(araddr), .m_axi_arlen(arlen), .m_axi_arsize(arsize),
    .m_axi_arburst(arburst), .m_axi_arlock(arlock), .m_axi_arcache(arcache),
    .m_axi_arprot(arprot), .m_axi_arqos(arqos), .m_axi_arregion(arregion),
    .m_axi_aruser(aruser), .m_axi_arvalid(arvalid), .m_axi_arready(arready),
    .m_axi_rid(rid), .m_axi_rdata(rdata), .m_axi_rresp(rresp), .m_axi_rlast(rlast),
    .m_axi_ruser(ruser), .m_axi_rvalid(rvalid), .m_axi_rready(rready),
    .msg_in_valid, .msg_in_ready, .msg_in_data, .msg_out_valid, .msg_out_ready, .msg_out_data,
    .interaction_state(ia_state), .axi_writes, .axi_reads, .axi_err);

  // ---------------- checking ----------------
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #3ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // initial memory contents, shared by the AXI memory and the expectation model
  function automatic logic [7:0] init_byte(logic [63:0] a);
    return a[7:0] ^ (a[15:8] * 8'd3) ^ 8'h5a;
  endfunction

  // ---------------- AXI slave memory ----------------
  logic [7:0] mem [logic [63:0]];
  function automatic logic [7:0] mem_rd(logic [63:0] a);
    return mem.exists(a) ? mem[a] : init_byte(a);
  endfunction
  function automatic logic [63:0] beat_addr(logic [63:0] a, logic [2:0] size, int i);
    logic [63:0] al;
    al = (a >> size) << size;
    return (i == 0) ? a : al + 64'(i << size);
  endfunction

  int aw_stall = 0, ar_stall = 0, r_backpressure = 0, w_beats = 0, r_beats = 0;
  always @(posedge axi_clk) if (axi_rst_n) begin
    if (awvalid && !awready) aw_stall++;
    if (arvalid && !arready) ar_stall++;
    if (rvalid && !rready) r_backpressure++;
  end

  initial begin : axi_wr_slave
    awready = 0; wready = 0; bvalid = 0; bid = 0; bresp = 0;
    forever begin
      logic [63:0] a; logic [7:0] len, id; logic [2:0] size;
      @(negedge axi_clk);
      awready = ($urandom_range(0, 2) == 0);
      @(posedge axi_clk);
      if (awvalid && awready) begin
        a = awaddr; len = awlen; id = awid; size = awsize;
        check(awburst == 2'd1, "AWBURST INCR");
        @(negedge axi_clk); awready = 0;
        for (int i = 0; i <= int'(len); i++) begin
          logic [63:0] ba;
          repeat ($urandom_range(0, 2)) @(negedge axi_clk);
          wready = 1;
          do @(posedge axi_clk); while (!wvalid);
          ba = beat_addr(a, size, i);
          for (int k = 0; k < 64; k++)
            if (wstrb[k]) mem[{ba[63:6], 6'(k)}] = wdata[k*8 +: 8];
          check(wlast == (i == int'(len)), "WLAST on the last beat only");
          w_beats++;
          @(negedge axi_clk); wready = 0;
        end
        repeat ($urandom_range(0, 2)) @(negedge axi_clk);
        bvalid = 1; bid = id; bresp = 0;
        do @(posedge axi_clk); while (!bready);
        @(negedge axi_clk); bvalid = 0;
      end
    end
  end

  logic [7:0] exp_arid = 8'h00;
  logic [15:0] arid_seen = '0;
  initial begin : axi_rd_slave
    arready = 0; rvalid = 0; rdata = '0; rid = 0; rresp = 0; rlast = 0; ruser = 0;
    forever begin
      logic [63:0] a; logic [7:0] len, id; logic [2:0] size;
      @(negedge axi_clk);
      arready = ($urandom_range(0, 2) == 0);
      @(posedge axi_clk);
      if (arvalid && arready) begin
        a = araddr; len = arlen; id = arid; size = arsize;
        check(arid == exp_arid, $sformatf("ARID %h from the AR parameter word", arid));
        arid_seen[arid[3:0]] = 1'b1;
        check(arburst == 2'd1, "ARBURST INCR");
        @(negedge axi_clk); arready = 0;
        for (int i = 0; i <= int'(len); i++) begin
          logic [63:0] ba;
          repeat ($urandom_range(0, 2)) @(negedge axi_clk);
          ba = beat_addr(a, size, i);
          for (int k = 0; k < 64; k++) rdata[k*8 +: 8] = mem_rd({ba[63:6], 6'(k)});
          rvalid = 1; rid = id; rresp = 0; rlast = (i == int'(len)); ruser = 0;
          do @(posedge axi_clk); while (!rready);
          r_beats++;
          @(negedge axi_clk); rvalid = 0; rlast = 0;
        end
      end
    end
  end

  // ---------------- message host ----------------
  logic [39:0] msg_got [$];
  always @(posedge scemi_clk) if (scemi_rst_n && msg_out_valid && msg_out_ready)
    msg_got.push_back(msg_out_data);

  task automatic msg_send(logic [7:0] idx, logic [31:0] v);
    @(negedge scemi_clk); msg_in_valid = 1; msg_in_data = {idx, v};
    do @(posedge scemi_clk); while (!msg_in_ready);
    @(negedge scemi_clk); msg_in_valid = 0;
  endtask

  task automatic status_read(logic [2:0] i, output logic [31:0] v);
    msg_got.delete();
    msg_send({5'b10000, i}, 0);
    while (msg_got.size() == 0) @(posedge scemi_clk);
    check(msg_got[0][39:32] == {5'b10000, i}, "status answer index");
    v = msg_got[0][31:0];
  endtask

  logic [31:0] ctrl_reg = 0;
  task automatic set_ctrl(logic [31:0] v);
    ctrl_reg = v;
    msg_send(8'h00, v);
    repeat (8) @(posedge dfi_clk);     // let the value cross into the DFI clock
  endtask

  // ---------------- DFI controller model ----------------
  int nph = 1;
  logic [63:0] base = 64'h0000_0002_4000_0000;
  burst_mode_e bmode = BMODE_BL8;

  // open rows as the controller sees them
  logic [15:0] open_v = 0;
  logic [16:0] open_row [16];

  // expected memory (what the DFI traffic has written)
  logic [7:0] exp_mem [logic [63:0]];
  function automatic logic [7:0] exp_rd(logic [63:0] a);
    return exp_mem.exists(a) ? exp_mem[a] : init_byte(a);
  endfunction

  task automatic idle_cmd();
    cs_n = '1; act_n = '1; ras_n = '1; cas_n = '1; we_n = '1;
  endtask

  // one command on a random live phase; the other phases deselect
  task automatic issue(logic a_n, logic r_n, logic c_n, logic w_n, logic [31:0] ad,
                       logic [1:0] g, logic [1:0] b);
    int p;
    p = $urandom_range(0, nph - 1);
    @(negedge dfi_clk);
    idle_cmd();
    cs_n[p] = 0; act_n[p] = a_n; ras_n[p] = r_n; cas_n[p] = c_n; we_n[p] = w_n;
    address[p] = ad; bank[p] = b; bg[p] = g;
    @(negedge dfi_clk);
    idle_cmd();
    address = '0;
    // DDR4 command spacing: one idle DFI cycle between commands
  endtask

  int n_act = 0, n_pre = 0, n_ref = 0, n_mz = 0;

  task automatic cmd_pre(logic [1:0] g, logic [1:0] b);
    issue(1, 0, 1, 0, 32'h0, g, b);
    open_v[{g, b}] = 0; n_pre++;
  endtask
  task automatic cmd_prea();
    issue(1, 0, 1, 0, 32'h400, 0, 0);
    open_v = 0; n_pre++;
  endtask
  task automatic cmd_act(logic [1:0] g, logic [1:0] b, logic [16:0] row);
    issue(0, row[16], row[15], row[14], {17'd0, row[14:0]}, g, b);
    open_v[{g, b}] = 1; open_row[{g, b}] = row; n_act++;
  endtask
  task automatic open_bank(logic [1:0] g, logic [1:0] b, logic [16:0] row);
    if (open_v[{g, b}] && open_row[{g, b}] == row) return;
    if (open_v[{g, b}]) cmd_pre(g, b);
    cmd_act(g, b, row);
  endtask

  function automatic burst_e pick_burst(logic bc_n);
    case (bmode)
      BMODE_BL8:    return BURST_8;
      BMODE_BC4:    return BURST_4;
      BMODE_SINGLE: return BURST_1;
      default:      return bc_n ? BURST_8 : BURST_4;
    endcase
  endfunction

  function automatic logic [63:0] model_addr(logic [16:0] row, logic [1:0] g, logic [1:0] b,
                                             logic [9:0] col, burst_e bt);
    logic [9:0] c;
    c = col;
    if (bt == BURST_8) c[2:0] = 0;
    else if (bt == BURST_4) c[1:0] = 0;
    else c[0] = 0;
    return base + 64'({row, g, b, c}) * 2;
  endfunction

  // write data and read-enable streams, driven in the background
  logic [31:0] wr_words [$];
  logic [3:0]  wr_masks [$];
  int rd_credit = 0;
  bit hold_rd_en = 0;
  logic [31:0] exp_words [$];
  int got_words = 0;

  always @(negedge dfi_clk) begin
    wrdata_en <= '0; wrdata <= '0; wrdata_mask <= '0; rddata_en <= '0;
    for (int p = 0; p < nph; p++) begin
      if (wr_words.size() != 0) begin
        wrdata_en[p] <= 1; wrdata[p] <= wr_words.pop_front(); wrdata_mask[p] <= wr_masks.pop_front();
      end
      if (!hold_rd_en && rd_credit != 0) begin
        rddata_en[p] <= 1; rd_credit--;
      end
    end
  end

  int bad_phase = 0;
  always @(posedge dfi_clk) if (dfi_rst_n) begin
    for (int p = 0; p < PHASES; p++) if (rddata_valid[p]) begin
      if (p >= nph) bad_phase++;
      if (exp_words.size() == 0) begin
        check(0, "unexpected read word");
      end else begin
        logic [31:0] e;
        e = exp_words.pop_front();
        check(rddata[p] == e, $sformatf("read word %0d: got %h exp %h", got_words, rddata[p], e));
        got_words++;
      end
    end
  end

  typedef struct { logic [16:0] row; logic [1:0] g, b; logic [9:0] col; logic bc_n; } loc_t;
  loc_t written [$];
  int n_wr_bt [3], n_rd_bt [3], n_wr = 0, n_rd = 0, n_rd_ratio [3];

  task automatic do_write(loc_t l, bit ap);
    burst_e bt; logic [63:0] a; int n;
    open_bank(l.g, l.b, l.row);
    bt = pick_burst(l.bc_n);
    a = model_addr(l.row, l.g, l.b, l.col, bt);
    n = int'(burst_words(bt));
    issue(1, 1, 0, 0, {19'd0, l.bc_n, 1'b0, ap, l.col}, l.g, l.b);
    if (ap) open_v[{l.g, l.b}] = 0;
    for (int w = 0; w < n; w++) begin
      logic [31:0] d; logic [3:0] m;
      d = $urandom;
      m = ($urandom_range(0, 3) == 0) ? 4'($urandom) : 4'h0;
      for (int i = 0; i < 4; i++) if (!m[i]) exp_mem[a + 64'(4 * w + i)] = d[i*8 +: 8];
      wr_words.push_back(d); wr_masks.push_back(m);
    end
    while (wr_words.size() != 0) @(posedge dfi_clk);
    n_wr_bt[bt]++; n_wr++;
    written.push_back(l);
  endtask

  task automatic do_read(loc_t l, bit ap, bit grant);
    burst_e bt; logic [63:0] a; int n;
    open_bank(l.g, l.b, l.row);
    bt = pick_burst(l.bc_n);
    a = model_addr(l.row, l.g, l.b, l.col, bt);
    n = int'(burst_words(bt));
    issue(1, 1, 0, 1, {19'd0, l.bc_n, 1'b0, ap, l.col}, l.g, l.b);
    if (ap) open_v[{l.g, l.b}] = 0;
    for (int w = 0; w < n; w++)
      exp_words.push_back({exp_rd(a + 64'(4*w+3)), exp_rd(a + 64'(4*w+2)),
                           exp_rd(a + 64'(4*w+1)), exp_rd(a + 64'(4*w))});
    if (grant) rd_credit += n;
    n_rd_bt[bt]++; n_rd++;
    n_rd_ratio[nph == 1 ? 0 : nph == 2 ? 1 : 2]++;
  endtask

  function automatic loc_t rand_loc();
    loc_t l;
    l.row = 17'($urandom); l.g = 2'($urandom); l.b = 2'($urandom);
    l.col = 10'($urandom); l.bc_n = 1'($urandom);
    // keep a few rows so that bursts land in open rows as well
    if ($urandom_range(0, 1) == 0) l.row = 17'($urandom_range(0, 3));
    return l;
  endfunction

  task automatic wait_reads_done(int limit);
    int t = 0;
    while ((exp_words.size() != 0 || rd_credit != 0) && t < limit) begin
      @(posedge dfi_clk); t++;
    end
    check(exp_words.size() == 0, $sformatf("all read words returned (%0d left)", exp_words.size()));
  endtask

  task automatic wait_writes_done(int limit);
    int t = 0;
    while (int'(axi_writes) != n_wr && t < limit) begin
      @(posedge dfi_clk); t++;
    end
    check(int'(axi_writes) == n_wr, $sformatf("AXI writes %0d of %0d", axi_writes, n_wr));
  endtask

  // one batch: writes, drain, reads of the written bursts and of fresh addresses
  task automatic batch(int nw);
    loc_t ls [$];
    written.delete();
    for (int i = 0; i < nw; i++) do_write(rand_loc(), $urandom_range(0, 3) == 0);
    wait_writes_done(4000);
    ls = written;
    foreach (ls[i]) do_read(ls[i], $urandom_range(0, 3) == 0, 1);
    for (int i = 0; i < 2; i++) do_read(rand_loc(), 0, 1);
    wait_reads_done(6000);
  endtask

  // initialization handshake (also a frequency-ratio change)
  int n_init = 0, n_ratio_change = 0;
  task automatic init_handshake(logic [1:0] r);
    int t = 0;
    @(negedge dfi_clk);
    init_start = 1; freq_ratio = r;
    while (init_complete && t < 100) begin @(posedge dfi_clk); t++; end
    check(!init_complete, "init_complete drops after init_start");
    t = 0;
    while (!init_complete && t < 1000) begin @(posedge dfi_clk); t++; end
    check(init_complete, "init_complete rises again");
    @(negedge dfi_clk);
    init_start = 0;
    if (nph != (1 << r)) n_ratio_change++;
    nph = 1 << r;
    n_init++;
    repeat (4) @(posedge dfi_clk);
  endtask

  // AR parameter word 0 with a new ARID; RID[3:0] picks the read-data queue
  task automatic set_arid(logic [7:0] id);
    exp_arid = id;
    msg_send(8'h08, 32'h0434_0000 | 32'(id));
    repeat (8) @(posedge dfi_clk);
  endtask

  task automatic set_mode(burst_mode_e m);
    bmode = m;
    set_ctrl({ctrl_reg[31:2], 2'(m)});
  endtask

  // interaction state coverage
  bit [15:0] ia_seen = 0;
  int n_ctrlupd_ack = 0, n_lp_ack = 0;
  always @(posedge dfi_clk) if (dfi_rst_n) begin
    ia_seen[ia_state] = 1'b1;
    if (ctrlupd_ack) n_ctrlupd_ack++;
    if (lp_ctrl_ack && lp_data_ack) n_lp_ack++;
    if (ctrlupd_ack) check(ia_state == UPD_REQ, "ctrlupd_ack only in UPD_REQ");
  end

  task automatic wait_state(interaction_e s, string what);
    int t = 0;
    while (ia_state != s && t < 50) begin @(posedge dfi_clk); t++; end
    check(ia_state == s, what);
  endtask

  // ---------------- main sequence ----------------
  int n_mode_change = 0, n_rq_full = 0;
  logic [31:0] st;

  initial begin
    idle_cmd(); address = '0; bank = '0; bg = '0; cke = '1; reset_n = '1;
    ctrlupd_req = 0; phyupd_ack = 0; phymstr_ack = 0; init_start = 0; freq_ratio = 0;
    lp_ctrl_req = 0; lp_data_req = 0; msg_in_valid = 0; msg_in_data = 0; msg_out_ready = 1;
    #33 dfi_rst_n = 1; axi_rst_n = 1; scemi_rst_n = 1;

    // configuration
    msg_send(8'h01, 32'd24);                  // T_INIT
    msg_send(8'h02, base[31:0]);
    msg_send(8'h03, base[63:32]);
    set_ctrl(32'h0);

    // initialization at 1:1, then mode register set and ZQ calibration
    init_handshake(2'd0);
    issue(1, 0, 0, 0, 32'h0000_0d50, 0, 0); n_mz++;     // MRS
    issue(1, 1, 1, 0, 32'h0000_0400, 0, 0); n_mz++;     // ZQCL
    status_read(0, st);
    check(st[5:4] == 2'd0 && st[6] && st[31:16] == 16'd1, $sformatf("status 0 after init %h", st));

    // traffic in every burst mode at every ratio
    for (int r = 0; r < 3; r++) begin
      if (r == 1) begin
        // ratio change under a PHY update: PHYUPD_INITSTART_REQ
        set_ctrl(ctrl_reg | 32'h14);                    // phyupd_req, type 1
        check(phyupd_req && phyupd_type == 2'd1, "dfi_phyupd_req / type from CTRL");
        @(negedge dfi_clk); phyupd_ack = 1;
        wait_state(PHYUPD_REQ, "PHYUPD_REQ");
        fork
          init_handshake(2'(r));
          wait_state(PHYUPD_INITSTART_REQ, "PHYUPD_INITSTART_REQ");
        join
        set_ctrl(ctrl_reg & ~32'h34);
        @(negedge dfi_clk); phyupd_ack = 0;
        wait_state(INTERACTION_IDLE, "idle after PHY update");
      end else if (r == 2) begin
        // ratio change under PHY master: PHYMSTR_INITSTART_REQ
        set_ctrl(ctrl_reg | 32'h08);
        @(negedge dfi_clk); phymstr_ack = 1;
        wait_state(PHYMSTR_REQ, "PHYMSTR_REQ");
        fork
          init_handshake(2'(r));
          wait_state(PHYMSTR_INITSTART_REQ, "PHYMSTR_INITSTART_REQ");
        join
        set_ctrl(ctrl_reg & ~32'h08);
        @(negedge dfi_clk); phymstr_ack = 0;
        wait_state(INTERACTION_IDLE, "idle after PHY master");
      end
      for (int m = 0; m < 4; m++) begin
        burst_mode_e bm;
        bm = burst_mode_e'((m + r) % 4);
        if (bm != bmode) n_mode_change++;
        set_mode(bm);
        set_arid(8'((r * 4 + m) * 7 + 3));
        batch(5);
      end
      // refresh: precharge all, then REF
      cmd_prea();
      issue(1, 0, 0, 1, 32'h0, 0, 0); n_ref++;
    end

    // read-data queue back-pressure: many BL8 reads with dfi_rddata_en held off
    set_mode(BMODE_BL8);
    begin
      int t, rb0;
      t = 0;
      rb0 = r_backpressure;
      hold_rd_en = 1;
      for (int i = 0; i < 12; i++) begin
        loc_t l;
        l = rand_loc(); l.col[5:0] = 6'h3c;             // straddles a 64-byte line: 2 beats
        do_read(l, 0, 1);
      end
      while (r_backpressure == rb0 && t < 3000) begin @(posedge dfi_clk); t++; end
      if (r_backpressure != rb0) n_rq_full++;
      repeat (20) @(posedge dfi_clk);
      check(exp_words.size() == 48, "no read word before dfi_rddata_en");
      hold_rd_en = 0;
      wait_reads_done(8000);
    end

    // interaction states not reached above
    set_ctrl(ctrl_reg | 32'h04);                        // PHY update
    @(negedge dfi_clk); ctrlupd_req = 1;
    wait_state(UPD_REQ, "UPD_REQ");
    check(ctrlupd_ack, "dfi_ctrlupd_ack in UPD_REQ");
    @(negedge dfi_clk); ctrlupd_req = 0;
    wait_state(PHYUPD_REQ, "back to PHYUPD_REQ");
    set_ctrl(ctrl_reg | 32'h08);                        // plus PHY master
    wait_state(PHY_REQ, "PHY_REQ");
    set_ctrl(ctrl_reg & ~32'h04);                       // PHY master only
    wait_state(PHYMSTR_REQ, "PHYMSTR_REQ only");
    @(negedge dfi_clk); lp_ctrl_req = 1; lp_data_req = 1;
    wait_state(PHYMSTR_LP_REQ, "PHYMSTR_LP_REQ");
    check(lp_ctrl_ack && lp_data_ack, "low-power acks in PHYMSTR_LP_REQ");
    @(negedge dfi_clk); lp_ctrl_req = 0; lp_data_req = 0;
    set_ctrl(ctrl_reg & ~32'h08);
    wait_state(INTERACTION_IDLE, "idle at end");
    check(!ctrlupd_ack && !lp_ctrl_ack && !lp_data_ack, "acks drop");

    // status words against the controller's own counts
    repeat (10) @(posedge dfi_clk);
    status_read(1, st);
    check(st[15:0] == 16'(n_wr) && st[31:16] == 16'(n_rd),
          $sformatf("status 1 bursts %h (wr %0d rd %0d)", st, n_wr, n_rd));
    status_read(2, st);
    check(st[15:0] == 16'(n_act) && st[31:16] == 16'(n_ref), $sformatf("status 2 ACT/REF %h", st));
    status_read(3, st);
    check(st[15:0] == 16'(n_pre) && st[31:16] == 16'(n_mz), $sformatf("status 3 PRE/MRS+ZQ %h", st));
    status_read(4, st);
    check(st[15:0] == 0, $sformatf("no DFI-side errors %h", st));
    status_read(0, st);
    check(st[31:16] == 16'(n_init) && st[5:4] == 2'd2, $sformatf("status 0 %h", st));
    check(!axi_err, "no AXI error");
    check(int'(axi_reads) == n_rd, $sformatf("AXI reads %0d of %0d", axi_reads, n_rd));
    check(bad_phase == 0, "read data only on live phases");

    // every mechanism must have happened
    for (int b = 0; b < 3; b++) begin
      check(n_wr_bt[b] > 0, $sformatf("writes of burst type %0d", b));
      check(n_rd_bt[b] > 0, $sformatf("reads of burst type %0d", b));
      check(n_rd_ratio[b] > 0, $sformatf("reads at ratio %0d", b));
    end
    check(n_ratio_change >= 2, "frequency-ratio changes");
    check(n_mode_change >= 3, "burst-mode changes");
    check(n_rq_full > 0, "read-data queue full (RREADY low)");
    check($countones(arid_seen) >= 12, $sformatf("read-data queues used %h", arid_seen));
    check(aw_stall > 0 && ar_stall > 0, "AXI address-channel stalls");
    check(n_ctrlupd_ack > 0, "controller update acknowledged");
    check(n_lp_ack > 0, "low-power request acknowledged");
    for (int s = 1; s < 10; s++)
      check(ia_seen[s], $sformatf("interaction state %s reached", interaction_e'(s)));
    check(n_ref > 0 && n_pre > 0 && n_act > 0 && n_mz > 0, "REF, PRE, ACT, MRS/ZQ issued");
    $display("writes %0d reads %0d W beats %0d R beats %0d words checked %0d aw_stall %0d r_backpressure %0d",
             n_wr, n_rd, w_beats, r_beats, got_words, aw_stall, r_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
