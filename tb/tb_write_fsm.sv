// tb_write_fsm - self-checking test of the DFI write path.
//
// Sends WR commands of all three burst types and their data words at the 1:1 and
// 1:4 ratios (including a burst that ends and another that starts within one DFI
// cycle, and data that arrives before its command), with byte masks, and while the
// FIFO reports full. Every pushed address/data packet is compared with one built
// here: address, AWLEN/AWSIZE/AWBURST from the byte count, words in order, strobes
// the inverse of the masks.
module tb_write_fsm;
  import ddr_bridge_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] freq_ratio;
  axi_param_t aw_prm;
  logic cmd_valid;
  logic [63:0] cmd_addr;
  burst_e cmd_burst;
  logic [PHASES-1:0] en;
  logic [PHASES-1:0][31:0] wd;
  logic [PHASES-1:0][3:0] wm;
  logic fifo_full, fifo_push, err_pulse;
  addr_pkt_t waddr_pkt;
  wdata_pkt_t wdata_pkt;
  logic [15:0] bursts;

  write_fsm dut (.clk, .rst_n, .freq_ratio, .aw_prm, .cmd_valid, .cmd_addr, .cmd_burst,
    .dfi_wrdata_en(en), .dfi_wrdata(wd), .dfi_wrdata_mask(wm), .fifo_full, .fifo_push,
    .waddr_pkt, .wdata_pkt, .bursts, .err_pulse);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [63:0] addr; int nw; logic [3:0][31:0] w; logic [3:0][3:0] m; } exp_t;
  exp_t expq [$];
  int   pushes = 0, errs = 0;

  always @(posedge clk) if (rst_n) begin
    errs += err_pulse;
    if (fifo_push) begin
      exp_t e;
      int lane, nb, elen;
      pushes++;
      if (expq.size() == 0) begin
        check(0, "unexpected push");
      end else begin
        e = expq.pop_front();
        lane = int'(e.addr[5:0]); nb = 4 * e.nw;
        elen = ((lane + nb - 1) / 8) - (lane / 8);   // AWSIZE 3 = 8-byte beats
        check(waddr_pkt.addr == e.addr, $sformatf("addr %h exp %h", waddr_pkt.addr, e.addr));
        check(waddr_pkt.prm.len == 8'(elen), $sformatf("awlen %0d exp %0d", waddr_pkt.prm.len, elen));
        check(waddr_pkt.prm.size == 3 && waddr_pkt.prm.burst == 1, "awsize/awburst");
        check(waddr_pkt.prm.id == 8'h5a && waddr_pkt.prm.cache == 4'h3, "aw params copied");
        for (int i = 0; i < 4; i++) begin
          logic [31:0] dw; logic [3:0] sw;
          dw = (i < e.nw) ? e.w[i] : 32'h0;
          sw = (i < e.nw) ? ~e.m[i] : 4'h0;
          check(wdata_pkt.data[i*32 +: 32] == dw, $sformatf("word %0d %h exp %h", i, wdata_pkt.data[i*32 +: 32], dw));
          check(wdata_pkt.strb[i*4 +: 4] == sw, $sformatf("strb %0d", i));
        end
      end
    end
  end

  task automatic cmd(logic [63:0] a, burst_e b);
    @(negedge clk); cmd_valid = 1; cmd_addr = a; cmd_burst = b;
    @(negedge clk); cmd_valid = 0;
  endtask

  // put n words on phases starting at p0 of consecutive cycles (nph words per cycle)
  task automatic words(int nph, int first_phase, logic [31:0] w [], logic [3:0] m []);
    int k, p;
    k = 0; p = first_phase;
    while (k < w.size()) begin
      @(negedge clk); en = '0;
      while (p < nph && k < w.size()) begin
        en[p] = 1; wd[p] = w[k]; wm[p] = m[k]; p++; k++;
      end
      p = 0;
    end
    @(negedge clk); en = '0;
  endtask

  function automatic exp_t mk(logic [63:0] a, int nw, logic [31:0] w [], logic [3:0] m [], int off);
    exp_t e;
    e.addr = a; e.nw = nw; e.w = '0; e.m = '0;
    for (int i = 0; i < nw; i++) begin e.w[i] = w[off+i]; e.m[i] = m[off+i]; end
    return e;
  endfunction

  logic [31:0] w1 [], w2 [];
  logic [3:0]  m1 [], m2 [];
  initial begin
    aw_prm = '0; aw_prm.size = 3; aw_prm.len = 1; aw_prm.burst = 1; aw_prm.id = 8'h5a;
    aw_prm.cache = 4'h3;
    freq_ratio = 0; cmd_valid = 0; cmd_addr = 0; cmd_burst = BURST_8;
    en = '0; wd = '0; wm = '0; fifo_full = 0;
    repeat (2) @(posedge clk); rst_n = 1;

    // 1:1 BL8 with a mask on word 2
    w1 = '{32'hC0DD9EA9, 32'hB281BB4B, 32'hE1480BB3, 32'h0EA0AFFC};
    m1 = '{4'h0, 4'h0, 4'h2, 4'h0};
    expq.push_back(mk(64'h0100_0000, 4, w1, m1, 0));
    cmd(64'h0100_0000, BURST_8);
    words(1, 0, w1, m1);
    // BC4 at an odd 8-byte offset: three beats of 8 bytes? no - lane 0x28, 8 bytes
    w2 = '{32'h11112222, 32'h33334444};
    m2 = '{4'h0, 4'hf};
    expq.push_back(mk(64'h0100_0028, 2, w2, m2, 0));
    cmd(64'h0100_0028, BURST_4);
    words(1, 0, w2, m2);
    // single word, data before the command
    w2 = '{32'hdeadbeef};
    m2 = '{4'h1};
    expq.push_back(mk(64'h0100_0044, 1, w2, m2, 0));
    words(1, 0, w2, m2);
    cmd(64'h0100_0044, BURST_1);
    repeat (3) @(posedge clk);

    // 1:4: BL8 starting on p2, then BC4 starting on p2 of the next cycle
    freq_ratio = 2;
    w1 = '{32'ha0, 32'ha1, 32'ha2, 32'ha3, 32'hb0, 32'hb1};
    m1 = '{4'h0, 4'h0, 4'h0, 4'h8, 4'h0, 4'h0};
    expq.push_back(mk(64'h0200_0010, 4, w1, m1, 0));
    expq.push_back(mk(64'h0200_0020, 2, w1, m1, 4));
    cmd(64'h0200_0010, BURST_8);
    cmd(64'h0200_0020, BURST_4);
    words(4, 2, w1, m1);
    repeat (3) @(posedge clk);
    check(pushes == 5, $sformatf("pushes so far %0d", pushes));

    // back-pressure: FIFO full holds the burst back
    fifo_full = 1;
    w1 = '{32'hc0, 32'hc1, 32'hc2, 32'hc3};
    m1 = '{4'h0, 4'h0, 4'h0, 4'h0};
    expq.push_back(mk(64'h0300_0000, 4, w1, m1, 0));
    cmd(64'h0300_0000, BURST_8);
    words(4, 0, w1, m1);
    repeat (5) @(posedge clk);
    check(pushes == 5, "no push while full");
    @(negedge clk); fifo_full = 0;
    @(posedge clk); #1;
    repeat (2) @(posedge clk);
    check(pushes == 6, "push after full clears");
    check(bursts == 16'd6, "burst counter");
    check(expq.size() == 0, "all bursts pushed");
    check(errs == 0, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
