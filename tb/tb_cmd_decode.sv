// tb_cmd_decode - self-checking test of the DDR4 command decoder.
//
// Drives ACT / WR / RD / PRE / PREA / REF / MRS / ZQ commands on DFI phases at the
// 1:1, 1:2 and 1:4 ratios and compares the decoded column commands (valid,
// direction, auto precharge, burst type, AXI address) with addresses computed here
// from the row, bank group, bank and column the test chose. Also checks the
// two-cycle latency, the closed-bank and two-commands-per-cycle errors, and that
// nothing is decoded while enable is low.
module tb_cmd_decode;
  import ddr_bridge_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic enable;
  logic [1:0] freq_ratio;
  burst_mode_e burst_mode;
  logic [AXI_ADDR_W-1:0] axi_base;
  logic [PHASES-1:0] cs_n, act_n, ras_n, cas_n, we_n;
  logic [PHASES-1:0][DFI_ADDR_W-1:0] addr;
  logic [PHASES-1:0][BA_W-1:0] bank;
  logic [PHASES-1:0][BG_W-1:0] bg;
  logic col_valid, col_write, col_ap;
  logic [AXI_ADDR_W-1:0] col_addr;
  burst_e col_burst;
  logic ev_act, ev_pre, ev_ref, ev_mrs, ev_zqc, err_pulse;

  cmd_decode dut (.clk, .rst_n, .enable, .freq_ratio, .burst_mode, .axi_base,
    .dfi_cs_n(cs_n), .dfi_act_n(act_n), .dfi_ras_n(ras_n), .dfi_cas_n(cas_n), .dfi_we_n(we_n),
    .dfi_address(addr), .dfi_bank(bank), .dfi_bg(bg), .col_valid, .col_write, .col_ap,
    .col_addr, .col_burst, .ev_act, .ev_pre, .ev_ref, .ev_mrs, .ev_zqc, .err_pulse);

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

  // event counters
  int n_act = 0, n_pre = 0, n_ref = 0, n_mrs = 0, n_zqc = 0, n_err = 0;
  always @(posedge clk) if (rst_n) begin
    n_act += ev_act; n_pre += ev_pre; n_ref += ev_ref;
    n_mrs += ev_mrs; n_zqc += ev_zqc; n_err += err_pulse;
  end

  task automatic idle_all();
    cs_n = '1; act_n = '1; ras_n = '1; cas_n = '1; we_n = '1; addr = '0; bank = '0; bg = '0;
  endtask

  // put one command on phase p (fields only, no clock)
  task automatic set_act(int p, logic [16:0] row, logic [1:0] g, logic [1:0] b);
    cs_n[p] = 0; act_n[p] = 0; ras_n[p] = row[16]; cas_n[p] = row[15]; we_n[p] = row[14];
    addr[p] = 32'(row[14:0]); bg[p] = g; bank[p] = b;
  endtask
  task automatic set_cas(int p, bit wr, logic [9:0] col, logic [1:0] g, logic [1:0] b,
                         bit ap, bit bc_n);
    cs_n[p] = 0; act_n[p] = 1; ras_n[p] = 1; cas_n[p] = 0; we_n[p] = !wr;
    addr[p] = 32'(col); addr[p][10] = ap; addr[p][12] = bc_n; bg[p] = g; bank[p] = b;
  endtask
  task automatic set_other(int p, logic [2:0] rcw, bit a10);
    cs_n[p] = 0; act_n[p] = 1; {ras_n[p], cas_n[p], we_n[p]} = rcw; addr[p] = '0;
    addr[p][10] = a10;
  endtask

  function automatic logic [63:0] exp_addr(logic [16:0] row, logic [1:0] g, logic [1:0] b,
                                           logic [9:0] col, burst_e bt);
    logic [9:0] c;
    c = col;
    if (bt == BURST_8) c[2:0] = 0; else if (bt == BURST_4) c[1:0] = 0; else c[0] = 0;
    return axi_base + ((64'(row) * 16384 + 64'(g) * 4096 + 64'(b) * 1024 + 64'(c)) * 2);
  endfunction

  // issue the phases set so far for one cycle, then expect (or not) a column command
  task automatic cycle_expect(bit exp_valid, bit exp_wr, bit exp_ap, burst_e exp_bt,
                              logic [63:0] exp_a, string tag);
    @(negedge clk); // phases already set
    @(negedge clk); idle_all();
    // registered at edge 1, output registered at edge 2
    @(posedge clk); #1;
    check(col_valid == exp_valid, $sformatf("%s valid=%0b", tag, col_valid));
    if (exp_valid) begin
      check(col_write == exp_wr, $sformatf("%s write", tag));
      check(col_ap == exp_ap, $sformatf("%s ap", tag));
      check(col_burst == exp_bt, $sformatf("%s burst %0d", tag, col_burst));
      check(col_addr == exp_a, $sformatf("%s addr %h exp %h", tag, col_addr, exp_a));
    end
  endtask

  logic [16:0] row1, row2;
  initial begin
    idle_all();
    enable = 1; freq_ratio = 0; burst_mode = BMODE_BL8; axi_base = 64'h0000_0000_0100_0000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- 1:1, BL8 ----
    row1 = 17'h1_2345;
    set_act(0, row1, 2'd1, 2'd2);
    cycle_expect(0, 0, 0, BURST_8, 0, "act");
    set_cas(0, 1, 10'h15f, 2'd1, 2'd2, 0, 1);
    cycle_expect(1, 1, 0, BURST_8, exp_addr(row1, 1, 2, 10'h15f, BURST_8), "wr bl8");
    set_cas(0, 0, 10'h0a4, 2'd1, 2'd2, 0, 1);
    cycle_expect(1, 0, 0, BURST_8, exp_addr(row1, 1, 2, 10'h0a4, BURST_8), "rd bl8");
    // read to a closed bank -> error, no command
    set_cas(0, 0, 10'h010, 2'd3, 2'd0, 0, 1);
    cycle_expect(0, 0, 0, BURST_8, 0, "rd closed");
    // ---- on-the-fly burst chop ----
    burst_mode = BMODE_OTF;
    set_cas(0, 0, 10'h0a6, 2'd1, 2'd2, 0, 0);
    cycle_expect(1, 0, 0, BURST_4, exp_addr(row1, 1, 2, 10'h0a6, BURST_4), "rd bc4 otf");
    set_cas(0, 1, 10'h0a6, 2'd1, 2'd2, 0, 1);
    cycle_expect(1, 1, 0, BURST_8, exp_addr(row1, 1, 2, 10'h0a6, BURST_8), "wr bl8 otf");
    burst_mode = BMODE_SINGLE;
    set_cas(0, 1, 10'h0a7, 2'd1, 2'd2, 0, 0);
    cycle_expect(1, 1, 0, BURST_1, exp_addr(row1, 1, 2, 10'h0a7, BURST_1), "wr single");
    burst_mode = BMODE_BC4;
    // read with auto precharge closes the bank
    set_cas(0, 0, 10'h0b0, 2'd1, 2'd2, 1, 1);
    cycle_expect(1, 0, 1, BURST_4, exp_addr(row1, 1, 2, 10'h0b0, BURST_4), "rda");
    set_cas(0, 0, 10'h0b0, 2'd1, 2'd2, 0, 1);
    cycle_expect(0, 0, 0, BURST_8, 0, "rd after rda");

    // ---- 1:4: ACT on p1, RD on p3 of the same cycle ----
    freq_ratio = 2; burst_mode = BMODE_BL8;
    row2 = 17'h0_7abc;
    set_act(1, row2, 2'd3, 2'd1);
    set_cas(3, 0, 10'h3f8, 2'd3, 2'd1, 0, 1);
    cycle_expect(1, 0, 0, BURST_8, exp_addr(row2, 3, 1, 10'h3f8, BURST_8), "1:4 act+rd");
    // two column commands in one cycle -> first taken, error flagged
    set_cas(0, 1, 10'h008, 2'd3, 2'd1, 0, 1);
    set_cas(2, 0, 10'h010, 2'd3, 2'd1, 0, 1);
    cycle_expect(1, 1, 0, BURST_8, exp_addr(row2, 3, 1, 10'h008, BURST_8), "1:4 two cas");
    // ---- 1:2: phase 2 is not live ----
    freq_ratio = 1;
    set_cas(2, 0, 10'h010, 2'd3, 2'd1, 0, 1);
    cycle_expect(0, 0, 0, BURST_8, 0, "1:2 dead phase");
    set_cas(1, 0, 10'h020, 2'd3, 2'd1, 0, 1);
    cycle_expect(1, 0, 0, BURST_8, exp_addr(row2, 3, 1, 10'h020, BURST_8), "1:2 p1");
    // PRE (single), REF, MRS, ZQ, PREA
    set_other(0, 3'b010, 0); bg[0] = 3; bank[0] = 1;
    set_other(1, 3'b001, 0);
    cycle_expect(0, 0, 0, BURST_8, 0, "pre+ref");
    set_cas(0, 0, 10'h020, 2'd3, 2'd1, 0, 1);
    cycle_expect(0, 0, 0, BURST_8, 0, "rd after pre");
    set_act(0, row2, 2'd0, 2'd0);
    set_other(1, 3'b000, 0);
    cycle_expect(0, 0, 0, BURST_8, 0, "act+mrs");
    set_other(0, 3'b110, 0);
    set_other(1, 3'b010, 1);
    cycle_expect(0, 0, 0, BURST_8, 0, "zq+prea");
    set_cas(0, 1, 10'h020, 2'd0, 2'd0, 0, 1);
    cycle_expect(0, 0, 0, BURST_8, 0, "wr after prea");
    // ---- enable low: nothing decoded ----
    set_act(0, row2, 2'd0, 2'd0);
    set_cas(1, 1, 10'h020, 2'd0, 2'd0, 0, 1);
    enable = 0;
    cycle_expect(0, 0, 0, BURST_8, 0, "disabled");
    enable = 1;
    repeat (3) @(posedge clk);

    check(n_act == 4, $sformatf("ACT events %0d", n_act));
    check(n_pre == 2, $sformatf("PRE events %0d", n_pre));
    check(n_ref == 1, $sformatf("REF events %0d", n_ref));
    check(n_mrs == 1, $sformatf("MRS events %0d", n_mrs));
    check(n_zqc == 1, $sformatf("ZQ events %0d", n_zqc));
    check(n_err == 5, $sformatf("errors %0d", n_err));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
