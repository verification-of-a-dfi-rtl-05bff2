// tb_init_ctrl - self-checking test of the initialization / control unit.
//
// Checks that dfi_init_complete rises exactly t_init + 1 cycles after reset and
// after an init-start request, that the frequency ratio is latched at the request,
// that the unit waits for dfi_init_start to drop, and that cmd_enable follows
// READY, dfi_reset_n and CKE.
module tb_init_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] t_init;
  logic dfi_init_start, dfi_reset_n, dfi_cke, dfi_init_complete, cmd_enable;
  logic [1:0] dfi_freq_ratio, freq_ratio;
  logic [15:0] init_count;

  init_ctrl dut (.clk, .rst_n, .t_init, .dfi_init_start, .dfi_freq_ratio, .dfi_reset_n,
                 .dfi_cke, .dfi_init_complete, .freq_ratio, .cmd_enable, .init_count);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc;
  initial begin
    t_init = 16'd10; dfi_init_start = 0; dfi_freq_ratio = 0; dfi_reset_n = 1; dfi_cke = 1;
    @(negedge clk); rst_n = 1;
    // reset release: count edges until complete
    cyc = 0;
    while (!dfi_init_complete) begin @(posedge clk); #1; cyc++; end
    check(cyc == 11, $sformatf("complete after reset: %0d cycles", cyc));
    check(init_count == 1, "init count 1");
    @(posedge clk); @(posedge clk); #1;
    check(cmd_enable, "enabled when ready");
    dfi_cke = 0; @(posedge clk); @(posedge clk); #1;
    check(!cmd_enable, "CKE low disables");
    dfi_cke = 1; dfi_reset_n = 0; @(posedge clk); @(posedge clk); #1;
    check(!cmd_enable, "reset_n low disables");
    dfi_reset_n = 1; @(posedge clk); @(posedge clk); #1;
    check(cmd_enable, "re-enabled");

    // frequency change to 1:4
    t_init = 16'd5;
    @(negedge clk); dfi_freq_ratio = 2; dfi_init_start = 1;
    @(posedge clk); @(posedge clk); #1;
    check(!dfi_init_complete, "complete drops on init_start");
    check(!cmd_enable, "disabled during init");
    check(freq_ratio == 2, "ratio latched");
    cyc = 1;
    while (!dfi_init_complete) begin @(posedge clk); #1; cyc++; end
    check(cyc == 7, $sformatf("complete after request: %0d cycles", cyc));
    repeat (4) @(posedge clk); #1;
    check(!cmd_enable, "waits for init_start to drop");
    @(negedge clk); dfi_init_start = 0; dfi_freq_ratio = 1;
    @(posedge clk); @(posedge clk); @(posedge clk); #1;
    check(cmd_enable, "ready after init_start drops");
    check(freq_ratio == 2, "ratio kept until next request");
    check(init_count == 2, "init count 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
