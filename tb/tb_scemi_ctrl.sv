// tb_scemi_ctrl - self-checking test of the configuration/status message port.
//
// SCE-MI clock 13 ns, DFI clock 10 ns. Checks the reset values of the registers
// (AXI parameters decoding to size 3, length 1, INCR), writes every register with
// messages and checks the values in the DFI domain, then reads status words back
// through the output message port, including with a stalled reader so that the
// input side must wait.
module tb_scemi_ctrl;
  import ddr_bridge_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic sclk = 0, clk = 0, srst_n = 0, rst_n = 0;
  always #6.5 sclk = ~sclk;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [39:0] in_data, out_data;
  logic [7:0][31:0] status;
  burst_mode_e burst_mode;
  logic phyupd_req, phymstr_req;
  logic [1:0] phyupd_type;
  logic [15:0] t_init;
  logic [63:0] axi_base;
  axi_param_t aw_prm, ar_prm;

  scemi_ctrl dut (.scemi_clk(sclk), .scemi_rst_n(srst_n), .msg_in_valid(in_valid),
    .msg_in_ready(in_ready), .msg_in_data(in_data), .msg_out_valid(out_valid),
    .msg_out_ready(out_ready), .msg_out_data(out_data), .clk, .rst_n, .status,
    .burst_mode, .phyupd_req, .phymstr_req, .phyupd_type, .t_init, .axi_base, .aw_prm, .ar_prm);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [7:0] idx, logic [31:0] v);
    @(negedge sclk); in_valid = 1; in_data = {idx, v};
    do @(posedge sclk); while (!in_ready);
    #0.1 in_valid = 0;
  endtask

  logic [39:0] got [$];
  always @(posedge sclk) if (srst_n && out_valid && out_ready) got.push_back(out_data);

  initial begin
    in_valid = 0; in_data = '0; out_ready = 1;
    for (int i = 0; i < 8; i++) status[i] = 32'h1000_0000 * (i + 1) + 32'(i * 3);
    #21 srst_n = 1; rst_n = 1;
    @(posedge clk); #0.1;
    check(burst_mode == BMODE_BL8 && t_init == 16 && axi_base == 0 && !phyupd_req, "reset values");
    check(ar_prm.size == 3 && ar_prm.len == 1 && ar_prm.burst == 1 && ar_prm.id == 0, "AR reset");
    check(axi_param_t'(80'h0434_0000) == ar_prm, "AR reset word 0x04340000");

    send(8'h00, 32'h0000_001d);   // OTF, phyupd, phymstr, type 1
    send(8'h01, 32'd77);
    send(8'h02, 32'h8000_0000);
    send(8'h03, 32'h0000_0001);
    send(8'h04, 32'hcafe_0042);
    send(8'h05, 32'h1234_5678);
    send(8'h06, 32'h0000_abcd);
    send(8'h08, 32'h0430_0099);
    send(8'h09, 32'h0000_0000);
    send(8'h0a, 32'h0000_0001);
    repeat (8) @(posedge clk); #0.1;
    check(burst_mode == BMODE_OTF, "burst mode");
    check(phyupd_req && phymstr_req && phyupd_type == 2'd1, "ctrl bits");
    check(t_init == 16'd77, "t_init");
    check(axi_base == 64'h1_8000_0000, "axi base");
    check(aw_prm == axi_param_t'(80'habcd_1234_5678_cafe_0042), "aw params");
    check(ar_prm == axi_param_t'(80'h0001_0000_0000_0430_0099), "ar params");
    check(ar_prm.id == 8'h99 && ar_prm.size == 3 && ar_prm.burst == 0, "ar fields");

    // status reads
    send(8'h80, 0);
    send(8'h83, 0);
    send(8'h87, 0);
    repeat (12) @(posedge sclk);
    check(got.size() == 3, $sformatf("status answers %0d", got.size()));
    if (got.size() == 3) begin
      check(got[0] == {8'h80, status[0]}, "status 0");
      check(got[1] == {8'h83, status[3]}, "status 3");
      check(got[2] == {8'h87, status[7]}, "status 7");
    end
    // stalled reader: the output FIFO (4) fills, then the input FIFO (4) fills
    out_ready = 0; got.delete();
    fork
      for (int i = 0; i < 10; i++) send(8'h81, 0);
      begin
        repeat (60) @(posedge sclk);
        check(!in_ready, "input side backs up behind a full output FIFO");
        out_ready = 1;
      end
    join
    repeat (30) @(posedge sclk);
    check(got.size() == 10, $sformatf("all 10 answers after stall: %0d", got.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
