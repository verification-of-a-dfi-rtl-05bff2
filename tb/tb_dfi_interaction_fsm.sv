// tb_dfi_interaction_fsm - self-checking test of the DFI interaction state machine.
//
// Applies every row of the interaction truth table (through TPHYUPD or TPHYMSTR),
// the direct IDLE -> PHYMSTR_LP_REQ path and non-matching combinations, and checks
// the state reached, the acknowledges, the three-edge latency and the return to
// IDLE once the request pattern goes away. Expected states are written here from
// the table, not taken from the design.
module tb_dfi_interaction_fsm;
  import ddr_bridge_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic phyupd, phymstr, ctrlupd, initst, lpc, lpd;
  interaction_e state;
  logic ctrlupd_ack, lp_ctrl_ack, lp_data_ack, busy;

  dfi_interaction_fsm dut (.clk, .rst_n, .dfi_phyupd_req(phyupd), .dfi_phymstr_req(phymstr),
    .dfi_ctrlupd_req(ctrlupd), .dfi_init_start(initst), .dfi_lp_ctrl_req(lpc),
    .dfi_lp_data_req(lpd), .state, .dfi_ctrlupd_ack(ctrlupd_ack),
    .dfi_lp_ctrl_ack(lp_ctrl_ack), .dfi_lp_data_ack(lp_data_ack), .busy);

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

  int visits [10];
  always @(posedge clk) visits[int'(state)]++;

  // apply a request vector from idle; expect the intermediate state after two
  // edges and the leaf after three; then release and expect IDLE again
  task automatic run(logic [5:0] v, interaction_e mid, interaction_e leaf, string tag);
    @(negedge clk); {phyupd, phymstr, ctrlupd, initst, lpc, lpd} = v;
    @(posedge clk); #1; check(state == INTERACTION_IDLE, {tag, " still idle after 1"});
    @(posedge clk); #1; check(state == mid, $sformatf("%s mid state %s", tag, state.name()));
    @(posedge clk); #1; check(state == leaf, $sformatf("%s leaf state %s", tag, state.name()));
    repeat (3) @(posedge clk); #1;
    check(state == leaf, {tag, " leaf held"});
    check(ctrlupd_ack == (leaf == UPD_REQ), {tag, " ctrlupd_ack"});
    check(lp_ctrl_ack == (leaf == PHYMSTR_LP_REQ) && lp_data_ack == lp_ctrl_ack, {tag, " lp acks"});
    check(busy == (leaf != INTERACTION_IDLE), {tag, " busy"});
    @(negedge clk); {phyupd, phymstr, ctrlupd, initst, lpc, lpd} = '0;
    repeat (3) @(posedge clk); #1;
    check(state == INTERACTION_IDLE, {tag, " back to idle"});
    check(!busy, {tag, " not busy"});
  endtask

  initial begin
    {phyupd, phymstr, ctrlupd, initst, lpc, lpd} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run(6'b100000, TPHYUPD, PHYUPD_REQ, "phyupd");
    run(6'b100011, TPHYUPD, PHYUPD_REQ, "phyupd lp x");
    run(6'b110000, TPHYUPD, PHY_REQ, "phy");
    run(6'b101000, TPHYUPD, UPD_REQ, "upd");
    run(6'b100100, TPHYUPD, PHYUPD_INITSTART_REQ, "phyupd init");
    run(6'b010000, TPHYMSTR, PHYMSTR_REQ, "phymstr");
    run(6'b010100, TPHYMSTR, PHYMSTR_INITSTART_REQ, "phymstr init");
    run(6'b010011, PHYMSTR_LP_REQ, PHYMSTR_LP_REQ, "phymstr lp direct");
    run(6'b010010, TPHYMSTR, TPHYMSTR, "phymstr lp_ctrl only");
    run(6'b111000, TPHYUPD, TPHYUPD, "no row");
    run(6'b001000, INTERACTION_IDLE, INTERACTION_IDLE, "ctrlupd alone");
    // TPHYMSTR -> PHYMSTR_LP_REQ: phymstr first, low-power requests one cycle later
    @(negedge clk); phymstr = 1; lpc = 1;
    @(posedge clk); @(posedge clk); #1; check(state == TPHYMSTR, "tphymstr before lp");
    @(negedge clk); lpd = 1;
    @(posedge clk); @(posedge clk); #1;
    check(state == PHYMSTR_LP_REQ, "lp via tphymstr");
    @(negedge clk); {phymstr, lpc, lpd} = '0;
    repeat (4) @(posedge clk); #1;
    check(state == INTERACTION_IDLE, "idle at end");
    check(visits[int'(PHY_REQ)] > 0 && visits[int'(PHYMSTR_INITSTART_REQ)] > 0, "states visited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
