// dfi_interaction_fsm - DFI interaction state machine of the bridge.
//
// Watches the six request signals that start a side-band interaction on DFI:
// PHY update request, PHY master request, controller update request, init start,
// and the two low-power requests (control and data). The requests are registered
// (the *_r signals) and then classified by this truth table:
//
//   phyupd phymstr ctrlupd initstart lp_ctrl lp_data | from      -> to
//     1      0       0       0          x      x     | TPHYUPD   -> PHYUPD_REQ
//     1      1       0       0          x      x     | TPHYUPD   -> PHY_REQ
//     1      0       1       0          x      x     | TPHYUPD   -> UPD_REQ
//     1      0       0       1          x      x     | TPHYUPD   -> PHYUPD_INITSTART_REQ
//     0      1       0       0          0      0     | TPHYMSTR  -> PHYMSTR_REQ
//     0      1       0       1          0      0     | TPHYMSTR  -> PHYMSTR_INITSTART_REQ
//     0      1       0       0          1      1     | TPHYMSTR  -> PHYMSTR_LP_REQ
//
// From INTERACTION_IDLE a PHY update request leads to TPHYUPD and a PHY master
// request to TPHYMSTR; a PHY master request that arrives together with both
// low-power requests goes straight to PHYMSTR_LP_REQ. The table, the states and
// the transitions out of IDLE, TPHYUPD and TPHYMSTR are the design's documented
// behaviour. Leaving a request state is this design's own rule: a request state
// is held while its table row still matches, and the machine returns to IDLE the
// cycle after it stops matching. TPHYUPD waits there while the PHY update request
// stays high without a matching row and leaves for IDLE when it drops; TPHYMSTR
// likewise for the PHY master request, and also leaves if a PHY update request
// appears (which then takes priority from IDLE).
//
// Outputs: the state; dfi_ctrlupd_ack while in UPD_REQ (the controller update is
// granted inside the PHY update window); dfi_lp_ctrl_ack and dfi_lp_data_ack while
// in PHYMSTR_LP_REQ; busy whenever the state is not IDLE. One cycle of input
// registering plus one of state: a request shows in the leaf state three clock
// edges after it rose.
module dfi_interaction_fsm
  import ddr_bridge_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         dfi_phyupd_req,
  input  logic         dfi_phymstr_req,
  input  logic         dfi_ctrlupd_req,
  input  logic         dfi_init_start,
  input  logic         dfi_lp_ctrl_req,
  input  logic         dfi_lp_data_req,
  output interaction_e state,
  output logic         dfi_ctrlupd_ack,
  output logic         dfi_lp_ctrl_ack,
  output logic         dfi_lp_data_ack,
  output logic         busy
);

  logic phyupd_r, phymstr_r, ctrlupd_r, initstart_r, lp_ctrl_r, lp_data_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {phyupd_r, phymstr_r, ctrlupd_r, initstart_r, lp_ctrl_r, lp_data_r} <= '0;
    end else begin
      phyupd_r    <= dfi_phyupd_req;
      phymstr_r   <= dfi_phymstr_req;
      ctrlupd_r   <= dfi_ctrlupd_req;
      initstart_r <= dfi_init_start;
      lp_ctrl_r   <= dfi_lp_ctrl_req;
      lp_data_r   <= dfi_lp_data_req;
    end
  end

  // Table rows
  logic row_phyupd, row_phy, row_upd, row_phyupd_init;
  logic row_phymstr, row_phymstr_init, row_phymstr_lp;
  logic [3:0] upd4;
  logic [5:0] req6;
  assign upd4 = {phyupd_r, phymstr_r, ctrlupd_r, initstart_r};
  assign req6 = {upd4, lp_ctrl_r, lp_data_r};

  assign row_phyupd       = (upd4 == 4'b1000);
  assign row_phy          = (upd4 == 4'b1100);
  assign row_upd          = (upd4 == 4'b1010);
  assign row_phyupd_init  = (upd4 == 4'b1001);
  assign row_phymstr      = (req6 == 6'b010000);
  assign row_phymstr_init = (req6 == 6'b010100);
  assign row_phymstr_lp   = (req6 == 6'b010011);

  interaction_e nxt;

  always_comb begin
    nxt = state;
    case (state)
      INTERACTION_IDLE: begin
        if (phyupd_r)            nxt = TPHYUPD;
        else if (row_phymstr_lp) nxt = PHYMSTR_LP_REQ;
        else if (phymstr_r)      nxt = TPHYMSTR;
      end
      TPHYUPD: begin
        if (row_phyupd)           nxt = PHYUPD_REQ;
        else if (row_phy)         nxt = PHY_REQ;
        else if (row_upd)         nxt = UPD_REQ;
        else if (row_phyupd_init) nxt = PHYUPD_INITSTART_REQ;
        else if (!phyupd_r)       nxt = INTERACTION_IDLE;
      end
      TPHYMSTR: begin
        if (row_phymstr)           nxt = PHYMSTR_REQ;
        else if (row_phymstr_init) nxt = PHYMSTR_INITSTART_REQ;
        else if (row_phymstr_lp)   nxt = PHYMSTR_LP_REQ;
        else if (!phymstr_r || phyupd_r) nxt = INTERACTION_IDLE;
      end
      PHYUPD_REQ:            if (!row_phyupd)       nxt = INTERACTION_IDLE;
      PHY_REQ:               if (!row_phy)          nxt = INTERACTION_IDLE;
      UPD_REQ:               if (!row_upd)          nxt = INTERACTION_IDLE;
      PHYUPD_INITSTART_REQ:  if (!row_phyupd_init)  nxt = INTERACTION_IDLE;
      PHYMSTR_REQ:           if (!row_phymstr)      nxt = INTERACTION_IDLE;
      PHYMSTR_INITSTART_REQ: if (!row_phymstr_init) nxt = INTERACTION_IDLE;
      PHYMSTR_LP_REQ:        if (!row_phymstr_lp)   nxt = INTERACTION_IDLE;
      default:               nxt = INTERACTION_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= INTERACTION_IDLE;
    else        state <= nxt;
  end

  assign dfi_ctrlupd_ack = (state == UPD_REQ);
  assign dfi_lp_ctrl_ack = (state == PHYMSTR_LP_REQ);
  assign dfi_lp_data_ack = (state == PHYMSTR_LP_REQ);
  assign busy            = (state != INTERACTION_IDLE);

endmodule
