// cmd_decode - DDR4 command decoder of the DFI-to-AXI bridge.
//
// Every DFI cycle the command/address phases p0..pN-1 (N = 1, 2 or 4 by the
// frequency ratio) are registered and then decoded in phase order with the DDR4
// truth table: ACT_n low is an activate whose row is {RAS_n, CAS_n, A14..A0};
// with ACT_n high, {RAS_n, CAS_n, WE_n} = 100 is a write and 101 a read (A10 = auto
// precharge), 010 a precharge (A10 = all banks), 001 refresh, 000 mode register
// set, 110 ZQ calibration. The decoder keeps the open row of every bank, so that a
// column command can be turned into a flat AXI byte address:
//   addr = axi_base + ({row, bg, ba, column} << 1)
// (two bytes per column of the x16 device behind a 32-bit DFI word). The column is
// aligned to the burst: BL8 clears column bits 2:0, BC4 bits 1:0, a single word
// bit 0. The burst type comes from burst_mode (fixed BL8, fixed BC4, single word, or
// on the fly by A12 = BC_n). A precharge, or a column command with auto precharge,
// closes the row.
//
// Timing: the phase registers add one cycle, the column-command output is
// registered, so col_valid rises two dfi_clk edges after the command was on the
// pins. At most one column command per DFI cycle is taken (DDR4's tCCD of at least
// four clocks guarantees that at every ratio); a second one in the same cycle, or a
// column command to a closed bank, raises err_pulse. Commands are ignored while
// enable is low (before initialization completes, CKE low or DRAM in reset).
// The command encodings follow the JEDEC DDR4 table; the address mapping, the
// column alignment and the burst-mode register are this design's own choices.
module cmd_decode
  import ddr_bridge_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         enable,
  input  logic [1:0]                   freq_ratio,
  input  burst_mode_e                  burst_mode,
  input  logic [AXI_ADDR_W-1:0]        axi_base,

  input  logic [PHASES-1:0]            dfi_cs_n,
  input  logic [PHASES-1:0]            dfi_act_n,
  input  logic [PHASES-1:0]            dfi_ras_n,
  input  logic [PHASES-1:0]            dfi_cas_n,
  input  logic [PHASES-1:0]            dfi_we_n,
  input  logic [PHASES-1:0][DFI_ADDR_W-1:0] dfi_address,
  input  logic [PHASES-1:0][BA_W-1:0]  dfi_bank,
  input  logic [PHASES-1:0][BG_W-1:0]  dfi_bg,

  output logic                         col_valid,
  output logic                         col_write,
  output logic                         col_ap,
  output logic [AXI_ADDR_W-1:0]        col_addr,
  output burst_e                       col_burst,

  output logic                         ev_act,
  output logic                         ev_pre,
  output logic                         ev_ref,
  output logic                         ev_mrs,
  output logic                         ev_zqc,
  output logic                         err_pulse
);

  // ---------------- registered phases ----------------
  logic [PHASES-1:0]                 cs_n_r, act_n_r, ras_n_r, cas_n_r, we_n_r;
  logic [PHASES-1:0][DFI_ADDR_W-1:0] addr_r;
  logic [PHASES-1:0][BA_W-1:0]       bank_r;
  logic [PHASES-1:0][BG_W-1:0]       bg_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_n_r  <= '1;
      act_n_r <= '1;
      ras_n_r <= '1;
      cas_n_r <= '1;
      we_n_r  <= '1;
      addr_r  <= '0;
      bank_r  <= '0;
      bg_r    <= '0;
    end else begin
      cs_n_r  <= dfi_cs_n;
      act_n_r <= dfi_act_n;
      ras_n_r <= dfi_ras_n;
      cas_n_r <= dfi_cas_n;
      we_n_r  <= dfi_we_n;
      addr_r  <= dfi_address;
      bank_r  <= dfi_bank;
      bg_r    <= dfi_bg;
    end
  end

  function automatic dfi_cmd_e decode(logic cs_n, logic act_n, logic ras_n, logic cas_n,
                                      logic we_n, logic a10);
    if (cs_n)   return CMD_DES;
    if (!act_n) return CMD_ACT;
    case ({ras_n, cas_n, we_n})
      3'b000:  return CMD_MRS;
      3'b001:  return CMD_REF;
      3'b010:  return a10 ? CMD_PREA : CMD_PRE;
      3'b100:  return a10 ? CMD_WRA : CMD_WR;
      3'b101:  return a10 ? CMD_RDA : CMD_RD;
      3'b110:  return CMD_ZQC;
      3'b111:  return CMD_DES;
      default: return CMD_RFU;
    endcase
  endfunction

  // ---------------- open-row table ----------------
  logic [NBANK-1:0]            open_q, open_d;
  logic [NBANK-1:0][ROW_W-1:0] row_q, row_d;

  logic                  c_valid, c_write, c_ap, c_err;
  logic [AXI_ADDR_W-1:0] c_addr;
  burst_e                c_burst;
  logic                  c_act, c_pre, c_ref, c_mrs, c_zqc;
  dfi_cmd_e              cmd [PHASES];

  always_comb begin
    int unsigned nph;
    nph     = (freq_ratio == 2'd0) ? 1 : (freq_ratio == 2'd1) ? 2 : 4;
    open_d  = open_q;
    row_d   = row_q;
    c_valid = 1'b0;
    c_write = 1'b0;
    c_ap    = 1'b0;
    c_err   = 1'b0;
    c_addr  = '0;
    c_burst = BURST_8;
    {c_act, c_pre, c_ref, c_mrs, c_zqc} = '0;
    for (int p = 0; p < PHASES; p++) begin
      logic [BG_W+BA_W-1:0] b;
      logic [COL_W-1:0]     col;
      burst_e               bt;
      b      = {bg_r[p], bank_r[p]};
      cmd[p] = decode(cs_n_r[p], act_n_r[p], ras_n_r[p], cas_n_r[p], we_n_r[p], addr_r[p][10]);
      if (p >= nph || !enable) cmd[p] = CMD_DES;
      case (burst_mode)
        BMODE_BL8:    bt = BURST_8;
        BMODE_BC4:    bt = BURST_4;
        BMODE_SINGLE: bt = BURST_1;
        default:      bt = addr_r[p][12] ? BURST_8 : BURST_4;
      endcase
      col = addr_r[p][COL_W-1:0];
      case (bt)
        BURST_8: col[2:0] = '0;
        BURST_4: col[1:0] = '0;
        default: col[0]   = 1'b0;
      endcase
      case (cmd[p])
        CMD_ACT: begin
          open_d[b] = 1'b1;
          row_d[b]  = {ras_n_r[p], cas_n_r[p], addr_r[p][14:0]};
          c_act     = 1'b1;
        end
        CMD_PRE: begin
          open_d[b] = 1'b0;
          c_pre     = 1'b1;
        end
        CMD_PREA: begin
          open_d = '0;
          c_pre  = 1'b1;
        end
        CMD_REF: c_ref = 1'b1;
        CMD_MRS: c_mrs = 1'b1;
        CMD_ZQC: c_zqc = 1'b1;
        CMD_WR, CMD_WRA, CMD_RD, CMD_RDA: begin
          if (c_valid || !open_d[b]) begin
            c_err = 1'b1;
          end else begin
            c_valid = 1'b1;
            c_write = (cmd[p] == CMD_WR) || (cmd[p] == CMD_WRA);
            c_ap    = (cmd[p] == CMD_WRA) || (cmd[p] == CMD_RDA);
            c_burst = bt;
            c_addr  = axi_base + (AXI_ADDR_W'({row_d[b], bg_r[p], bank_r[p], col}) << 1);
            if (c_ap) open_d[b] = 1'b0;
          end
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_q    <= '0;
      row_q     <= '0;
      col_valid <= 1'b0;
      col_write <= 1'b0;
      col_ap    <= 1'b0;
      col_addr  <= '0;
      col_burst <= BURST_8;
      {ev_act, ev_pre, ev_ref, ev_mrs, ev_zqc, err_pulse} <= '0;
    end else begin
      open_q    <= open_d;
      row_q     <= row_d;
      col_valid <= c_valid;
      col_write <= c_write;
      col_ap    <= c_ap;
      col_addr  <= c_addr;
      col_burst <= c_burst;
      {ev_act, ev_pre, ev_ref, ev_mrs, ev_zqc, err_pulse} <= {c_act, c_pre, c_ref, c_mrs, c_zqc, c_err};
    end
  end

endmodule
