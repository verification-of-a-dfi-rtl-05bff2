// scemi_ctrl - configuration and status port of the bridge (SCE-MI controller).
//
// The co-emulation host sends the bridge its timing and transaction parameters as
// 40-bit messages on the SCE-MI clock: {register index[7:0], value[31:0]}. A
// message with index bit 7 clear writes a configuration register; one with index
// bit 7 set is a status read, answered by a message {index, status word} on the
// output port. Both directions cross between the SCE-MI clock and the DFI clock
// through dual-clock FIFOs; the registers themselves live in the DFI clock domain,
// where they are used.
//
//   idx  register          reset value
//   0x00 CTRL    [1:0] burst mode, [2] PHY update request, [3] PHY master request,
//                [5:4] PHY update type                       0
//   0x01 T_INIT  [15:0] initialization delay, DFI cycles    16
//   0x02 BASE_LO / 0x03 BASE_HI   AXI address of row/bank/column 0      0
//   0x04..0x06   AXI write-address parameters, 80 bits, low word first
//   0x08..0x0a   AXI read-address parameters, 80 bits, low word first
//   0x80+i       status word i (0..7), read only
// The parameter words reset to ARSIZE/AWSIZE = 3, ARLEN/AWLEN = 1, INCR bursts, ID 0
// and all other fields 0.
//
// Timing: a written value takes effect about four DFI cycles after the message is
// accepted (FIFO crossing plus the register); msg_in_ready is low only while the
// input FIFO is full. The message format and the register map are this design's
// own; that the SCE-MI side supplies the AXI parameters and timing values is the
// design's documented role of this block.
module scemi_ctrl
  import ddr_bridge_pkg::*;
(
  input  logic                  scemi_clk,
  input  logic                  scemi_rst_n,
  input  logic                  msg_in_valid,
  output logic                  msg_in_ready,
  input  logic [39:0]           msg_in_data,
  output logic                  msg_out_valid,
  input  logic                  msg_out_ready,
  output logic [39:0]           msg_out_data,

  input  logic                  clk,      // DFI clock
  input  logic                  rst_n,
  input  logic [7:0][31:0]      status,

  output burst_mode_e           burst_mode,
  output logic                  phyupd_req,
  output logic                  phymstr_req,
  output logic [1:0]            phyupd_type,
  output logic [15:0]           t_init,
  output logic [AXI_ADDR_W-1:0] axi_base,
  output axi_param_t            aw_prm,
  output axi_param_t            ar_prm
);

  localparam axi_param_t PRM_RESET = '{size: 3'd3, len: 8'd1, burst: 2'b01, default: '0};

  logic        in_full, in_empty, in_pop;
  logic [39:0] in_head;
  logic [2:0]  in_cnt, out_cnt;
  logic        out_full, out_empty, out_push;
  logic [39:0] out_word;

  async_fifo #(.WIDTH(40), .DEPTH_LOG2(2)) u_in_q (
    .wr_clk(scemi_clk), .wr_rst_n(scemi_rst_n), .wr_en(msg_in_valid && msg_in_ready),
    .wr_data(msg_in_data), .full(in_full), .wr_count(in_cnt),
    .rd_clk(clk), .rd_rst_n(rst_n), .rd_en(in_pop), .rd_data(in_head), .empty(in_empty));

  async_fifo #(.WIDTH(40), .DEPTH_LOG2(2)) u_out_q (
    .wr_clk(clk), .wr_rst_n(rst_n), .wr_en(out_push), .wr_data(out_word),
    .full(out_full), .wr_count(out_cnt),
    .rd_clk(scemi_clk), .rd_rst_n(scemi_rst_n), .rd_en(msg_out_ready && msg_out_valid),
    .rd_data(msg_out_data), .empty(out_empty));

  assign msg_in_ready  = !in_full;
  assign msg_out_valid = !out_empty;

  // A read waits until its answer fits in the output FIFO
  logic [7:0]  idx;
  logic [31:0] val;
  assign idx      = in_head[39:32];
  assign val      = in_head[31:0];
  assign in_pop   = !in_empty && (!idx[7] || !out_full);
  assign out_push = in_pop && idx[7];
  assign out_word = {idx, status[idx[2:0]]};

  logic [79:0] aw_bits, ar_bits;
  assign aw_prm = axi_param_t'(aw_bits);
  assign ar_prm = axi_param_t'(ar_bits);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      burst_mode  <= BMODE_BL8;
      phyupd_req  <= 1'b0;
      phymstr_req <= 1'b0;
      phyupd_type <= 2'd0;
      t_init      <= 16'd16;
      axi_base    <= '0;
      aw_bits     <= PRM_RESET;
      ar_bits     <= PRM_RESET;
    end else if (in_pop && !idx[7]) begin
      case (idx[6:0])
        7'h00: begin
          burst_mode  <= burst_mode_e'(val[1:0]);
          phyupd_req  <= val[2];
          phymstr_req <= val[3];
          phyupd_type <= val[5:4];
        end
        7'h01: t_init          <= val[15:0];
        7'h02: axi_base[31:0]  <= val;
        7'h03: axi_base[63:32] <= val;
        7'h04: aw_bits[31:0]   <= val;
        7'h05: aw_bits[63:32]  <= val;
        7'h06: aw_bits[79:64]  <= val[15:0];
        7'h08: ar_bits[31:0]   <= val;
        7'h09: ar_bits[63:32]  <= val;
        7'h0a: ar_bits[79:64]  <= val[15:0];
        default: ;
      endcase
    end
  end

endmodule
