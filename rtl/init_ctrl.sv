// init_ctrl - initialization and control unit of the DFI-to-AXI bridge.
//
// Plays the PHY's part of the DFI status interface. After reset, and again after
// every dfi_init_start request from the memory controller (used by DFI for a
// frequency-ratio change), it holds dfi_init_complete low for t_init DFI cycles,
// then raises it. dfi_freq_ratio is latched when the request is accepted and is the
// ratio the rest of the bridge uses to know how many phases are live. The unit
// returns to READY only after the controller has dropped dfi_init_start.
//
// The control part gates command decoding: cmd_enable is high in READY while the
// controller drives dfi_reset_n high and CKE (phase 0) high, as a DRAM ignores
// commands otherwise. init_count counts completed initializations.
//
// Timing: dfi_init_complete rises t_init + 1 cycles after the request is seen (the
// inputs are registered first). The handshake order follows the DFI status
// interface; the programmable delay and the gating rule are this design's own.
module init_ctrl
  import ddr_bridge_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] t_init,
  input  logic        dfi_init_start,
  input  logic [1:0]  dfi_freq_ratio,
  input  logic        dfi_reset_n,
  input  logic        dfi_cke,
  output logic        dfi_init_complete,
  output logic [1:0]  freq_ratio,
  output logic        cmd_enable,
  output logic [15:0] init_count
);

  typedef enum logic [1:0] {
    S_INIT  = 2'd0,   // counting the initialization delay
    S_DONE  = 2'd1,   // complete, waiting for dfi_init_start to drop
    S_READY = 2'd2
  } state_e;

  state_e      state;
  logic [15:0] cnt;
  logic        start_r, reset_n_r, cke_r;
  logic [1:0]  ratio_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_r   <= 1'b0;
      reset_n_r <= 1'b0;
      cke_r     <= 1'b0;
      ratio_r   <= 2'd0;
    end else begin
      start_r   <= dfi_init_start;
      reset_n_r <= dfi_reset_n;
      cke_r     <= dfi_cke;
      ratio_r   <= dfi_freq_ratio;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state             <= S_INIT;
      cnt               <= '0;
      dfi_init_complete <= 1'b0;
      freq_ratio        <= 2'd0;
      init_count        <= '0;
    end else begin
      case (state)
        S_INIT: begin
          if (cnt >= t_init) begin
            dfi_init_complete <= 1'b1;
            init_count        <= init_count + 16'd1;
            cnt               <= '0;
            state             <= S_DONE;
          end else begin
            cnt <= cnt + 16'd1;
          end
        end
        S_DONE: begin
          if (!start_r) state <= S_READY;
        end
        default: begin   // S_READY
          if (start_r) begin
            dfi_init_complete <= 1'b0;
            freq_ratio        <= (ratio_r == 2'd3) ? 2'd2 : ratio_r;
            cnt               <= '0;
            state             <= S_INIT;
          end
        end
      endcase
    end
  end

  assign cmd_enable = (state == S_READY) && reset_n_r && cke_r;

endmodule
