// ddr_bridge_pkg - types and constants shared by the DFI-to-AXI bridge.
//
// The bridge sits where a DDR4 PHY would sit: a memory controller talks to it over
// DFI, and it replays every column command as an AXI master transaction. This
// package fixes the widths of the three buses it joins and the formats of the
// packets that cross its clock domains.
//
// Widths printed in the waveforms of the design's read path: 32-bit DFI address and
// DFI data word per phase, 64-bit AXI address, 512-bit AXI data, 8-bit AXI ID, a
// 160-bit read-address queue entry, a 531-bit read-data queue entry and a 128-bit
// reassembled read burst. Four DFI phases cover the 1:1, 1:2 and 1:4 frequency
// ratios. DDR4 geometry (17-bit row, 10-bit column, 4 bank groups of 4 banks)
// follows the DDR4 description the design targets. Field widths inside the AXI
// parameter word, the burst-mode encoding and the remaining packet layouts are this
// design's own choices.
package ddr_bridge_pkg;

  // ---------------- DFI side ----------------
  localparam int unsigned PHASES     = 4;   // DFI phases, enough for 1:4
  localparam int unsigned DFI_ADDR_W = 32;  // dfi_address_pN width
  localparam int unsigned DFI_DATA_W = 32;  // dfi_wrdata / dfi_rddata word per phase
  localparam int unsigned DFI_MASK_W = DFI_DATA_W / 8;
  localparam int unsigned WORD_BYTES = DFI_DATA_W / 8;
  localparam int unsigned MAX_WORDS  = 4;   // BL8 = four DFI data words
  localparam int unsigned BURST_W    = MAX_WORDS * DFI_DATA_W;  // 128-bit RDATA / WDATA
  localparam int unsigned BURST_BYTES = BURST_W / 8;            // 16

  // DDR4 geometry: row = {RAS_n (A16), CAS_n (A15), A14..A0}
  localparam int unsigned ROW_W = 17;
  localparam int unsigned COL_W = 10;
  localparam int unsigned BG_W  = 2;
  localparam int unsigned BA_W  = 2;
  localparam int unsigned NBANK = 1 << (BG_W + BA_W);

  // ---------------- AXI side ----------------
  localparam int unsigned AXI_ADDR_W  = 64;
  localparam int unsigned AXI_DATA_W  = 512;
  localparam int unsigned AXI_STRB_W  = AXI_DATA_W / 8;
  localparam int unsigned AXI_ID_W    = 8;
  localparam int unsigned AXI_USER_W  = 8;
  localparam int unsigned AXI_LANE_W  = $clog2(AXI_STRB_W);   // 6

  // Read-data queues: one per value of RID[3:0], each beat 531 bits
  localparam int unsigned NRQ      = 16;
  localparam int unsigned RQ_SEL_W = $clog2(NRQ);

  // DFI frequency ratio (dfi_freq_ratio encoding)
  typedef enum logic [1:0] {
    FREQ_1_1 = 2'd0,
    FREQ_1_2 = 2'd1,
    FREQ_1_4 = 2'd2
  } freq_ratio_e;

  // Burst types the bridge handles: single write/read, burst chop 4, burst length 8
  typedef enum logic [1:0] {
    BURST_1 = 2'd0,
    BURST_4 = 2'd1,
    BURST_8 = 2'd2
  } burst_e;

  // How the burst type of a RD/WR is chosen (configuration)
  typedef enum logic [1:0] {
    BMODE_BL8    = 2'd0,  // every RD/WR is BL8
    BMODE_OTF    = 2'd1,  // on the fly: A12 (BC_n) = 1 -> BL8, 0 -> BC4
    BMODE_BC4    = 2'd2,  // every RD/WR is BC4
    BMODE_SINGLE = 2'd3   // every RD/WR moves one DFI word
  } burst_mode_e;

  // DDR4 commands seen on one DFI phase
  typedef enum logic [3:0] {
    CMD_DES  = 4'd0,   // deselect / NOP
    CMD_MRS  = 4'd1,
    CMD_REF  = 4'd2,
    CMD_PRE  = 4'd3,
    CMD_PREA = 4'd4,
    CMD_ACT  = 4'd5,
    CMD_WR   = 4'd6,
    CMD_WRA  = 4'd7,
    CMD_RD   = 4'd8,
    CMD_RDA  = 4'd9,
    CMD_ZQC  = 4'd10,
    CMD_RFU  = 4'd11
  } dfi_cmd_e;

  // States of the DFI interaction state machine
  typedef enum logic [3:0] {
    INTERACTION_IDLE      = 4'd0,
    TPHYUPD               = 4'd1,
    TPHYMSTR              = 4'd2,
    PHYUPD_REQ            = 4'd3,
    PHY_REQ               = 4'd4,
    UPD_REQ               = 4'd5,
    PHYUPD_INITSTART_REQ  = 4'd6,
    PHYMSTR_REQ           = 4'd7,
    PHYMSTR_INITSTART_REQ = 4'd8,
    PHYMSTR_LP_REQ        = 4'd9
  } interaction_e;

  // AXI address-channel parameters, in the order the configuration messages carry
  // them (most significant first). 80 bits.
  typedef struct packed {
    logic [29:0] dummy3;
    logic [7:0]  user;
    logic [3:0]  region;
    logic [3:0]  qos;
    logic [7:0]  len;
    logic [2:0]  dummy1;
    logic [2:0]  size;
    logic [1:0]  burst;
    logic        lock;
    logic [3:0]  cache;
    logic [1:0]  dummy2;
    logic [2:0]  prot;
    logic [7:0]  id;
  } axi_param_t;

  // Address queue entry (read and write alike): 160 bits
  typedef struct packed {
    logic [15:0]           rsvd;
    logic [AXI_ADDR_W-1:0] addr;
    axi_param_t            prm;
  } addr_pkt_t;

  // Write data queue entry: one whole DRAM burst with byte strobes
  typedef struct packed {
    logic [BURST_BYTES-1:0] strb;
    logic [BURST_W-1:0]     data;
  } wdata_pkt_t;

  // Read data queue entry: one AXI R beat, 531 bits
  typedef struct packed {
    logic [AXI_USER_W-1:0] user;
    logic                  last;
    logic [1:0]            resp;
    logic [AXI_ID_W-1:0]   id;
    logic [AXI_DATA_W-1:0] data;
  } rdata_pkt_t;

  // Number of DFI data words of a burst type
  function automatic logic [2:0] burst_words(burst_e b);
    case (b)
      BURST_1: return 3'd1;
      BURST_4: return 3'd2;
      default: return 3'd4;
    endcase
  endfunction

  // AXI INCR transfer of nbytes bytes from addr with beat size 2**size: index of the
  // last beat, i.e. the AxLEN value
  function automatic logic [7:0] axi_len(logic [AXI_LANE_W-1:0] lane, logic [2:0] size,
                                         logic [4:0] nbytes);
    logic [7:0] first, last;
    first = 8'(lane >> size);
    last  = 8'((7'(lane) + 7'(nbytes) - 7'd1) >> size);
    return last - first;
  endfunction

  // Beat (counted from 0) in which byte j of the same transfer travels
  function automatic logic [7:0] axi_beat_of(logic [AXI_LANE_W-1:0] lane, logic [2:0] size,
                                             logic [4:0] j);
    return 8'((7'(lane) + 7'(j)) >> size) - 8'(lane >> size);
  endfunction

endpackage
