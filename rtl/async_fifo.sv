// async_fifo - dual-clock FIFO used by every clock-domain crossing of the bridge.
//
// Classic Gray-pointer design: binary read and write pointers with one extra wrap
// bit, converted to Gray code, registered and passed through a two-flop
// synchronizer into the other domain. Full is computed in the write domain against
// the synchronized read pointer, empty in the read domain against the synchronized
// write pointer, so both flags are pessimistic and never wrong. The storage is a
// plain register array with registered write and combinational (first-word
// fall-through) read.
//
// Interface: push when wr_en and !full (a push while full is dropped and trips an
// assertion); rd_data shows the head whenever !empty, pop with rd_en. wr_count is
// the write-side fill level. A word is visible to the reader after the second
// read-clock edge that follows the write-clock edge storing it; a pop frees its
// slot for the writer two write-clock edges later. This FIFO is the design's own choice of crossing scheme.
module async_fifo #(
  parameter int unsigned WIDTH      = 32,
  parameter int unsigned DEPTH_LOG2 = 4
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  output logic [DEPTH_LOG2:0] wr_count,

  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);
  localparam int unsigned DEPTH = 1 << DEPTH_LOG2;
  localparam int unsigned PW    = DEPTH_LOG2 + 1;

  logic [WIDTH-1:0] mem [DEPTH];

  logic [PW-1:0] wptr_bin, wptr_gray, rptr_bin, rptr_gray;
  logic [PW-1:0] rgray_w1, rgray_w2;   // read pointer seen in write domain
  logic [PW-1:0] wgray_r1, wgray_r2;   // write pointer seen in read domain

  function automatic logic [PW-1:0] bin2gray(logic [PW-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [PW-1:0] gray2bin(logic [PW-1:0] g);
    logic [PW-1:0] b;
    b[PW-1] = g[PW-1];
    for (int i = PW - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  logic [PW-1:0] wptr_bin_nxt;
  logic          do_wr;
  assign do_wr        = wr_en && !full;
  assign wptr_bin_nxt = wptr_bin + PW'(do_wr);

  always_ff @(posedge wr_clk) begin
    if (do_wr) mem[wptr_bin[DEPTH_LOG2-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wptr_bin  <= '0;
      wptr_gray <= '0;
      rgray_w1  <= '0;
      rgray_w2  <= '0;
    end else begin
      wptr_bin  <= wptr_bin_nxt;
      wptr_gray <= bin2gray(wptr_bin_nxt);
      rgray_w1  <= rptr_gray;
      rgray_w2  <= rgray_w1;
    end
  end

  logic [PW-1:0] rbin_w;
  assign rbin_w   = gray2bin(rgray_w2);
  assign wr_count = wptr_bin - rbin_w;
  assign full     = (wr_count == PW'(DEPTH));

  // ---------------- read domain ----------------
  logic [PW-1:0] rptr_bin_nxt;
  logic          do_rd;
  assign do_rd        = rd_en && !empty;
  assign rptr_bin_nxt = rptr_bin + PW'(do_rd);

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rptr_bin  <= '0;
      rptr_gray <= '0;
      wgray_r1  <= '0;
      wgray_r2  <= '0;
    end else begin
      rptr_bin  <= rptr_bin_nxt;
      rptr_gray <= bin2gray(rptr_bin_nxt);
      wgray_r1  <= wptr_gray;
      wgray_r2  <= wgray_r1;
    end
  end

  assign empty   = (rptr_gray == wgray_r2);
  assign rd_data = mem[rptr_bin[DEPTH_LOG2-1:0]];

  // A producer must look at full before pushing
  a_no_push_when_full: assert property (@(posedge wr_clk) disable iff (!wr_rst_n)
                                        !(wr_en && full))
    else $error("async_fifo: push while full");

endmodule
