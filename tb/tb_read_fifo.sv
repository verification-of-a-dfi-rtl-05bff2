// tb_read_fifo - self-checking test of the read-path clock crossings.
//
// DFI clock 10 ns, AXI clock 6 ns. Random read-address packets go DFI -> AXI and
// random 531-bit read beats go AXI -> DFI into randomly chosen ones of the sixteen
// read-data queues at the same time, with random stalls on both reading sides.
// Checks order and contents of every queue separately, that one queue fills at 16
// entries with its 8-bit count at 16 while the others stay empty, and that no
// entry is lost.
module tb_read_fifo;
  import ddr_bridge_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic dfi_clk = 0, axi_clk = 0, dfi_rst_n = 0, axi_rst_n = 0;
  always #5 dfi_clk = ~dfi_clk;
  always #3 axi_clk = ~axi_clk;

  logic raddr_push, raddr_full, raddr_pop, raddr_empty;
  addr_pkt_t raddr_in, raddr_out;
  logic [NRQ-1:0] rdata_push, rdata_full, rdata_pop, rdata_empty;
  logic [NRQ-1:0][7:0] rdata_count;
  rdata_pkt_t rdata_in;
  rdata_pkt_t [NRQ-1:0] rdata_out;

  read_fifo dut (.dfi_clk, .dfi_rst_n, .axi_clk, .axi_rst_n,
    .raddr_push, .raddr_in, .raddr_full, .raddr_pop, .raddr_out, .raddr_empty,
    .rdata_push, .rdata_in, .rdata_full, .rdata_count, .rdata_pop, .rdata_out, .rdata_empty);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #30000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  addr_pkt_t  qa [$];
  rdata_pkt_t qr [NRQ][$];
  int got_a = 0, got_r = 0, sent_a = 0, sent_r = 0;
  bit stall_r = 1;

  function automatic rdata_pkt_t rnd_beat();
    rdata_pkt_t b;
    for (int i = 0; i < 17; i++) b[i*32 +: 32] = $urandom;
    b[530:512] = 19'($urandom);
    return b;
  endfunction

  // AXI side: pop addresses, push beats
  always @(posedge axi_clk) if (axi_rst_n) begin
    if (raddr_pop && !raddr_empty) begin
      check(raddr_out == qa.pop_front(), "address order/contents");
      got_a++;
    end
  end
  always @(negedge axi_clk) raddr_pop = ($urandom_range(0, 2) != 0);

  // DFI side: pop beats
  always @(posedge dfi_clk) if (dfi_rst_n) begin
    for (int q = 0; q < NRQ; q++) if (rdata_pop[q] && !rdata_empty[q]) begin
      check(qr[q].size() != 0 && rdata_out[q] == qr[q].pop_front(),
            $sformatf("queue %0d beat order/contents", q));
      got_r++;
    end
  end
  always @(negedge dfi_clk)
    for (int q = 0; q < NRQ; q++) rdata_pop[q] = !stall_r && ($urandom_range(0, 2) != 0);

  initial begin
    raddr_push = 0; rdata_push = 0; raddr_in = '0; rdata_in = '0;
    #19 dfi_rst_n = 1; axi_rst_n = 1;
    fork
      begin   // DFI side producer
        repeat (50) begin
          @(negedge dfi_clk);
          raddr_push = 0;
          if (!raddr_full && $urandom_range(0, 1) != 0) begin
            raddr_push = 1;
            raddr_in = {$urandom, $urandom, $urandom, $urandom, $urandom};
            qa.push_back(raddr_in); sent_a++;
          end
        end
        @(negedge dfi_clk); raddr_push = 0;
      end
      begin   // AXI side producer: first fill while the DFI side is stalled
        while (!rdata_full[5]) begin
          @(negedge axi_clk);
          rdata_push = 16'h0020; rdata_in = rnd_beat(); qr[5].push_back(rdata_in); sent_r++;
          @(posedge axi_clk); #0.1 rdata_push = 0;
        end
        check(sent_r == 16, $sformatf("read-data queue 5 full at %0d", sent_r));
        check(rdata_count[5] == 8'd16, "queue 5 fill count 16");
        check(rdata_full == 16'h0020, "only queue 5 full");
        repeat (4) @(posedge dfi_clk);
        check(rdata_empty == 16'hffdf, "only queue 5 holds data");
        stall_r = 0;
        repeat (300) begin
          int q;
          @(negedge axi_clk);
          rdata_push = 0;
          q = $urandom_range(0, NRQ - 1);
          if (!rdata_full[q] && $urandom_range(0, 1) != 0) begin
            rdata_push[q] = 1; rdata_in = rnd_beat(); qr[q].push_back(rdata_in); sent_r++;
          end
        end
        @(negedge axi_clk); rdata_push = 0;
      end
    join
    repeat (60) @(posedge dfi_clk);
    check(got_a == sent_a, $sformatf("addresses %0d of %0d", got_a, sent_a));
    check(got_r == sent_r, $sformatf("beats %0d of %0d", got_r, sent_r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
