// tb_write_fifo - self-checking test of the write-path clock crossing.
//
// DFI clock 10 ns, AXI clock 7 ns. Pushes random address/data pairs while
// respecting push_full, pops them on the AXI side with random stalls, and checks
// that every pair arrives once, in order and unchanged; that the queue reports full
// after exactly 16 entries while the AXI side is stalled; and that nothing is
// visible on the AXI side before the second AXI clock edge after the push.
module tb_write_fifo;
  import ddr_bridge_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic dfi_clk = 0, axi_clk = 0, dfi_rst_n = 0, axi_rst_n = 0;
  always #5 dfi_clk = ~dfi_clk;
  always #3.5 axi_clk = ~axi_clk;

  logic push, push_full, pop, pop_valid;
  addr_pkt_t push_addr, pop_addr;
  wdata_pkt_t push_data, pop_data;

  write_fifo dut (.dfi_clk, .dfi_rst_n, .push, .push_addr, .push_data, .push_full,
                  .axi_clk, .axi_rst_n, .pop, .pop_valid, .pop_addr, .pop_data);

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

  addr_pkt_t  qa [$];
  wdata_pkt_t qd [$];
  int received = 0;
  bit stall = 1;

  always @(posedge axi_clk) if (axi_rst_n && pop && pop_valid) begin
    addr_pkt_t ea; wdata_pkt_t ed;
    ea = qa.pop_front(); ed = qd.pop_front();
    check(pop_addr == ea && pop_data == ed, $sformatf("entry %0d mismatch", received));
    received++;
  end
  always @(negedge axi_clk) pop = !stall && ($urandom_range(0, 3) != 0);

  initial begin
    int sent, n_full;
    push = 0; push_addr = '0; push_data = '0;
    #23 dfi_rst_n = 1; axi_rst_n = 1;
    // fill while the AXI side is stalled
    sent = 0;
    while (!push_full) begin
      @(negedge dfi_clk);
      if (!push_full) begin
        push = 1;
        push_addr = {$urandom, $urandom, $urandom, $urandom, $urandom};
        push_data = wdata_pkt_t'({$urandom, $urandom, $urandom, $urandom, 16'($urandom)});
        qa.push_back(push_addr); qd.push_back(push_data);
        sent++;
        if (sent == 1) begin
          @(posedge dfi_clk); #0.1 push = 0;
          @(posedge axi_clk); #0.1;
          check(!pop_valid, "not visible after one AXI edge");
          @(posedge axi_clk); #0.1;
          check(pop_valid, "visible after two AXI edges");
        end
      end
      @(posedge dfi_clk); #0.1 push = 0;
    end
    n_full = sent;
    check(n_full == 16, $sformatf("full after %0d entries", n_full));
    stall = 0;
    // random traffic
    repeat (60) begin
      @(negedge dfi_clk);
      if (!push_full && $urandom_range(0, 1) != 0) begin
        push = 1;
        push_addr = {$urandom, $urandom, $urandom, $urandom, $urandom};
        push_data = wdata_pkt_t'({$urandom, $urandom, $urandom, $urandom, 16'($urandom)});
        qa.push_back(push_addr); qd.push_back(push_data);
        sent++;
      end else push = 0;
    end
    @(negedge dfi_clk); push = 0;
    repeat (40) @(posedge axi_clk);
    check(received == sent, $sformatf("received %0d of %0d", received, sent));
    check(qa.size() == 0, "queue drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
