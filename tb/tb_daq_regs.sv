// tb_daq_regs: checks the adapter's register file: read-back of the
// writable registers, the unblock pulse, the live status words, capture of
// the byte counter and buffer count for each event, write-1-to-clear flags,
// the irq mask, and the one-cycle read latency.
module tb_daq_regs;
  import daq_pkg::*;
  logic clk = 0, rst_n = 1;
  logic [CSR_AW-1:0] address = '0;
  logic read = 0, write = 0;
  logic [31:0] writedata = '0, readdata;
  logic readdatavalid;
  ctrl_t ctrl;
  logic unblock;
  logic [31:0] rdma1, rdma2, sim_ev_at;
  logic [15:0] sim_rate;
  logic [3:0] sim_ev_tags;
  sd_state_t state = SD2;
  logic trgsig = 1, waiting = 0;
  logic [31:0] wcnt1 = 32'h111, wcnt2 = 32'h222, nbuf1 = 3, nbuf2 = 4;
  logic [12:0] fifo_used = 13'd77;
  tags_t ev_tags = '0;
  logic ev_ch2 = 0, phase1_done = 0, phase2_done = 0;
  logic [31:0] ev_wcnt = '0, ev_nbuf = '0;
  logic irq;
  int checks = 0, failures = 0;

  daq_regs dut (.clk, .rst_n, .address, .read, .write, .writedata, .readdata, .readdatavalid,
    .ctrl, .unblock, .rdma1, .rdma2, .sim_rate, .sim_ev_at, .sim_ev_tags,
    .state, .trgsig, .waiting, .wcnt1, .wcnt2, .nbuf1, .nbuf2, .fifo_used,
    .ev_tags, .ev_ch2, .ev_wcnt, .ev_nbuf, .phase1_done, .phase2_done, .irq);

  // reset: give the asynchronous reset a falling edge at the start
  initial begin
    #1;
    rst_n = 0;
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); address = CSR_AW'(a); write = 1; writedata = d;
    @(negedge clk); write = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); address = CSR_AW'(a); read = 1;
    #1 check(!readdatavalid, "no data in the request cycle");
    @(posedge clk); #1;
    check(readdatavalid, "readdatavalid one cycle after read");
    d = readdata;
    @(negedge clk); read = 0;
  endtask

  task automatic expect_rd(input int a, input logic [31:0] e);
    logic [31:0] d;
    rd(a, d);
    check(d == e, $sformatf("reg %0d = %h, want %h", a, d, e));
  endtask

  task automatic event_pulse(input int e, input bit ch2, input logic [31:0] w, input logic [31:0] n);
    @(negedge clk);
    ev_tags = tags_t'(5'(1 << e)); ev_ch2 = ch2; ev_wcnt = w; ev_nbuf = n;
    @(negedge clk);
    ev_tags = '0; ev_wcnt = 32'hdead; ev_nbuf = 32'hbeef;
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // writable registers
    wr(A_RDMA1, 32'h0001_0000); wr(A_RDMA2, 32'h0000_8000);
    wr(A_SIMRATE, 32'h0000_0003); wr(A_SIMEVAT, 32'd1234); wr(A_SIMEVTAG, 32'h9);
    expect_rd(A_RDMA1, 32'h0001_0000); expect_rd(A_RDMA2, 32'h0000_8000);
    expect_rd(A_SIMRATE, 3); expect_rd(A_SIMEVAT, 1234); expect_rd(A_SIMEVTAG, 9);
    check(rdma1 == 32'h0001_0000 && rdma2 == 32'h8000 && sim_rate == 3 && sim_ev_at == 1234 && sim_ev_tags == 9,
          "register outputs");
    // control: bit 0 is a pulse, bits 1..10 stick
    fork
      wr(A_CTRL, 32'h0000_07FF);
      begin
        int n = 0;
        repeat (4) begin @(posedge clk); #1; if (unblock) n++; end
        check(n == 1, $sformatf("unblock pulse lasted %0d cycles", n));
      end
    join
    expect_rd(A_CTRL, 32'h0000_07FE);
    check(ctrl.dma_ena1 && ctrl.dma_ena2 && ctrl.b1tob2 && ctrl.b1totrg && ctrl.cyclic &&
          ctrl.sh1 && ctrl.sh2 && ctrl.ublk_en && ctrl.evins && ctrl.src_sim, "control bits");
    wr(A_CTRL, 32'h0000_0012);
    check(ctrl.dma_ena1 && ctrl.b1totrg && !ctrl.cyclic && !ctrl.src_sim, "control bits rewritten");
    // live status
    expect_rd(A_STATUS, {27'b0, 1'b0, 1'b1, 3'(SD2)});
    expect_rd(A_WCNT1, 32'h111); expect_rd(A_WCNT2, 32'h222);
    expect_rd(A_NBUF1, 3); expect_rd(A_NBUF2, 4); expect_rd(A_FIFOUSED, 77);
    // events
    expect_rd(A_EVFLAGS, 0);
    check(!irq, "no irq after reset");
    for (int e = 0; e < NTAGS; e++)
      event_pulse(e, e[0], 32'h1000 + 32'(e), 32'd10 + 32'(e));
    @(negedge clk) phase2_done = 1;
    @(negedge clk) phase2_done = 0;
    expect_rd(A_EVFLAGS, 32'h5F);
    for (int e = 0; e < NTAGS; e++) begin
      expect_rd(A_EV_BASE + 2*e, 32'h1000 + 32'(e));
      expect_rd(A_EV_BASE + 2*e + 1, {e[0], 31'(10 + e)});
    end
    // irq mask
    check(!irq, "irq masked");
    wr(A_IRQMASK, 32'h40);
    @(posedge clk); #1;
    check(irq, "irq on DMA2 phase flag");
    wr(A_EVFLAGS, 32'h40);
    @(posedge clk); #1;
    check(!irq, "irq gone after clearing the flag");
    expect_rd(A_EVFLAGS, 32'h1F);
    wr(A_EVFLAGS, 32'h05);
    expect_rd(A_EVFLAGS, 32'h1A);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
