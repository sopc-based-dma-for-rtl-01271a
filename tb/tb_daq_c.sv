// tb_daq_c: drives the DAQ adapter through its register slave, with the
// samples simulator as source and two simple Avalon-ST sinks standing in
// for the DMA controllers. A 16-block FIFO keeps the run short.
//   1) pre-trigger mode: the DMA1 ring wraps until the block tagged
//      EvPretrig, which ends the DMA1 phase with EOP; the following samples
//      go to DMA2 until its buffer is full. Checks channel, SOP/EOP and the
//      sample count of every block, and the trigger's event registers.
//   2) overrun: stalled sinks let the FIFO fill; the first block after the
//      gap carries EvOverrun on the error port, the flag and irq are set and
//      dropped blocks are counted.
module tb_daq_c;
  import daq_pkg::*;
  logic clk_s = 0, clk2 = 0, rst_n = 1;
  logic ext_valid = 0;
  logic [SAMPLE_W-1:0] ext_data = '0;
  logic [3:0] ext_tags = '0;
  logic [31:0] dropped;
  logic [CSR_AW-1:0] csr_address = '0;
  logic csr_read = 0, csr_write = 0, csr_readdatavalid, irq;
  logic [31:0] csr_writedata = '0, csr_readdata;
  logic st1_valid, st1_sop, st1_eop, st1_ready, st2_valid, st2_sop, st2_eop, st2_ready;
  logic [SAMPLE_W-1:0] st1_data, st2_data;
  logic [ST_ERR_W-1:0] st1_error, st2_error;
  int checks = 0, failures = 0;

  daq_c #(.FIFO_DEPTH(16)) dut (.clk_s, .rst_s_n(rst_n), .clk2, .rst2_n(rst_n),
    .ext_valid, .ext_data, .ext_tags, .dropped,
    .csr_address, .csr_read, .csr_write, .csr_writedata, .csr_readdata, .csr_readdatavalid, .irq,
    .st1_valid, .st1_data, .st1_sop, .st1_eop, .st1_error, .st1_ready,
    .st2_valid, .st2_data, .st2_sop, .st2_eop, .st2_error, .st2_ready);

  // reset: give the asynchronous reset a falling edge at the start
  initial begin
    #1;
    rst_n = 0;
  end

  always #3.5 clk_s = ~clk_s;
  always #5   clk2  = ~clk2;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic wr(input logic [CSR_AW-1:0] a, input logic [31:0] d);
    @(negedge clk2); csr_address = a; csr_write = 1; csr_writedata = d;
    @(negedge clk2); csr_write = 0;
  endtask

  task automatic rd(input logic [CSR_AW-1:0] a, output logic [31:0] d);
    @(negedge clk2); csr_address = a; csr_read = 1;
    @(negedge clk2); csr_read = 0;
    d = csr_readdata;
  endtask

  // record of blocks received by the two sinks
  typedef struct { bit ch2; bit sop; bit eop; logic [15:0] s0; logic [7:0] err; } rec_t;
  rec_t log_q[$];
  bit stall = 0;
  always @(negedge clk2) begin
    st1_ready = !stall && ($urandom_range(0, 4) != 0);
    st2_ready = !stall && ($urandom_range(0, 4) != 0);
  end
  always @(posedge clk2) begin
    if (st1_valid && st1_ready) log_q.push_back('{0, st1_sop, st1_eop, st1_data[15:0], st1_error});
    if (st2_valid && st2_ready) log_q.push_back('{1, st2_sop, st2_eop, st2_data[15:0], st2_error});
  end

  initial begin
    logic [31:0] d, d0;
    repeat (3) @(posedge clk2);
    rst_n = 1;
    // ---------------- 1) pre-trigger ----------------
    wr(A_RDMA1, 128); wr(A_RDMA2, 256);
    wr(A_SIMRATE, 1); wr(A_SIMEVAT, 29); wr(A_SIMEVTAG, 32'h1);
    wr(A_IRQMASK, 32'h40);
    // DMA_ena1, DMA_ena2, B1toB2, B1toTrg, simulator
    wr(A_CTRL, 32'h0000_041E);
    repeat (400) @(posedge clk2);
    rd(A_STATUS, d);
    check(d[2:0] == 3'(SDEND), $sformatf("state %0d, want SDEND", d[2:0]));
    check(irq, "irq for finished DMA2 phase");
    check(log_q.size() == 46, $sformatf("%0d blocks, want 46", log_q.size()));
    for (int k = 0; k < log_q.size() && k < 46; k++) begin
      bit ch2, sop, eop;
      ch2 = (k >= 30);
      sop = (k == 0 || k == 8 || k == 16 || k == 24 || k == 30);
      eop = (k == 7 || k == 15 || k == 23 || k == 29 || k == 45);
      check(log_q[k].ch2 == ch2, $sformatf("block %0d channel", k));
      check(log_q[k].sop == sop && log_q[k].eop == eop, $sformatf("block %0d sop/eop %0d%0d", k, log_q[k].sop, log_q[k].eop));
      check(log_q[k].s0 == 16'(8 * k), $sformatf("block %0d first sample %0d", k, log_q[k].s0));
      check(log_q[k].err == ((k == 29) ? 8'h01 : 8'h00), $sformatf("block %0d error port", k));
    end
    rd(A_EV_BASE, d);      check(d == 32, $sformatf("trigger wCnt1 %0d, want 32", d));
    rd(A_EV_BASE + 1, d);  check(d == 3,  $sformatf("trigger buffers %0d, want 3", d));
    rd(A_NBUF1, d);        check(d == 4,  $sformatf("NBUF1 %0d, want 4", d));
    rd(A_NBUF2, d);        check(d == 1,  $sformatf("NBUF2 %0d, want 1", d));
    // ---------------- 2) overrun ----------------
    wr(A_CTRL, 0);               // stop; SDEND -> SD0 discards the FIFO
    repeat (50) @(posedge clk2);
    rd(A_FIFOUSED, d);
    check(d == 0, $sformatf("FIFO emptied in SD0, %0d left", d));
    wr(A_EVFLAGS, 32'h7F);
    log_q.delete();
    d0 = dropped;
    stall = 1;
    wr(A_SIMRATE, 3); wr(A_SIMEVTAG, 0); wr(A_RDMA1, 1024);
    wr(A_IRQMASK, 32'h10);
    wr(A_CTRL, 32'h0000_0422);   // DMA_ena1, cyclic, simulator: single mode
    repeat (100) @(posedge clk2);
    check(dropped > d0, "blocks dropped while the sinks stall");
    stall = 0;
    repeat (100) @(posedge clk2);
    begin
      automatic int gap_at = -1;
      for (int k = 1; k < log_q.size(); k++)
        if (log_q[k].s0 != log_q[k-1].s0 + 16'd8) begin gap_at = k; break; end
      check(gap_at > 0, "sample sequence has a gap");
      if (gap_at > 0) begin
        check(log_q[gap_at].err[4], "first block after the gap carries EvOverrun");
        check(log_q[gap_at - 1].err == 0, "block before the gap is clean");
        check(16'(log_q[gap_at].s0 - log_q[gap_at-1].s0) == 16'(8 * (dropped - d0 + 1)),
              $sformatf("gap of %0d samples matches %0d dropped blocks", 16'(log_q[gap_at].s0 - log_q[gap_at-1].s0), dropped - d0));
      end
    end
    rd(A_EVFLAGS, d);
    check(d[4], "EvOverrun flag");
    check(irq, "irq on EvOverrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk2);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
