// tb_stream_fsm: checks the stream DMA state machine against a transaction
// model written independently of it. For every block handed over the test
// works out which channel must take it and whether it carries SOP and EOP,
// from the mode bits, the buffer sizes and the block's tags, and compares.
// Scenarios: single DMA1 (one-shot), dual DMA1/2 cyclic with EvAppEOP
// ending DMA2 phases (SH2), pre-trigger mode with ring wraps and an
// EvPretrig, SH1, the wait for an unblock write, the return SDEND -> SD0,
// and the one idle cycle per phase change while both sinks are ready.
module tb_stream_fsm;
  import daq_pkg::*;
  logic clk = 0, rst_n = 0;
  ctrl_t ctrl;
  logic unblock = 0;
  logic [31:0] rdma1, rdma2;
  logic in_valid, in_ready;
  block_t in_data;
  logic st1_valid, st1_sop, st1_eop, st1_ready, st2_valid, st2_sop, st2_eop, st2_ready;
  logic [SAMPLE_W-1:0] st1_data, st2_data;
  logic [ST_ERR_W-1:0] st1_error, st2_error;
  sd_state_t state;
  logic [31:0] wcnt1, wcnt2, nbuf1, nbuf2, ev_wcnt, ev_nbuf;
  logic trgsig, waiting, ev_ch2, phase1_done, phase2_done;
  tags_t ev_tags;
  int checks = 0, failures = 0;

  stream_fsm dut (.clk, .rst_n, .ctrl, .unblock, .rdma1, .rdma2,
    .in_valid, .in_data, .in_ready,
    .st1_valid, .st1_data, .st1_sop, .st1_eop, .st1_error, .st1_ready,
    .st2_valid, .st2_data, .st2_sop, .st2_eop, .st2_error, .st2_ready,
    .state, .wcnt1, .wcnt2, .nbuf1, .nbuf2, .trgsig, .waiting,
    .ev_tags, .ev_ch2, .ev_wcnt, .ev_nbuf, .phase1_done, .phase2_done);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // block source: blocks[idx] is presented while idx < nblk
  block_t blocks[256];
  int nblk, nnext, idx;
  assign in_valid = rst_n && (idx < nblk);
  assign in_data  = blocks[idx < 256 ? idx : 0];

  // reference model state
  int  m_ph, m_rem, m_nb1, m_nb2;   // m_ph: 1 or 2, 0 = ended
  bit  m_first, m_trg;
  int  taken1, taken2, idle_at_change;
  bit  rnd_ready;

  always @(posedge clk) if (rst_n && in_valid && in_ready && (st1_valid || st2_valid)) begin
    bit ch2, sop, eop, endp;
    tags_t t;
    t = in_data.tags;
    ch2 = st2_valid;
    check(st1_valid ^ st2_valid, "exactly one channel valid on a transfer");
    check(m_ph != 0, $sformatf("block %0d taken after the sequence ended", idx));
    check(ch2 == (m_ph == 2), $sformatf("block %0d on channel %0d, want %0d", idx, ch2 ? 2 : 1, m_ph));
    sop = ch2 ? st2_sop : st1_sop;
    eop = ch2 ? st2_eop : st1_eop;
    if (m_ph == 1) endp = (m_rem <= 16) || (ctrl.b1totrg && t.pretrig) || (ctrl.sh1 && t.app_eop);
    else           endp = (m_rem <= 16) || (ctrl.sh2 && t.app_eop);
    check(sop == m_first, $sformatf("block %0d sop %0d want %0d", idx, sop, m_first));
    check(eop == endp, $sformatf("block %0d eop %0d want %0d", idx, eop, endp));
    check((ch2 ? st2_data : st1_data) == in_data.data, "data passed unchanged");
    check((ch2 ? st2_error : st1_error) == ST_ERR_W'(t), "tags on the error port");
    if (ch2) taken2++; else taken1++;
    m_first = 0;
    m_rem -= 16;
    if (m_ph == 1 && ctrl.b1totrg && t.pretrig) m_trg = 1;
    if (endp) begin
      m_first = 1;
      if (m_ph == 1) begin
        m_nb1++;
        if (ctrl.b1totrg) begin
          if (m_trg) begin m_ph = 2; m_rem = rdma2; m_trg = 0; end
          else             m_rem = rdma1;
        end else if (ctrl.b1tob2) begin m_ph = 2; m_rem = rdma2; end
        else if (ctrl.cyclic) m_rem = rdma1;
        else m_ph = 0;
      end else begin
        m_nb2++;
        if (ctrl.cyclic) begin m_ph = 1; m_rem = rdma1; end
        else m_ph = 0;
      end
    end
    idx++;
  end

  // blocks discarded while idle in SD0
  int ndisc = 0;
  always @(posedge clk) if (rst_n && in_valid && in_ready && !(st1_valid || st2_valid)) begin
    check(state == SD0, "a block leaves the FIFO only to a channel or in SD0");
    ndisc++;
    idx++;
  end

  // sinks: always ready or random
  always @(negedge clk) begin
    st1_ready = rnd_ready ? ($urandom_range(0, 3) != 0) : 1'b1;
    st2_ready = rnd_ready ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  task automatic make_blocks(input int n, input int pretrig_at, input int appeop_at);
    nblk = 0; nnext = n; idx = 0;
    for (int i = 0; i < n; i++) begin
      blocks[i].data = {$urandom, $urandom, $urandom, 32'(i)};
      blocks[i].tags = '0;
      if (i == pretrig_at) blocks[i].tags.pretrig = 1;
      if (i == appeop_at)  blocks[i].tags.app_eop = 1;
      if (i % 7 == 3)      blocks[i].tags.app = 1;
    end
  endtask

  task automatic start(input ctrl_t c, input int r1, input int r2, input bit rr);
    rst_n = 1; #1 rst_n = 0; ctrl = '0; rdma1 = r1; rdma2 = r2; rnd_ready = rr;
    m_ph = 1; m_rem = r1; m_first = 1; m_trg = 0; m_nb1 = 0; m_nb2 = 0;
    taken1 = 0; taken2 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk) ctrl = c; nblk = nnext;
  endtask

  task automatic wait_blocks(input int n);
    int guard = 0;
    while (idx < n && guard < 5000) begin @(posedge clk); guard++; end
    check(idx >= n, $sformatf("only %0d of %0d blocks taken", idx, n));
  endtask

  initial begin
    ctrl_t c;
    // ---- A: single DMA1, one shot: 4 blocks, then SDEND, then SD0 ----
    make_blocks(10, -1, -1);
    c = '0; c.dma_ena1 = 1;
    start(c, 64, 0, 0);
    repeat (30) @(posedge clk);
    check(idx == 4, $sformatf("single one-shot took %0d blocks, want 4", idx));
    check(state == SDEND, "single one-shot ends in SDEND");
    check(nbuf1 == 1 && phase1_done == 0, "one DMA1 buffer finished");
    @(negedge clk) ctrl.dma_ena1 = 0;
    @(posedge clk); @(posedge clk); #1;
    check(state == SD0, "SDEND -> SD0 when both enables clear");
    repeat (10) @(posedge clk);
    check(taken1 == 4 && ndisc == 6, $sformatf("SD0 discards the rest: %0d taken, %0d discarded", taken1, ndisc));

    // ---- B: dual cyclic, SH2 with EvAppEOP in the second DMA2 phase ----
    make_blocks(200, -1, 11);
    c = '0; c.dma_ena1 = 1; c.b1tob2 = 1; c.cyclic = 1; c.sh2 = 1;
    start(c, 48, 64, 1);
    wait_blocks(200);
    check(taken1 > 0 && taken2 > 0, "both channels used");
    check(nbuf1 == 32'(m_nb1) && nbuf2 == 32'(m_nb2), $sformatf("buffer counts %0d/%0d want %0d/%0d", nbuf1, nbuf2, m_nb1, m_nb2));

    // ---- C: pre-trigger, SH1 off, trigger at block 10, not cyclic ----
    make_blocks(40, 10, -1);
    c = '0; c.dma_ena1 = 1; c.dma_ena2 = 1; c.b1tob2 = 1; c.b1totrg = 1;
    start(c, 64, 80, 1);
    repeat (200) @(posedge clk);
    check(idx == 16, $sformatf("pre-trigger took %0d blocks, want 16", idx));
    check(taken1 == 11 && taken2 == 5, $sformatf("pre/post %0d/%0d want 11/5", taken1, taken2));
    check(nbuf1 == 3, $sformatf("pre-trigger ring buffers %0d want 3", nbuf1));
    check(state == SDEND, "pre-trigger sequence ends");

    // ---- D: pre-trigger without trigger never leaves DMA1; SH1 ends a phase ----
    make_blocks(60, -1, 6);
    c = '0; c.dma_ena1 = 1; c.b1totrg = 1; c.sh1 = 1;
    start(c, 32, 32, 1);
    wait_blocks(60);
    check(taken2 == 0, "no trigger: nothing on DMA2");

    // ---- E: dual cyclic with unblock required; idle cycle per change ----
    make_blocks(100, -1, -1);
    c = '0; c.dma_ena1 = 1; c.b1tob2 = 1; c.cyclic = 1; c.ublk_en = 1;
    start(c, 32, 32, 0);
    repeat (20) @(posedge clk); #1;
    check(idx == 4, $sformatf("held after one cycle: %0d blocks, want 4", idx));
    check(waiting && state == SD2E, "waiting in SD2E for unblock");
    @(negedge clk) unblock = 1;
    @(negedge clk) unblock = 0;
    repeat (20) @(posedge clk); #1;
    check(idx == 8, $sformatf("after one unblock: %0d blocks, want 8", idx));
    // timing: with ready sinks, leaving SD2E, 2 blocks in SD1, one cycle in
    // SD1E and 2 blocks in SD2 take 6 cycles
    @(negedge clk) unblock = 1;
    @(negedge clk) unblock = 0;
    begin
      int t0, n0;
      n0 = idx; t0 = 0;
      while (idx < n0 + 4 && t0 < 50) begin @(posedge clk); #1; t0++; end
      check(t0 == 6, $sformatf("4 blocks across one phase change took %0d cycles, want 6", t0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
