// tb_pcie_daq_dma: end-to-end test of the stream DMA subsystem at its
// default size (4096-block input FIFO). Two Avalon-ST sinks stand in for the
// DMA controllers and a register-access task for the host. Every block that
// reaches a sink is checked against a transaction model of the acquisition
// modes (channel, SOP, EOP) and against its source (sample continuity, tags
// on the error port, events byte). The scenarios, in order:
//   S1 single DMA1, one shot, simulator source
//   S2 single DMA1, cyclic, each new cycle waiting for an unblock write
//   S3 dual DMA1/DMA2, cyclic, external source, SH1/SH2 early ends on
//      EvAppEOP, events byte in the data
//   S4 pre-trigger: DMA1 ring until EvPretrig, then DMA2; trigger event
//      registers; adapter interrupt on the RxmIrq vector
//   S5 overrun: sinks stall until the FIFO overflows; EvOverrun marks the
//      gap; then the FIFO drains at one block per clk2 cycle (16 bytes at
//      100 MHz = 1600 MB/s)
//   S6 memory traffic: the data and descriptor masters of both DMA
//      controllers and the memory-to-memory DMA behind bridges B3 (writes)
//      and B4 (reads) all write bursts and read at the same time, to host
//      and to board memory; bridge B2 is a plain connection here (clk1 = clk2),
//      the PCIe Txs slave and the DDR3 controller are models that stall at
//      random and answer reads after 12 and 3 cycles
// Each mechanism is counted; one that never happened counts as a failure.
module tb_pcie_daq_dma;
  import daq_pkg::*;
  import avmm_pkg::*;
  logic npor_n = 1, clk_s = 0, clk2 = 0;
  logic ext_valid = 0;
  logic [SAMPLE_W-1:0] ext_data = '0;
  logic [3:0] ext_tags = '0;
  logic [31:0] dropped;
  logic [CSR_AW-1:0] csr_address = '0;
  logic csr_read = 0, csr_write = 0, csr_readdatavalid;
  logic [31:0] csr_writedata = '0, csr_readdata;
  logic st1_valid, st1_sop, st1_eop, st1_ready, st2_valid, st2_sop, st2_eop, st2_ready;
  logic [SAMPLE_W-1:0] st1_data, st2_data;
  logic [ST_ERR_W-1:0] st1_error, st2_error;
  logic [2:0] dma_irq = '0;
  logic [15:0] rxm_irq;
  logic clk1;
  avmm_req_t dma_m_req [6];
  avmm_rsp_t dma_m_rsp [6];
  avmm_req_t b3m_req, b4m_req;
  avmm_rsp_t b3m_rsp, b4m_rsp;
  // the masters of S6: 0..5 the stream DMA masters, 6 and 7 the
  // memory-to-memory DMA behind bridges B3 and B4
  avmm_req_t drv_req [8];
  avmm_rsp_t drv_rsp [8];
  always_comb begin
    for (int i = 0; i < 6; i++) dma_m_req[i] = drv_req[i];
    b3m_req = drv_req[6];
    b4m_req = drv_req[7];
  end
  always_comb begin
    for (int i = 0; i < 6; i++) drv_rsp[i] = dma_m_rsp[i];
    drv_rsp[6] = b3m_rsp;
    drv_rsp[7] = b4m_rsp;
  end
  avmm_req_t b2s_req, b2m_req, txs_req, ddr_req;
  avmm_rsp_t b2s_rsp, b2m_rsp, txs_rsp, ddr_rsp;
  int checks = 0, failures = 0;

  // bridge B2 reduced to a wire, both of its clocks the same
  assign clk1    = clk2;
  assign b2m_req = b2s_req;
  assign b2s_rsp = b2m_rsp;

  pcie_daq_dma dut (.npor_n, .clk_s, .clk2, .ext_valid, .ext_data, .ext_tags, .dropped,
    .csr_address, .csr_read, .csr_write, .csr_writedata, .csr_readdata, .csr_readdatavalid,
    .st1_valid, .st1_data, .st1_sop, .st1_eop, .st1_error, .st1_ready,
    .st2_valid, .st2_data, .st2_sop, .st2_eop, .st2_error, .st2_ready,
    .clk1, .dma_m_req, .dma_m_rsp, .b2s_req, .b2s_rsp, .b2m_req, .b2m_rsp,
    .b3m_req, .b3m_rsp, .b4m_req, .b4m_rsp,
    .txs_req, .txs_rsp, .ddr_req, .ddr_rsp,
    .dma_irq, .rxm_irq);

  // ---------------- memory slaves (PCIe Txs, DDR3) and DMA masters ----------------
  typedef struct {
    int p;
    int m;
    logic [ADDR_W-1:0] addr;
    int len;
    int ready;
  } mrd_t;
  mrd_t mrq[$];                            // reads accepted by the slaves
  int   mem_lat [2] = '{12, 3};
  int   mem_beat [2] = '{0, 0};
  int   mem_wleft [2] = '{0, 0};
  logic [ADDR_W-1:0] mem_waddr [2];
  int   mem_cyc = 0, mem_stall = 0;
  int   mem_del [2];                       // master receiving read data this cycle
  logic [DATA_W-1:0] mem_del_data [2];
  bit   mem_on = 0;
  int   rd_owner[$];                       // master of each read, in slave order
  int   mc_arb, mc_held_burst, mc_host, mc_board, mc_region_wait, mc_mem_arb, mc_parallel, mem_wbeats, mem_rbeats;
  int   mem_wb [2], mem_wm [2];       // beat and master of the burst being written

  function automatic logic [DATA_W-1:0] mem_rdata(input int p, input logic [ADDR_W-1:0] a, input int b);
    return {32'(p), 32'(a >> 32), 32'(a), 32'(b)};
  endfunction
  function automatic logic [DATA_W-1:0] mem_wdata(input int m, input logic [ADDR_W-1:0] a, input int b);
    return {32'(m), 32'(a >> 32), 32'(a), 32'(b) ^ 32'hABCD_0000};
  endfunction

  function automatic avmm_rsp_t mem_rsp_of(input int p);
    avmm_rsp_t r;
    r.waitrequest   = (int'($urandom % 100) < mem_stall);
    r.readdatavalid = 0;
    r.readdata      = '0;
    mem_del[p] = -1;
    for (int k = 0; k < mrq.size(); k++)
      if (mrq[k].p == p) begin
        if (mem_cyc >= mrq[k].ready) begin
          r.readdatavalid = 1;
          mem_del_data[p] = mem_rdata(p, mrq[k].addr, mem_beat[p]);
          r.readdata = mem_del_data[p];
          mem_del[p] = mrq[k].m;
          mem_beat[p]++;
          if (mem_beat[p] == mrq[k].len) begin mrq.delete(k); mem_beat[p] = 0; end
        end
        break;
      end
    return r;
  endfunction

  always begin
    @(negedge clk2);
    mem_cyc++;
    txs_rsp = mem_rsp_of(0);
    ddr_rsp = mem_rsp_of(1);
    #4;
    if (mem_on) begin
      int nreq;
      nreq = 0;
      for (int i = 0; i < 6; i++) if (dma_m_req[i].read || dma_m_req[i].write) nreq++;
      if (nreq > 1 && (b2s_req.read || b2s_req.write) && !b2s_rsp.waitrequest) mc_arb++;
      // bridges competing for one memory, and both memories busy at once
      for (int p = 0; p < 2; p++) begin
        int nb;
        nb = 0;
        if ((b2m_req.read || b2m_req.write) && b2m_req.address[36] == 1'(p)) nb++;
        if ((b3m_req.read || b3m_req.write) && b3m_req.address[36] == 1'(p)) nb++;
        if ((b4m_req.read || b4m_req.write) && b4m_req.address[36] == 1'(p)) nb++;
        if (nb > 1) mc_mem_arb++;
      end
      if ((txs_req.read || txs_req.write) && !txs_rsp.waitrequest &&
          (ddr_req.read || ddr_req.write) && !ddr_rsp.waitrequest) mc_parallel++;
      for (int p = 0; p < 2; p++) begin
        avmm_req_t q;
        avmm_rsp_t r;
        q = p ? ddr_req : txs_req;
        r = p ? ddr_rsp : txs_rsp;
        if (q.write && !r.waitrequest) begin
          if (mem_wleft[p] == 0) begin
            mem_waddr[p] = q.address;
            mem_wleft[p] = int'(q.burstcount);
            mem_wb[p] = 0;
            mem_wm[p] = int'(q.writedata[127:96]);
            if (p == 0) mc_host++; else mc_board++;
          end else begin
            for (int i = 0; i < 6; i++)
              if ((dma_m_req[i].read || dma_m_req[i].write) && dma_m_rsp[i].waitrequest) begin
                mc_held_burst++; break;
              end
          end
          // master number, full address and beat are in the data
          check(q.writedata == mem_wdata(int'(q.writedata[127:96]),
                  p ? mem_waddr[p] + BOARD_BASE : mem_waddr[p], int'(q.writedata[31:0] ^ 32'hABCD_0000)),
                "S6: write reaches the memory of its address with the address rebased");
          check(int'(q.writedata[31:0] ^ 32'hABCD_0000) == mem_wb[p] && int'(q.writedata[127:96]) == mem_wm[p],
                "S6: one master's burst arrives whole and in beat order");
          mem_wb[p]++;
          mem_wleft[p]--;
          mem_wbeats++;
        end
        if (q.read && !r.waitrequest) begin
          int m;
          m = -1;
          for (int i = 0; i < 8; i++)
            if (drv_req[i].read && !drv_rsp[i].waitrequest && drv_req[i].address[36] == 1'(p)) m = i;
          check(m >= 0, "S6: read comes from an accepted master");
          mrq.push_back('{p, m, q.address, int'(q.burstcount), mem_cyc + mem_lat[p]});
          if (p == 0) mc_host++; else mc_board++;
        end
      end
      // read held for the other region: some read waits although no slave stalls
      if (b2m_req.read && b2m_rsp.waitrequest && !txs_rsp.waitrequest && !ddr_rsp.waitrequest)
        mc_region_wait++;
      for (int i = 0; i < 8; i++) begin
        bit want;
        logic [DATA_W-1:0] wd;
        want = 0;
        for (int p = 0; p < 2; p++) if (mem_del[p] == i) begin want = 1; wd = mem_del_data[p]; end
        check(drv_rsp[i].readdatavalid == want, $sformatf("S6: read data valid to master %0d", i));
        if (want) begin
          check(drv_rsp[i].readdata == wd, "S6: read data");
          mem_rbeats++;
        end
      end
    end
  end

  int dm_wbeats = 0, dm_rbeats = 0;
  task automatic dm_op(input int m, input int k);
    int p, len;
    logic [ADDR_W-1:0] a;
    p   = (m < 3 || m == 7) ? k % 2 : 1 - k % 2;
    len = (m % 3 == 0 || m >= 6) ? 1 + int'($urandom % 16) : 1 + int'($urandom % 2);
    a   = ADDR_W'(m) << 28 | ADDR_W'(k) << 12;
    if (p != 0) a = a | BOARD_BASE;
    if (m % 3 == 1 || m == 7) begin      // descriptor read, or DMA3 read behind B4
      @(negedge clk2);
      drv_req[m].write = 0; drv_req[m].read = 1;
      drv_req[m].address = a; drv_req[m].burstcount = BURST_W'(len);
      #4;
      while (drv_rsp[m].waitrequest) begin @(negedge clk2); #4; end
      dm_rbeats += len;
    end else begin                       // data or descriptor write, DMA3 write behind B3
      for (int b = 0; b < len; b++) begin
        @(negedge clk2);
        drv_req[m].read = 0; drv_req[m].write = 1;
        drv_req[m].address = a; drv_req[m].burstcount = BURST_W'(len);
        drv_req[m].writedata = mem_wdata(m, a, b);
        drv_req[m].byteenable = '1;
        #4;
        while (drv_rsp[m].waitrequest) begin @(negedge clk2); #4; end
      end
      dm_wbeats += len;
    end
  endtask

  task automatic dm_run(input int m, input int nops);
    for (int k = 0; k < nops; k++) dm_op(m, k);
    @(negedge clk2);
    drv_req[m].read = 0; drv_req[m].write = 0;
  endtask

  // Reset: pulse npor_n twice, so that the reset synchronisers inside are
  // certain to produce a falling edge whatever their power-up state.
  bit run = 0;
  initial begin
    for (int i = 0; i < 8; i++) drv_req[i] = '0;
    txs_rsp = '0; ddr_rsp = '0;
    #1 npor_n = 0;
    repeat (4) @(posedge clk2);
    npor_n = 1;
    repeat (6) @(posedge clk2);
    npor_n = 0;
    repeat (4) @(posedge clk2);
    npor_n = 1;
    repeat (4) @(posedge clk2);
    run = 1;
  end

  always #3.5 clk_s = ~clk_s;   // sample clock
  always #5   clk2  = ~clk2;    // 100 MHz DMA clock

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------- host register access ----------------
  ctrl_t c;
  logic [31:0] r1, r2;
  task automatic wr(input logic [CSR_AW-1:0] a, input logic [31:0] d);
    @(negedge clk2); csr_address = a; csr_write = 1; csr_writedata = d;
    @(negedge clk2); csr_write = 0;
  endtask
  task automatic rd(input logic [CSR_AW-1:0] a, output logic [31:0] d);
    @(negedge clk2); csr_address = a; csr_read = 1;
    @(negedge clk2); csr_read = 0;
    d = csr_readdata;
  endtask
  task automatic set_ctrl(input ctrl_t v);
    c = v;
    wr(A_CTRL, 32'(v));
  endtask

  // ---------------- external source: block n carries counter n ----------------
  bit ext_on = 0;
  int unsigned ext_n = 0;
  function automatic logic [3:0] ext_tag_of(input int unsigned n);
    return {(n % 23) == 11, (n % 5) == 2, 1'b0, 1'b0};   // {EvAppEOP, EvApp, EvError, EvPretrig}
  endfunction
  always @(negedge clk_s) begin
    ext_valid = ext_on && ($urandom_range(0, 2) == 0);
    ext_data  = {$urandom, $urandom, $urandom, 32'(ext_n)};
    ext_tags  = ext_tag_of(ext_n);
  end
  always @(posedge clk_s) if (ext_valid) ext_n++;

  // ---------------- sinks and checker ----------------
  int  rmode;                          // 0 always ready, 1 random, 2 stalled
  always @(negedge clk2) begin
    st1_ready = (rmode == 0) || (rmode == 1 && $urandom_range(0, 3) != 0);
    st2_ready = (rmode == 0) || (rmode == 1 && $urandom_range(0, 3) != 0);
  end

  // model
  int  m_ph, m_rem;
  bit  m_first, m_trg, m_sim;
  int  m_evat; logic [3:0] m_evtag;
  logic [31:0] m_prev; bit m_have_prev;
  int  n1, n2, n_ovr, n_gap_ok;
  // mechanism counters
  int  mc_oneshot_end, mc_b1tob1, mc_b1tob2, mc_b2tob1, mc_ring, mc_trigger,
       mc_sh1, mc_sh2, mc_wait, mc_overrun, mc_evins, mc_ext, mc_sim, mc_discard,
       mc_irq, mc_dmairq;

  task automatic model_start(input bit sim);
    m_ph = 1; m_rem = int'(r1); m_first = 1; m_trg = 0; m_sim = sim; m_have_prev = 0;
  endtask

  always @(posedge clk2) if (run && (st1_valid && st1_ready || st2_valid && st2_ready)) begin
    bit ch2, sop, eop, endp;
    logic [SAMPLE_W-1:0] d;
    logic [7:0] err;
    tags_t t;
    logic [31:0] num;
    ch2 = st2_valid;
    d   = ch2 ? st2_data : st1_data;
    sop = ch2 ? st2_sop : st1_sop;
    eop = ch2 ? st2_eop : st1_eop;
    err = ch2 ? st2_error : st1_error;
    t   = tags_t'(err[4:0]);
    if (ch2) n2++; else n1++;
    // source checks
    num = m_sim ? 32'(d[15:0]) : d[31:0];
    if (m_sim) begin
      for (int j = 1; j < 8; j++)
        check(d[16*j +: 16] == 16'(num + 32'(j)) || (c.evins && j == 7),
              $sformatf("sample %0d of block %0d", j, num));
      check(err[3:0] == ((num / 8 == 32'(m_evat)) ? m_evtag : 4'b0), $sformatf("tags of sim block %0d", num / 8));
      mc_sim++;
    end else begin
      check(err[3:0] == ext_tag_of(num), $sformatf("tags of ext block %0d", num));
      mc_ext++;
    end
    if (m_have_prev) begin
      logic [31:0] step;
      step = m_sim ? 32'(16'(num - m_prev)) : num - m_prev;
      if (t.overrun) begin
        n_ovr++;
        check(step > (m_sim ? 8 : 1), "EvOverrun block follows a gap");
      end else begin
        check(step == (m_sim ? 8 : 1), $sformatf("block after %0d is %0d", m_prev, num));
      end
    end
    m_prev = num; m_have_prev = 1;
    if (c.evins) begin
      check(d[127:120] == {2'b00, eop, t}, "events byte");
      mc_evins++;
    end
    // mode model
    check(m_ph != 0, "block after the sequence ended");
    check(ch2 == (m_ph == 2), $sformatf("block %0d on channel %0d, model says %0d", num, ch2 + 1, m_ph));
    if (m_ph == 1) endp = (m_rem <= 16) || (c.b1totrg && t.pretrig) || (c.sh1 && t.app_eop);
    else           endp = (m_rem <= 16) || (c.sh2 && t.app_eop);
    check(sop == m_first, $sformatf("sop of block %0d", num));
    check(eop == endp, $sformatf("eop of block %0d", num));
    if (m_rem > 16 && endp) begin
      if (m_ph == 1 && c.sh1 && t.app_eop) mc_sh1++;
      if (m_ph == 2 && c.sh2 && t.app_eop) mc_sh2++;
    end
    m_first = 0;
    m_rem -= 16;
    if (m_ph == 1 && c.b1totrg && t.pretrig) m_trg = 1;
    if (endp) begin
      m_first = 1;
      if (m_ph == 1) begin
        if (c.b1totrg) begin
          if (m_trg) begin m_ph = 2; m_rem = int'(r2); m_trg = 0; mc_trigger++; end
          else begin m_rem = int'(r1); mc_ring++; end
        end else if (c.b1tob2) begin m_ph = 2; m_rem = int'(r2); mc_b1tob2++; end
        else if (c.cyclic) begin m_rem = int'(r1); mc_b1tob1++; end
        else begin m_ph = 0; mc_oneshot_end++; end
      end else begin
        if (c.cyclic) begin m_ph = 1; m_rem = int'(r1); mc_b2tob1++; end
        else m_ph = 0;
      end
    end
  end

  // observed from inside: waits for unblock, SD0 discards
  always @(posedge clk2) begin
    if (run && dut.u_daq_c.rd_valid && dut.u_daq_c.rd_ready && dut.u_daq_c.u_fsm.state == SD0) mc_discard++;
  end
  logic wait_q = 0;
  always @(posedge clk2) begin
    wait_q <= dut.u_daq_c.u_fsm.waiting;
    if (dut.u_daq_c.u_fsm.waiting && !wait_q) mc_wait++;
  end

  task automatic wait_state(input sd_state_t s, input int maxc);
    int n = 0;
    while (dut.u_daq_c.u_fsm.state != s && n < maxc) begin @(posedge clk2); n++; end
    check(dut.u_daq_c.u_fsm.state == s, $sformatf("reached state %0d", s));
  endtask

  task automatic stop_and_flush();
    logic [31:0] d;
    ctrl_t z;
    z = '0;
    ext_on = 0;
    set_ctrl(z);
    repeat (4200) @(posedge clk2);
    rd(A_FIFOUSED, d);
    check(d == 0, $sformatf("FIFO flushed in SD0 (%0d left)", d));
    wr(A_EVFLAGS, 32'h7F);
  endtask

  initial begin
    logic [31:0] d, d0;
    ctrl_t v;
    rmode = 0; n1 = 0; n2 = 0; n_ovr = 0;
    r1 = 0; r2 = 0; c = '0;
    wait (run);
    repeat (2) @(posedge clk2);

    // ---- S1: single one-shot, simulator ----
    r1 = 256; wr(A_RDMA1, r1);
    m_evat = -1; m_evtag = 0;
    wr(A_SIMRATE, 1); wr(A_SIMEVAT, 32'hFFFF_FFFF); wr(A_SIMEVTAG, 0);
    model_start(1);
    v = '0; v.dma_ena1 = 1; v.src_sim = 1;
    set_ctrl(v);
    wait_state(SDEND, 2000);
    repeat (20) @(posedge clk2);
    check(n1 == 16 && n2 == 0, $sformatf("S1: %0d/%0d blocks, want 16/0", n1, n2));
    stop_and_flush();

    // ---- S2: single cyclic, unblock required ----
    n1 = 0; n2 = 0;
    r1 = 128; wr(A_RDMA1, r1);
    model_start(1);
    v = '0; v.dma_ena1 = 1; v.src_sim = 1; v.cyclic = 1; v.ublk_en = 1;
    set_ctrl(v);
    wait_state(SD1E, 2000);
    repeat (30) @(posedge clk2);
    check(n1 == 8, $sformatf("S2: held after one buffer: %0d blocks", n1));
    check(dut.u_daq_c.u_fsm.waiting, "S2: waiting for unblock");
    for (int i = 0; i < 3; i++) begin
      wr(A_CTRL, 32'(c) | 32'h1);
      repeat (60) @(posedge clk2);
    end
    check(n1 == 32, $sformatf("S2: after three unblocks %0d blocks, want 32", n1));
    v.cyclic = 0; set_ctrl(v);
    wait_state(SDEND, 100);
    stop_and_flush();

    // ---- S3: dual cyclic, external source, SH1/SH2, events byte ----
    n1 = 0; n2 = 0;
    r1 = 160; r2 = 96; wr(A_RDMA1, r1); wr(A_RDMA2, r2);
    rmode = 1;
    model_start(0);
    v = '0; v.dma_ena1 = 1; v.b1tob2 = 1; v.cyclic = 1; v.sh1 = 1; v.sh2 = 1; v.evins = 1;
    set_ctrl(v);
    repeat (3) @(posedge clk2);
    ext_on = 1;
    repeat (1500) @(posedge clk2);
    check(n1 > 50 && n2 > 30, $sformatf("S3: %0d/%0d blocks", n1, n2));
    // End the cyclic run: pause the source so that no phase can end while
    // the mode changes, clear cyclic, then let the sequence run to SDEND.
    ext_on = 0;
    repeat (300) @(posedge clk2);
    v.cyclic = 0; set_ctrl(v);
    repeat (3) @(posedge clk2);
    ext_on = 1;
    wait_state(SDEND, 3000);
    ext_on = 0;
    stop_and_flush();

    // ---- S4: pre-trigger ----
    n1 = 0; n2 = 0;
    r1 = 256; r2 = 512; wr(A_RDMA1, r1); wr(A_RDMA2, r2);
    m_evat = 50; m_evtag = 4'b0001;
    wr(A_SIMEVAT, 50); wr(A_SIMEVTAG, 1); wr(A_IRQMASK, 32'h01);
    model_start(1);
    v = '0; v.dma_ena1 = 1; v.dma_ena2 = 1; v.b1tob2 = 1; v.b1totrg = 1; v.src_sim = 1;
    set_ctrl(v);
    wait_state(SDEND, 3000);
    repeat (10) @(posedge clk2);
    check(n1 == 51 && n2 == 32, $sformatf("S4: pre/post %0d/%0d, want 51/32", n1, n2));
    rd(A_EV_BASE, d);     check(d == 256 - 16 * 3, $sformatf("S4: trigger wCnt1 %0d", d));
    rd(A_EV_BASE + 1, d); check(d == 3, $sformatf("S4: trigger buffer count %0d", d));
    check(rxm_irq[0], "S4: adapter interrupt on RxmIrq bit 0");
    if (rxm_irq[0]) mc_irq++;
    dma_irq = 3'b101;
    repeat (2) @(posedge clk2); #1;
    check(rxm_irq[3:1] == 3'b101, "DMA interrupts on RxmIrq bits 3..1");
    if (rxm_irq[3:1] == 3'b101) mc_dmairq++;
    dma_irq = 0;
    wr(A_IRQMASK, 0);
    stop_and_flush();

    // ---- S5: overrun and drain rate ----
    n1 = 0; n2 = 0; n_ovr = 0;
    r1 = 32'h0010_0000; wr(A_RDMA1, r1);
    wr(A_SIMRATE, 0); wr(A_SIMEVAT, 32'hFFFF_FFFF); wr(A_SIMEVTAG, 0);
    m_evat = -1; m_evtag = 0;
    d0 = dropped;
    rmode = 2;
    model_start(1);
    v = '0; v.dma_ena1 = 1; v.src_sim = 1; v.cyclic = 1;
    set_ctrl(v);
    repeat (3500) @(posedge clk2);
    check(dropped > d0, "S5: blocks dropped while the sinks stall");
    rmode = 0;
    @(negedge clk2);
    begin
      int n0;
      n0 = n1;
      repeat (1000) @(posedge clk2);
      #1 check(n1 - n0 == 1000, $sformatf("S5: %0d blocks in 1000 cycles, want 1000", n1 - n0));
    end
    repeat (4500) @(posedge clk2);
    check(n_ovr >= 1, "S5: EvOverrun seen");
    mc_overrun = n_ovr;
    rd(A_EVFLAGS, d);
    check(d[4], "S5: EvOverrun flag");
    stop_and_flush();

    // ---- S6: memory traffic from all DMA masters ----
    mem_on = 1; mem_stall = 25;
    fork
      dm_run(0, 30);
      dm_run(1, 30);
      dm_run(2, 30);
      dm_run(3, 30);
      dm_run(4, 30);
      dm_run(5, 30);
      dm_run(6, 30);
      dm_run(7, 30);
    join
    repeat (40) @(negedge clk2);
    mem_on = 0;
    check(mem_wbeats == dm_wbeats, $sformatf("S6: %0d of %0d write beats reached memory", mem_wbeats, dm_wbeats));
    check(mem_rbeats == dm_rbeats, $sformatf("S6: %0d of %0d read beats returned", mem_rbeats, dm_rbeats));
    check(mrq.size() == 0, "S6: no read left in memory");

    // ---- mechanism coverage ----
    begin
      string names[23] = '{"one-shot end", "DMA1 cyclic restart", "DMA1->DMA2", "DMA2->DMA1",
        "pre-trigger ring wrap", "trigger switch", "SH1 early end", "SH2 early end",
        "unblock wait", "overrun", "events byte", "external source", "simulator source",
        "SD0 discard", "adapter irq", "DMA irq", "master arbitration", "burst holds grant",
        "to host memory", "to board memory", "read order wait", "bridges share a memory",
        "both memories at once"};
      int cnt[23];
      cnt = '{mc_oneshot_end, mc_b1tob1, mc_b1tob2, mc_b2tob1, mc_ring, mc_trigger,
              mc_sh1, mc_sh2, mc_wait, mc_overrun, mc_evins, mc_ext, mc_sim, mc_discard, mc_irq, mc_dmairq,
              mc_arb, mc_held_burst, mc_host, mc_board, mc_region_wait, mc_mem_arb, mc_parallel};
      for (int i = 0; i < 23; i++) begin
        $display("mechanism %-22s %0d", names[i], cnt[i]);
        check(cnt[i] > 0, $sformatf("mechanism '%s' never happened", names[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk2);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
