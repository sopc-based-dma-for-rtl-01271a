// tb_avmm_arbiter: checks the round-robin Avalon-MM arbiter with three
// masters in front of a model slave.
//
// The model slave stalls at random (waitrequest), returns read data in
// request order after a set latency, and checks every write beat it gets.
// Each master runs a list of write bursts and reads; write data and
// addresses encode master, sequence number and beat, read data is a fixed
// function of address and beat. Checked: strict rotation of grants while
// all masters request, write bursts reaching the slave whole and in beat
// order with nothing else in between, every read beat delivered to the
// master that asked for it (and to no other) with the right data, the
// limit on outstanding reads, and that every operation completes.
// All stimulus changes just after the falling clock edge and is sampled
// just before the rising one.
module tb_avmm_arbiter;
  import avmm_pkg::*;
  localparam int N = 3, MAX_PEND = 4;

  logic clk = 0, rst_n = 1;
  avmm_req_t m_req [N];
  avmm_rsp_t m_rsp [N];
  avmm_req_t s_req;
  avmm_rsp_t s_rsp;
  int checks = 0, failures = 0;

  avmm_arbiter #(.N(N), .MAX_PEND(MAX_PEND)) dut (.clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp);

  always #5 clk = ~clk;
  initial begin #1; rst_n = 0; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [ADDR_W-1:0] addr_of(input int id, input int seq);
    return ADDR_W'(id) << 24 | ADDR_W'(seq) << 8;
  endfunction
  function automatic logic [DATA_W-1:0] wdata(input int id, input int seq, input int b);
    return {32'hC0DE_0000 | 32'(id), 32'(seq), 32'(b), 32'h5A5A_0000};
  endfunction
  function automatic logic [DATA_W-1:0] rdata(input logic [ADDR_W-1:0] a, input int b);
    return {~32'(a), 32'(a), 32'(b), 32'hF00D_0000 ^ 32'(a >> 8)};
  endfunction

  // ---------------------------------------------------------------- slave
  typedef struct {
    int id;
    logic [ADDR_W-1:0] addr;
    int len;
    int ready;
  } rd_t;
  rd_t rq[$];
  int  cyc = 0, lat = 3, stall_pct = 0;
  int  rd_beat = 0, del_id = -1;
  logic [DATA_W-1:0] del_data;
  // write burst being received
  int  wr_left = 0, wr_id = 0, wr_seq = 0, wr_beat = 0;
  int  grants[$];                    // master of each new command, in order
  int  wr_bursts [N], rd_beats [N];  // received per master
  int  outstanding = 0, max_out = 0;
  int  n_burst_held = 0, n_rd_wait_full = 0;

  always begin
    @(negedge clk);
    cyc++;
    s_rsp.waitrequest   = rst_n && (int'($urandom % 100) < stall_pct);
    s_rsp.readdatavalid = 0;
    s_rsp.readdata      = '0;
    del_id = -1;
    if (rq.size() != 0 && cyc >= rq[0].ready) begin
      s_rsp.readdatavalid = 1;
      del_data = rdata(rq[0].addr, rd_beat);
      s_rsp.readdata = del_data;
      del_id = rq[0].id;
      rd_beat++;
      if (rd_beat == rq[0].len) begin
        rq.pop_front();
        rd_beat = 0;
        outstanding--;
      end
    end
    #4;
    if (rst_n) begin
      int acc_id, nacc;
      acc_id = -1; nacc = 0;
      for (int i = 0; i < N; i++)
        if ((m_req[i].read || m_req[i].write) && !m_rsp[i].waitrequest) begin
          acc_id = i; nacc++;
        end
      if (s_req.read || s_req.write) check(nacc == (s_rsp.waitrequest ? 0 : 1), $sformatf("one master accepted per slave accept: %0d r%0d w%0d", nacc, s_req.read, s_req.write));
      // a read that waits only because the response FIFO is full
      if (outstanding == MAX_PEND && !s_rsp.waitrequest)
        for (int i = 0; i < N; i++)
          if (m_req[i].read && !s_req.write) n_rd_wait_full++;
      if (s_req.write && !s_rsp.waitrequest) begin
        if (wr_left == 0) begin
          wr_id = int'(s_req.writedata[96 +: 8]); wr_seq = int'(s_req.writedata[64 +: 32]);
          wr_beat = 0; wr_left = int'(s_req.burstcount);
          check(acc_id == wr_id, "write accepted from the master it came from");
          check(s_req.address == addr_of(wr_id, wr_seq), "write burst address");
          grants.push_back(wr_id);
          wr_bursts[wr_id]++;
        end
        check(s_req.writedata == wdata(wr_id, wr_seq, wr_beat),
              $sformatf("write beat %0d of master %0d burst %0d", wr_beat, wr_id, wr_seq));
        if (wr_beat != 0) begin
          // held burst: count when someone else was waiting
          for (int i = 0; i < N; i++)
            if (i != wr_id && (m_req[i].read || m_req[i].write)) begin n_burst_held++; break; end
        end
        wr_beat++; wr_left--;
      end
      if (s_req.read && !s_rsp.waitrequest) begin
        check(wr_left == 0, "no read inside a write burst");
        rq.push_back('{acc_id, s_req.address, int'(s_req.burstcount), cyc + lat});
        grants.push_back(acc_id);
        outstanding++;
        if (outstanding > max_out) max_out = outstanding;
      end
      // read data routing
      for (int i = 0; i < N; i++) begin
        check(m_rsp[i].readdatavalid == (i == del_id), $sformatf("readdatavalid to master %0d", i));
        if (i == del_id) begin
          check(m_rsp[i].readdata == del_data, "read data");
          rd_beats[i]++;
        end
      end
    end
  end

  // -------------------------------------------------------------- masters
  int sent_bursts [N], sent_beats [N];

  task automatic m_write(input int id, input int seq, input int len);
    for (int b = 0; b < len; b++) begin
      @(negedge clk);
      m_req[id].read       = 0;
      m_req[id].write      = 1;
      m_req[id].address    = addr_of(id, seq);
      m_req[id].burstcount = BURST_W'(len);
      m_req[id].writedata  = wdata(id, seq, b);
      m_req[id].byteenable = '1;
      #4;
      while (m_rsp[id].waitrequest) begin @(negedge clk); #4; end
    end
    sent_bursts[id]++;
  endtask

  task automatic m_read(input int id, input int seq, input int len);
    @(negedge clk);
    m_req[id].write      = 0;
    m_req[id].read       = 1;
    m_req[id].address    = addr_of(id, seq);
    m_req[id].burstcount = BURST_W'(len);
    #4;
    while (m_rsp[id].waitrequest) begin @(negedge clk); #4; end
    sent_beats[id] += len;
  endtask

  task automatic m_idle(input int id);
    @(negedge clk);
    m_req[id].read = 0; m_req[id].write = 0;
  endtask

  task automatic m_random(input int id, input int nops);
    for (int k = 0; k < nops; k++) begin
      int len = 1 + int'($urandom % 8);
      if ($urandom % 2 == 0) m_write(id, 100 + k, len);
      else                   m_read(id, 100 + k, len);
      if ($urandom % 4 == 0) begin m_idle(id); repeat ($urandom % 3) @(negedge clk); end
    end
    m_idle(id);
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      m_req[i] = '0; wr_bursts[i] = 0; rd_beats[i] = 0; sent_bursts[i] = 0; sent_beats[i] = 0;
    end
    s_rsp = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // 1. rotation: all masters post single writes back to back
    fork
      begin for (int k = 0; k < 6; k++) m_write(0, k, 1); m_idle(0); end
      begin for (int k = 0; k < 6; k++) m_write(1, k, 1); m_idle(1); end
      begin for (int k = 0; k < 6; k++) m_write(2, k, 1); m_idle(2); end
    join
    check(grants.size() == 18, "18 grants");
    for (int k = 0; k < grants.size(); k++)
      check(grants[k] == k % N, $sformatf("grant %0d went to master %0d", k, grants[k]));

    // 2. mixed bursts and reads with a stalling slave
    stall_pct = 30; lat = 4;
    fork
      m_random(0, 40);
      m_random(1, 40);
      m_random(2, 40);
    join
    repeat (60) @(negedge clk);

    // 3. many reads against a slow slave: outstanding reads are limited
    stall_pct = 0; lat = 30; max_out = 0;
    fork
      begin for (int k = 0; k < 6; k++) m_read(0, 200 + k, 1); m_idle(0); end
      begin for (int k = 0; k < 6; k++) m_read(1, 200 + k, 2); m_idle(1); end
      begin for (int k = 0; k < 6; k++) m_read(2, 200 + k, 1); m_idle(2); end
    join
    repeat (120) @(negedge clk);
    check(max_out == MAX_PEND, $sformatf("outstanding reads peaked at %0d", max_out));

    for (int i = 0; i < N; i++) begin
      check(wr_bursts[i] == sent_bursts[i], $sformatf("master %0d: %0d of %0d bursts arrived", i, wr_bursts[i], sent_bursts[i]));
      check(rd_beats[i] == sent_beats[i], $sformatf("master %0d: %0d of %0d read beats returned", i, rd_beats[i], sent_beats[i]));
    end
    check(rq.size() == 0, "no read left");
    check(n_burst_held > 0, "a burst held the grant against a waiting master");
    check(n_rd_wait_full > 0, "reads waited on a full response queue");
    $display("bursts held %0d, reads waiting on full queue %0d", n_burst_held, n_rd_wait_full);
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
