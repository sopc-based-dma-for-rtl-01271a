// tb_avmm_region_router: checks the router that splits DMA traffic between
// host memory (below 64 GB, port 0) and board memory (64 GB and up, port 1).
//
// One master drives random write bursts and reads to both regions into two
// model slaves that stall at random; host reads take 12 cycles, board
// reads 3, so a read to the board issued right after a host read would
// overtake it if nothing stopped it. Checked: every write beat reaches the
// right slave with the right (rebased) address and data, in order; read
// data comes back in the order of the reads with the right contents; the
// router holds a read to the other region while reads are outstanding (it
// must happen, and it must not happen for same-region reads); only one
// slave returns data at a time.
// Stimulus changes just after the falling clock edge and is sampled just
// before the rising one.
module tb_avmm_region_router;
  import avmm_pkg::*;

  logic clk = 0, rst_n = 1;
  avmm_req_t s_req;
  avmm_rsp_t s_rsp;
  avmm_req_t m_req [2];
  avmm_rsp_t m_rsp [2];
  int checks = 0, failures = 0;

  avmm_region_router dut (.clk, .rst_n, .s_req, .s_rsp, .m_req, .m_rsp);

  always #5 clk = ~clk;
  initial begin #1; rst_n = 0; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [DATA_W-1:0] rdata(input int p, input logic [ADDR_W-1:0] a, input int b);
    return {32'(p), 32'(a >> 32), 32'(a), 32'(b)};
  endfunction

  // ---------------------------------------------------------------- slaves
  typedef struct {
    int p;
    logic [ADDR_W-1:0] addr;
    int len;
    int ready;
  } rd_t;
  typedef struct {
    int p;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
  } wr_t;
  rd_t rq[$];
  wr_t wr_got[$], wr_exp[$];
  logic [DATA_W-1:0] rd_exp[$];
  int  lat [2] = '{12, 3};
  int  beat [2] = '{0, 0};
  int  wr_left [2] = '{0, 0};
  logic [ADDR_W-1:0] wr_addr [2];
  int  cyc = 0, stall_pct = 25;
  bit  done_now [2];              // a read finished returning this cycle
  int  n_held = 0, n_same_pass = 0, n_rd = 0, n_wr = 0;

  always begin
    @(negedge clk);
    cyc++;
    for (int p = 0; p < 2; p++) begin
      done_now[p] = 0;
      m_rsp[p].waitrequest   = rst_n && (int'($urandom % 100) < stall_pct);
      m_rsp[p].readdatavalid = 0;
      m_rsp[p].readdata      = '0;
      for (int k = 0; k < rq.size(); k++)
        if (rq[k].p == p) begin
          if (cyc >= rq[k].ready) begin
            m_rsp[p].readdatavalid = 1;
            m_rsp[p].readdata = rdata(p, rq[k].addr, beat[p]);
            beat[p]++;
            if (beat[p] == rq[k].len) begin rq.delete(k); beat[p] = 0; done_now[p] = 1; end
          end
          break;
        end
    end
    #4;
    if (rst_n) begin
      check(!(m_rsp[0].readdatavalid && m_rsp[1].readdatavalid), "one slave returns data at a time");
      for (int p = 0; p < 2; p++) begin
        if (m_req[p].write && !m_rsp[p].waitrequest) begin
          if (wr_left[p] == 0) begin
            wr_addr[p] = m_req[p].address;
            wr_left[p] = int'(m_req[p].burstcount);
          end
          wr_got.push_back('{p, wr_addr[p], m_req[p].writedata});
          wr_left[p]--;
        end
        if (m_req[p].read && !m_rsp[p].waitrequest)
          rq.push_back('{p, m_req[p].address, int'(m_req[p].burstcount), cyc + lat[p]});
      end
      if (s_rsp.readdatavalid) begin
        check(rd_exp.size() != 0, "read data was asked for");
        if (rd_exp.size() != 0) check(s_rsp.readdata == rd_exp.pop_front(), "read data in order");
      end
    end
  end

  // ---------------------------------------------------------------- master
  function automatic logic [ADDR_W-1:0] region_addr(input int p, input int k);
    logic [ADDR_W-1:0] a = ADDR_W'(k) << 8 | (ADDR_W'($urandom) << 20 & 37'h0F_FFF0_0000);
    return p != 0 ? a | BOARD_BASE : a;
  endfunction

  task automatic do_write(input int p, input int k, input int len);
    logic [ADDR_W-1:0] a = region_addr(p, k);
    for (int b = 0; b < len; b++) begin
      @(negedge clk);
      s_req.read = 0; s_req.write = 1;
      s_req.address = a; s_req.burstcount = BURST_W'(len);
      s_req.writedata = {$urandom, $urandom, $urandom, $urandom};
      s_req.byteenable = '1;
      wr_exp.push_back('{p, p != 0 ? a - BOARD_BASE : a, s_req.writedata});
      #4;
      while (s_rsp.waitrequest) begin @(negedge clk); #4; end
    end
    n_wr++;
  endtask

  task automatic do_read(input int p, input int k, input int len);
    logic [ADDR_W-1:0] a = region_addr(p, k);
    bit other_pending;
    @(negedge clk);
    s_req.write = 0; s_req.read = 1;
    s_req.address = a; s_req.burstcount = BURST_W'(len);
    #4;
    while (s_rsp.waitrequest) begin
      // held although the target slave is ready: waiting for the other region
      if (!m_rsp[p].waitrequest) begin
        // the last beat of a read still counts in the cycle it returns
        other_pending = done_now[1-p];
        foreach (rq[i]) if (rq[i].p != p) other_pending = 1;
        check(other_pending, "held only while the other region has reads outstanding");
        n_held++;
      end
      @(negedge clk); #4;
    end
    begin
      bit same_pending = 0;
      foreach (rq[i]) if (rq[i].p == p) same_pending = 1;
      if (same_pending) n_same_pass++;
    end
    for (int b = 0; b < len; b++) rd_exp.push_back(rdata(p, p != 0 ? a - BOARD_BASE : a, b));
    n_rd++;
  endtask

  initial begin
    s_req = '0;
    for (int p = 0; p < 2; p++) m_rsp[p] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int k = 0; k < 300; k++) begin
      int p, len;
      p = int'($urandom % 2); len = 1 + int'($urandom % 8);
      if ($urandom % 2 == 0) do_write(p, k, len);
      else                   do_read(p, k, len);
      if ($urandom % 5 == 0) begin
        @(negedge clk); s_req.read = 0; s_req.write = 0;
      end
    end
    @(negedge clk); s_req.read = 0; s_req.write = 0;
    repeat (40) @(negedge clk);
    check(rd_exp.size() == 0, "all read data returned");
    check(rq.size() == 0, "no read left at the slaves");
    check(wr_got.size() == wr_exp.size(), $sformatf("%0d of %0d write beats arrived", wr_got.size(), wr_exp.size()));
    for (int i = 0; i < wr_got.size() && i < wr_exp.size(); i++)
      check(wr_got[i].p == wr_exp[i].p && wr_got[i].addr == wr_exp[i].addr && wr_got[i].data == wr_exp[i].data,
            $sformatf("write beat %0d: slave %0d addr %h", i, wr_got[i].p, wr_got[i].addr));
    check(n_held > 0, "a read waited for the other region");
    check(n_same_pass > 0, "a read to the same region went on while reads were outstanding");
    $display("reads %0d, writes %0d, held %0d, same-region pass %0d", n_rd, n_wr, n_held, n_same_pass);
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
