// avmm_arbiter: slave-side round-robin arbiter that lets N Avalon-MM masters
// share one slave, here the DMA data and descriptor masters of the stream
// subsystem in front of the clock-crossing bridge B2.
//
// How it works: when no write burst is in progress, the grant goes to the
// first requesting master after the one served last (round robin). A
// granted read is one command cycle; a granted write burst keeps the grant
// until all of its beats have been accepted, so bursts are never
// interleaved. Commands reach the slave in grant order, and each accepted
// read is recorded (master number and beat count) in a small FIFO, so the
// read data coming back, which the slave returns in request order, is
// steered to the master that asked for it. When that FIFO is full, reads
// wait.
//
// Interface: m_req/m_rsp per master, s_req/s_rsp to the slave, all in one
// clock domain. A master that is not granted sees waitrequest high.
// Requests pass to the slave combinationally; the arbiter adds no cycle.
//
// Round robin is the arbitration the system integration tool uses by
// default; the response FIFO depth is this design's own choice.
module avmm_arbiter
  import avmm_pkg::*;
#(
  parameter int unsigned N        = 6,
  parameter int unsigned MAX_PEND = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  avmm_req_t m_req [N],
  output avmm_rsp_t m_rsp [N],
  output avmm_req_t s_req,
  input  avmm_rsp_t s_rsp
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned PW = $clog2(MAX_PEND);

  logic [IW-1:0]      last, owner, grant;
  logic               locked, any_req, pend_full;
  logic [BURST_W-1:0] beats_left;

  // pending-read FIFO
  logic [IW-1:0]      pq_id  [MAX_PEND];
  logic [BURST_W-1:0] pq_cnt [MAX_PEND];
  logic [PW-1:0]      pq_wr, pq_rd;
  logic [PW:0]        pq_n;
  logic [BURST_W-1:0] head_done;

  assign pend_full = (pq_n == (PW+1)'(MAX_PEND));

  // a master may be granted if it writes, or reads while there is room
  function automatic logic can_go(input avmm_req_t r, input logic full);
    return r.write || (r.read && !full);
  endfunction


  // Scan from the farthest candidate to the nearest, so the nearest
  // requesting master after 'last' wins.
  logic [IW-1:0] cand;
  always_comb begin
    grant   = owner;
    any_req = locked;
    cand    = '0;
    if (!locked) begin
      for (int k = N; k >= 1; k--) begin
        cand = IW'((int'(last) + k) % N);
        if (can_go(m_req[cand], pend_full)) begin
          grant   = cand;
          any_req = 1'b1;
        end
      end
    end
  end

  logic s_acc, rd_acc, wr_acc;
  logic [N-1:0] acc_vec;
  always_comb begin
    s_req = '0;
    if (any_req) s_req = m_req[grant];
  end

  always_comb begin
    s_acc  = any_req && (s_req.read || s_req.write) && !s_rsp.waitrequest;
    rd_acc = s_acc && s_req.read;
    wr_acc = s_acc && s_req.write;
    for (int i = 0; i < N; i++) begin
      m_rsp[i].waitrequest   = !(any_req && grant == IW'(i)) || s_rsp.waitrequest;
      m_rsp[i].readdata      = s_rsp.readdata;
      m_rsp[i].readdatavalid = s_rsp.readdatavalid && (pq_n != 0) && (pq_id[pq_rd] == IW'(i));
      acc_vec[i] = !m_rsp[i].waitrequest && (m_req[i].read || m_req[i].write);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last       <= IW'(N - 1);
      owner      <= '0;
      locked     <= 1'b0;
      beats_left <= '0;
      pq_wr      <= '0;
      pq_rd      <= '0;
      pq_n       <= '0;
      head_done  <= '0;
    end else begin
      // write bursts
      if (wr_acc) begin
        if (!locked) begin
          if (s_req.burstcount > BURST_W'(1)) begin
            locked     <= 1'b1;
            owner      <= grant;
            beats_left <= s_req.burstcount - BURST_W'(1);
          end else begin
            last <= grant;
          end
        end else begin
          beats_left <= beats_left - BURST_W'(1);
          if (beats_left == BURST_W'(1)) begin
            locked <= 1'b0;
            last   <= owner;
          end
        end
      end
      if (rd_acc) last <= grant;
      // pending reads
      if (rd_acc) begin
        pq_id[pq_wr]  <= grant;
        pq_cnt[pq_wr] <= s_req.burstcount;
        pq_wr         <= pq_wr + 1'b1;
      end
      if (s_rsp.readdatavalid && pq_n != 0) begin
        if (head_done + BURST_W'(1) == pq_cnt[pq_rd]) begin
          head_done <= '0;
          pq_rd     <= pq_rd + 1'b1;
        end else begin
          head_done <= head_done + BURST_W'(1);
        end
      end
      pq_n <= pq_n + (PW+1)'(rd_acc)
                   - (PW+1)'(s_rsp.readdatavalid && pq_n != 0 && head_done + BURST_W'(1) == pq_cnt[pq_rd]);
    end
  end

  // Read data only comes back for a read that was issued.
  assert property (@(posedge clk) disable iff (!rst_n) s_rsp.readdatavalid |-> pq_n != 0);
  // At most one master sees its command accepted.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(acc_vec));
endmodule
