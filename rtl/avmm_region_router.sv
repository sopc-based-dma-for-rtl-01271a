// avmm_region_router: splits the DMA address space into its two regions,
// host (PCIe) memory below 64 GB and board (DDR3) memory from 64 GB up, and
// sends each Avalon-MM command to the matching slave: port 0 to the PCIe
// IP's bursting Txs slave, port 1 to the DDR3 controller.
//
// How it works: the region of a command is decided by comparing its address
// with the 64 GB boundary. A write burst keeps the region of its first
// beat until its last beat. Host addresses pass unchanged (the PCIe bridge
// maps 64-bit Avalon addresses straight to PCIe memory); board addresses
// have the 64 GB base removed. Read data must come back in request order,
// so a read to one region waits while reads to the other region still have
// data outstanding; the outstanding beats are counted for that.
//
// Interface: s_req/s_rsp from the master side (the bridge in front), m_req
// and m_rsp towards the two slaves, one clock domain. Commands pass
// combinationally.
//
// The two regions and their boundary follow the design's memory map; the
// waiting rule for reads is this design's own choice.
module avmm_region_router
  import avmm_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  avmm_req_t s_req,
  output avmm_rsp_t s_rsp,
  output avmm_req_t m_req [2],
  input  avmm_rsp_t m_rsp [2]
);
  localparam int unsigned CW = BURST_W + 4;   // outstanding read beats

  logic          locked, lock_sel, rd_sel, sel, stall;
  logic [CW-1:0] rd_pend;
  logic [BURST_W-1:0] beats_left;
  logic          acc;

  always_comb begin
    sel   = locked ? lock_sel : (s_req.address >= BOARD_BASE);
    stall = s_req.read && (rd_pend != '0) && (sel != rd_sel);
    for (int p = 0; p < 2; p++) begin
      m_req[p] = s_req;
      m_req[p].read  = s_req.read  && !stall && (sel == 1'(p));
      m_req[p].write = s_req.write && (sel == 1'(p));
    end
    m_req[1].address = s_req.address - BOARD_BASE;
  end

  // responses in a block of their own: commands never depend on them
  always_comb begin
    s_rsp.waitrequest   = stall || (sel ? m_rsp[1].waitrequest : m_rsp[0].waitrequest);
    s_rsp.readdatavalid = m_rsp[0].readdatavalid || m_rsp[1].readdatavalid;
    s_rsp.readdata      = m_rsp[1].readdatavalid ? m_rsp[1].readdata : m_rsp[0].readdata;
    acc = (s_req.read || s_req.write) && !s_rsp.waitrequest;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked     <= 1'b0;
      lock_sel   <= 1'b0;
      beats_left <= '0;
      rd_sel     <= 1'b0;
      rd_pend    <= '0;
    end else begin
      if (acc && s_req.write) begin
        if (!locked) begin
          if (s_req.burstcount > BURST_W'(1)) begin
            locked     <= 1'b1;
            lock_sel   <= sel;
            beats_left <= s_req.burstcount - BURST_W'(1);
          end
        end else begin
          beats_left <= beats_left - BURST_W'(1);
          if (beats_left == BURST_W'(1)) locked <= 1'b0;
        end
      end
      if (acc && s_req.read) rd_sel <= sel;
      rd_pend <= rd_pend + ((acc && s_req.read) ? CW'(s_req.burstcount) : '0)
                         - CW'(s_rsp.readdatavalid);
    end
  end

  // Only the region with reads outstanding returns data, one beat at a time.
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(m_rsp[0].readdatavalid && m_rsp[1].readdatavalid));
  assert property (@(posedge clk) disable iff (!rst_n) s_rsp.readdatavalid |-> rd_pend != '0);
endmodule
