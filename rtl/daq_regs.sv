// daq_regs: register file of the DAQ adapter on an Avalon-MM slave (clk2).
//
// Holds the acquisition control bits (mode, cyclic, SH1/SH2, enables), the
// buffer size registers rDMA1/rDMA2 and the samples-simulator settings, and
// shows the live state: FSM state, TrgSig, wCnt1/wCnt2 and the number of
// finished buffers of each channel. For each of the five events (the four
// source tags and EvOverrun) it keeps a sticky flag and, from the last block
// that carried the event, the byte counter of the channel written (bytes
// left in the buffer after that block) and that channel's count of finished
// buffers, with bit 31 set when the channel was DMA2. Two more flags mark a
// finished DMA1 or DMA2 phase. irq is the OR of the flags enabled in the
// mask register.
//
// Register map (32-bit words; all of it is this design's own choice):
//   0 CTRL   rw  bit0 unblock pulse (write 1, reads 0), 1 DMA_ena1,
//                2 DMA_ena2, 3 B1toB2, 4 B1toTrg, 5 cyclic, 6 SH1, 7 SH2,
//                8 unblock required, 9 events byte in data, 10 simulator
//   1 STATUS ro  [2:0] state, 3 TrgSig, 4 waiting for unblock
//   2 RDMA1, 3 RDMA2 rw  buffer sizes in bytes
//   4 WCNT1, 5 WCNT2 ro  byte counters;  6 NBUF1, 7 NBUF2 ro finished buffers
//   8 EVFLAGS  write 1 to clear: [4:0] events, 5 DMA1 phase, 6 DMA2 phase
//   9 IRQMASK rw
//   10+2e EV_WCNT(e), 11+2e EV_NBUF(e)  ro, e = 0 EvPretrig .. 4 EvOverrun
//   20 SIMRATE [15:0], 21 SIMEVAT, 22 SIMEVTAG [3:0]  rw simulator settings
//   23 FIFOUSED ro blocks held in the input FIFO
//
// Timing: no wait states; read data is returned with readdatavalid one
// cycle after read. A flag that is set and cleared in the same cycle stays
// set.
module daq_regs
  import daq_pkg::*;
#(
  parameter int unsigned USED_W = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  // Avalon-MM slave
  input  logic [CSR_AW-1:0] address,
  input  logic              read,
  input  logic              write,
  input  logic [31:0]       writedata,
  output logic [31:0]       readdata,
  output logic              readdatavalid,
  // configuration out
  output ctrl_t             ctrl,
  output logic              unblock,
  output logic [31:0]       rdma1,
  output logic [31:0]       rdma2,
  output logic [15:0]       sim_rate,
  output logic [31:0]       sim_ev_at,
  output logic [3:0]        sim_ev_tags,
  // status in
  input  sd_state_t         state,
  input  logic              trgsig,
  input  logic              waiting,
  input  logic [31:0]       wcnt1,
  input  logic [31:0]       wcnt2,
  input  logic [31:0]       nbuf1,
  input  logic [31:0]       nbuf2,
  input  logic [USED_W-1:0] fifo_used,
  input  tags_t             ev_tags,
  input  logic              ev_ch2,
  input  logic [31:0]       ev_wcnt,
  input  logic [31:0]       ev_nbuf,
  input  logic              phase1_done,
  input  logic              phase2_done,
  output logic              irq
);
  logic [NFLAGS-1:0] flags, irqmask, set_f;
  logic [31:0]       ev_w [NTAGS];
  logic [31:0]       ev_n [NTAGS];
  logic [31:0]       rd_mux;

  always_comb begin
    set_f = NFLAGS'(ev_tags);
    set_f[F_PHASE1] = phase1_done;
    set_f[F_PHASE2] = phase2_done;
  end
  assign irq   = |(flags & irqmask);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl        <= '0;
      unblock     <= 1'b0;
      rdma1       <= '0;
      rdma2       <= '0;
      irqmask     <= '0;
      flags       <= '0;
      sim_rate    <= '0;
      sim_ev_at   <= '0;
      sim_ev_tags <= '0;
      for (int e = 0; e < NTAGS; e++) begin
        ev_w[e] <= '0;
        ev_n[e] <= '0;
      end
    end else begin
      unblock <= 1'b0;
      if (write) begin
        unique case (address)
          A_CTRL: begin
            ctrl       <= ctrl_t'({21'b0, writedata[10:1], 1'b0});
            unblock    <= writedata[0];
          end
          A_RDMA1:    rdma1       <= writedata;
          A_RDMA2:    rdma2       <= writedata;
          A_IRQMASK:  irqmask     <= writedata[NFLAGS-1:0];
          A_SIMRATE:  sim_rate    <= writedata[15:0];
          A_SIMEVAT:  sim_ev_at   <= writedata;
          A_SIMEVTAG: sim_ev_tags <= writedata[3:0];
          default: ;
        endcase
      end
      flags <= (flags & ~((write && address == A_EVFLAGS) ? writedata[NFLAGS-1:0] : '0))
               | set_f;
      for (int e = 0; e < NTAGS; e++) begin
        if (set_f[e]) begin
          ev_w[e] <= ev_wcnt;
          ev_n[e] <= {ev_ch2, ev_nbuf[30:0]};
        end
      end
    end
  end

  always_comb begin
    rd_mux = '0;
    unique case (address)
      A_CTRL:     rd_mux = ctrl;
      A_STATUS:   rd_mux = {27'b0, waiting, trgsig, state};
      A_RDMA1:    rd_mux = rdma1;
      A_RDMA2:    rd_mux = rdma2;
      A_WCNT1:    rd_mux = wcnt1;
      A_WCNT2:    rd_mux = wcnt2;
      A_NBUF1:    rd_mux = nbuf1;
      A_NBUF2:    rd_mux = nbuf2;
      A_EVFLAGS:  rd_mux = 32'(flags);
      A_IRQMASK:  rd_mux = 32'(irqmask);
      A_SIMRATE:  rd_mux = {16'b0, sim_rate};
      A_SIMEVAT:  rd_mux = sim_ev_at;
      A_SIMEVTAG: rd_mux = {28'b0, sim_ev_tags};
      A_FIFOUSED: rd_mux = 32'(fifo_used);
      default: begin
        for (int e = 0; e < NTAGS; e++) begin
          if (address == A_EV_BASE + CSR_AW'(2*e))     rd_mux = ev_w[e];
          if (address == A_EV_BASE + CSR_AW'(2*e + 1)) rd_mux = ev_n[e];
        end
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      readdata      <= '0;
      readdatavalid <= 1'b0;
    end else begin
      readdatavalid <= read;
      if (read) readdata <= rd_mux;
    end
  end

  // Avalon-MM: a master issues a read or a write, not both.
  assert property (@(posedge clk) disable iff (!rst_n) !(read && write));
endmodule
