// daq_c: DAQ adapter. Splits a stream of 128-bit sample blocks into the two
// Avalon-ST channels of the stream DMA, by the programmed acquisition mode:
// single channel DMA1, dual DMA1 then DMA2, or pre-trigger (DMA1 as a ring
// until the trigger, then DMA2 for the post-trigger samples).
//
// Structure:
//   sample clock (clk_s) | system clock (clk2)
//   daq_input (MUX: external port or sample_sim; EvOverrun tagging)
//     -> fifoin (dual-clock, 133-bit blocks)
//                        -> stream_fsm (state machine, byte counters,
//                           SOP/EOP, events on the ST error port)
//                        -> st1_* to mSGDMA1, st2_* to mSGDMA2
//   daq_regs: Avalon-MM control/status slave on clk2, event registers, irq.
//
// The four source tags travel with their samples through the FIFO, so the
// event registers and the FSM see them in step with the data. The
// simulator runs while its source is selected and DMA_ena1 is set; those two
// bits cross to clk_s through a two-flop synchroniser, and the other
// simulator settings are captured in clk_s when it starts (change them only
// while it is stopped).
//
// Interface timing: ST sources have readyLatency 0 and carry one block per
// clk2 cycle. CSR reads return one cycle after the request. ext_valid
// marks one block per clk_s cycle; there is no backpressure to the source:
// a block that finds the FIFO full is dropped and counted (dropped, clk_s
// domain).
module daq_c
  import daq_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4096
) (
  input  logic                clk_s,
  input  logic                rst_s_n,
  input  logic                clk2,
  input  logic                rst2_n,
  // samples from the acquisition hardware (clk_s)
  input  logic                ext_valid,
  input  logic [SAMPLE_W-1:0] ext_data,
  input  logic [3:0]          ext_tags,
  output logic [31:0]         dropped,
  // control/status slave (clk2)
  input  logic [CSR_AW-1:0]   csr_address,
  input  logic                csr_read,
  input  logic                csr_write,
  input  logic [31:0]         csr_writedata,
  output logic [31:0]         csr_readdata,
  output logic                csr_readdatavalid,
  output logic                irq,
  // Avalon-ST to DMA channel 1 (clk2)
  output logic                st1_valid,
  output logic [SAMPLE_W-1:0] st1_data,
  output logic                st1_sop,
  output logic                st1_eop,
  output logic [ST_ERR_W-1:0] st1_error,
  input  logic                st1_ready,
  // Avalon-ST to DMA channel 2 (clk2)
  output logic                st2_valid,
  output logic [SAMPLE_W-1:0] st2_data,
  output logic                st2_sop,
  output logic                st2_eop,
  output logic [ST_ERR_W-1:0] st2_error,
  input  logic                st2_ready
);
  localparam int unsigned USED_W = $clog2(FIFO_DEPTH) + 1;

  ctrl_t       ctrl;
  logic        unblock;
  logic [31:0] rdma1, rdma2, sim_ev_at;
  logic [15:0] sim_rate;
  logic [3:0]  sim_ev_tags;

  // clk_s side
  logic                sel_sim_s, sim_en_s;
  logic                sim_valid;
  logic [SAMPLE_W-1:0] sim_data;
  logic [3:0]          sim_tags;
  logic                wr_en, wr_full;
  block_t              wr_data;

  // clk2 side
  logic                rd_valid, rd_ready;
  block_t              rd_data;
  logic [USED_W-1:0]   fifo_used;
  sd_state_t           state;
  logic [31:0]         wcnt1, wcnt2, nbuf1, nbuf2, ev_wcnt, ev_nbuf;
  logic                trgsig, waiting, ev_ch2, phase1_done, phase2_done;
  tags_t               ev_tags;

  sync_2ff u_sync_sel (.clk(clk_s), .rst_n(rst_s_n), .d(ctrl.src_sim), .q(sel_sim_s));
  sync_2ff u_sync_en  (.clk(clk_s), .rst_n(rst_s_n), .d(ctrl.src_sim && ctrl.dma_ena1), .q(sim_en_s));

  sample_sim u_sim (
    .clk_s, .rst_n(rst_s_n), .en(sim_en_s),
    .rate(sim_rate), .ev_at(sim_ev_at), .ev_tags(sim_ev_tags),
    .out_valid(sim_valid), .out_data(sim_data), .out_tags(sim_tags)
  );

  daq_input u_in (
    .clk_s, .rst_n(rst_s_n), .sel_sim(sel_sim_s),
    .ext_valid, .ext_data, .ext_tags,
    .sim_valid, .sim_data, .sim_tags,
    .wr_en, .wr_data, .wr_full, .dropped
  );

  fifoin #(.WIDTH(BLOCK_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wr_clk(clk_s), .wr_rst_n(rst_s_n), .wr_en, .wr_data(wr_data), .wr_full,
    .rd_clk(clk2), .rd_rst_n(rst2_n), .rd_valid, .rd_data(rd_data), .rd_ready,
    .rd_used(fifo_used)
  );

  stream_fsm u_fsm (
    .clk(clk2), .rst_n(rst2_n), .ctrl, .unblock, .rdma1, .rdma2,
    .in_valid(rd_valid), .in_data(rd_data), .in_ready(rd_ready),
    .st1_valid, .st1_data, .st1_sop, .st1_eop, .st1_error, .st1_ready,
    .st2_valid, .st2_data, .st2_sop, .st2_eop, .st2_error, .st2_ready,
    .state, .wcnt1, .wcnt2, .nbuf1, .nbuf2, .trgsig, .waiting,
    .ev_tags, .ev_ch2, .ev_wcnt, .ev_nbuf, .phase1_done, .phase2_done
  );

  daq_regs #(.USED_W(USED_W)) u_regs (
    .clk(clk2), .rst_n(rst2_n),
    .address(csr_address), .read(csr_read), .write(csr_write),
    .writedata(csr_writedata), .readdata(csr_readdata),
    .readdatavalid(csr_readdatavalid),
    .ctrl, .unblock, .rdma1, .rdma2, .sim_rate, .sim_ev_at, .sim_ev_tags,
    .state, .trgsig, .waiting, .wcnt1, .wcnt2, .nbuf1, .nbuf2, .fifo_used,
    .ev_tags, .ev_ch2, .ev_wcnt, .ev_nbuf, .phase1_done, .phase2_done, .irq
  );
endmodule
