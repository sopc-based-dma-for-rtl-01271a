// stream_fsm: stream DMA state machine of the DAQ adapter.
//
// Takes tagged sample blocks from the read side of the input FIFO and hands
// each to one of two Avalon-ST sources, one per DMA channel: channel 1 in
// state SD1, channel 2 in state SD2. No other state passes data, so the FIFO
// holds samples while the machine is between phases.
//
// States and transitions follow the design's state diagram:
//   SD0   -> SD1   when DMA_ena1                      (load wCnt1, clear buffer counts)
//   SD1   -> SD1E  after the block that ends the phase: wCnt1 expires, or
//                  B1toTrg and the block has EvPretrig, or SH1 and EvAppEOP
//   SD1E  -> SD2   B1toB2 (dual mode) or B1toTrg && TrgSig       (load wCnt2)
//   SD1E  -> SD1   B1toB1 (single mode, cyclic) or B1toTrg && !TrgSig (reload wCnt1)
//   SD1E  -> SDEND otherwise (single mode, not cyclic)
//   SD2   -> SD2E  after the block that ends the phase: wCnt2 expires, or SH2 and EvAppEOP
//   SD2E  -> SD1   cyclic (reload wCnt1);  SD2E -> SDEND otherwise
//   SDEND -> SD0   when both DMA_ena1 and DMA_ena2 are clear
// TrgSig is set by an EvPretrig block written to channel 1 in pre-trigger
// mode and cleared on entry to SD2. With B1toTrg set, the B1toB2 bit is not
// looked at: the trigger alone decides between the pre-trigger ring and the
// post-trigger phase.
//
// wCnt1/wCnt2 are 32-bit byte counters loaded from the buffer size
// registers rDMA1/rDMA2 at the start of each phase and decremented by 16 per
// block; a phase's last block is marked EOP and its first SOP. rDMA values
// are meant to be non-zero multiples of 16; a counter at 16 or less ends the
// phase with the next block.
//
// A phase ends only by its counter or an event: clearing DMA_ena1 does not
// cut it short. To stop a cyclic run, clear the cyclic bit and let the
// sequence reach SDEND.
//
// Own choices: when ublk_en is set, a new cycle (SD1E -> SD1 in single
// cyclic mode, SD2E -> SD1) waits in SD1E/SD2E until software has written
// an unblock pulse since the previous cycle; the pre-trigger ring SD1E ->
// SD1 and SD1E -> SD2 never wait. With evins set, data bits [127:120] are
// replaced by an events byte {2'b0, EOP, tags}; the tags always go out on
// the ST error port as well. While idle in SD0 with DMA_ena1 clear the
// machine discards whatever reaches the FIFO output, so an acquisition
// starts with fresh samples and not with ones left from an earlier run.
// Each decision state is held for one clk cycle,
// so a phase change costs one idle cycle on the streams.
//
// Timing: one block per clk cycle while the active sink is ready. st*_valid,
// st*_sop/eop/error and in_ready are combinational from the FIFO output
// register and the state.
module stream_fsm
  import daq_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // configuration
  input  ctrl_t               ctrl,
  input  logic                unblock,
  input  logic [31:0]         rdma1,
  input  logic [31:0]         rdma2,
  // FIFO read side
  input  logic                in_valid,
  input  block_t              in_data,
  output logic                in_ready,
  // Avalon-ST source to DMA channel 1
  output logic                st1_valid,
  output logic [SAMPLE_W-1:0] st1_data,
  output logic                st1_sop,
  output logic                st1_eop,
  output logic [ST_ERR_W-1:0] st1_error,
  input  logic                st1_ready,
  // Avalon-ST source to DMA channel 2
  output logic                st2_valid,
  output logic [SAMPLE_W-1:0] st2_data,
  output logic                st2_sop,
  output logic                st2_eop,
  output logic [ST_ERR_W-1:0] st2_error,
  input  logic                st2_ready,
  // status
  output sd_state_t           state,
  output logic [31:0]         wcnt1,
  output logic [31:0]         wcnt2,
  output logic [31:0]         nbuf1,
  output logic [31:0]         nbuf2,
  output logic                trgsig,
  output logic                waiting,     // held in SD1E/SD2E for an unblock
  // event report, valid in the cycle a block is handed over
  output tags_t               ev_tags,
  output logic                ev_ch2,
  output logic [31:0]         ev_wcnt,
  output logic [31:0]         ev_nbuf,
  output logic                phase1_done,
  output logic                phase2_done
);
  sd_state_t   state_n;
  logic        first, permit;
  logic        act1, act2, xfer, end1, end2, eop;
  logic        go1, go2, need_permit;
  tags_t       t;
  logic [SAMPLE_W-1:0] dout;

  assign t    = in_data.tags;
  assign act1 = (state == SD1);
  assign act2 = (state == SD2);

  always_comb begin
    end1 = (wcnt1 <= 32'(BLOCK_BYTES)) || (ctrl.b1totrg && t.pretrig) || (ctrl.sh1 && t.app_eop);
    end2 = (wcnt2 <= 32'(BLOCK_BYTES)) || (ctrl.sh2 && t.app_eop);
    eop  = act1 ? end1 : end2;

    dout = in_data.data;
    if (ctrl.evins) dout[SAMPLE_W-1 -: 8] = {2'b00, eop, t};

    st1_valid = act1 && in_valid;
    st2_valid = act2 && in_valid;
    st1_data  = dout;
    st2_data  = dout;
    st1_sop   = st1_valid && first;
    st2_sop   = st2_valid && first;
    st1_eop   = st1_valid && end1;
    st2_eop   = st2_valid && end2;
    st1_error = st1_valid ? ST_ERR_W'(t) : '0;
    st2_error = st2_valid ? ST_ERR_W'(t) : '0;
    in_ready  = (act1 && st1_ready) || (act2 && st2_ready) ||
                (state == SD0 && !ctrl.dma_ena1);
    xfer      = in_valid && (act1 || act2) && in_ready;

    ev_tags = xfer ? t : '0;
    ev_ch2  = act2;
    ev_wcnt = act2 ? ((wcnt2 > 32'(BLOCK_BYTES)) ? wcnt2 - 32'(BLOCK_BYTES) : '0)
                   : ((wcnt1 > 32'(BLOCK_BYTES)) ? wcnt1 - 32'(BLOCK_BYTES) : '0);
    ev_nbuf = act2 ? nbuf2 : nbuf1;
  end

  // Decisions in SD1E / SD2E.
  always_comb begin
    go2 = 1'b0;
    go1 = 1'b0;
    need_permit = 1'b0;
    if (state == SD1E) begin
      if (ctrl.b1totrg) begin
        go2 = trgsig;
        go1 = !trgsig;
      end else begin
        go2 = ctrl.b1tob2;
        go1 = !ctrl.b1tob2 && ctrl.cyclic;
        need_permit = go1 && ctrl.ublk_en;
      end
    end else if (state == SD2E) begin
      go1 = ctrl.cyclic;
      need_permit = go1 && ctrl.ublk_en;
    end
  end

  assign waiting = need_permit && !permit;

  always_comb begin
    state_n = state;
    unique case (state)
      SD0:   if (ctrl.dma_ena1) state_n = SD1;
      SD1:   if (xfer && end1) state_n = SD1E;
      SD1E:  if (waiting) state_n = SD1E;
             else if (go2) state_n = SD2;
             else if (go1) state_n = SD1;
             else state_n = SDEND;
      SD2:   if (xfer && end2) state_n = SD2E;
      SD2E:  if (waiting) state_n = SD2E;
             else if (go1) state_n = SD1;
             else state_n = SDEND;
      SDEND: if (!ctrl.dma_ena1 && !ctrl.dma_ena2) state_n = SD0;
      default: state_n = SD0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= SD0;
      wcnt1  <= '0;
      wcnt2  <= '0;
      nbuf1  <= '0;
      nbuf2  <= '0;
      first  <= 1'b0;
      trgsig <= 1'b0;
      permit <= 1'b0;
      phase1_done <= 1'b0;
      phase2_done <= 1'b0;
    end else begin
      state <= state_n;
      phase1_done <= 1'b0;
      phase2_done <= 1'b0;

      if (unblock) permit <= 1'b1;
      else if (need_permit && permit && state_n == SD1) permit <= 1'b0;

      if (xfer) begin
        first <= 1'b0;
        if (act1) wcnt1 <= ev_wcnt;
        else      wcnt2 <= ev_wcnt;
        if (act1 && ctrl.b1totrg && t.pretrig) trgsig <= 1'b1;
      end

      if (state == SD1 && state_n == SD1E) begin
        nbuf1 <= nbuf1 + 32'd1;
        phase1_done <= 1'b1;
      end
      if (state == SD2 && state_n == SD2E) begin
        nbuf2 <= nbuf2 + 32'd1;
        phase2_done <= 1'b1;
      end

      if (state != SD1 && state_n == SD1) begin
        wcnt1 <= rdma1;
        first <= 1'b1;
        if (state == SD0) begin
          nbuf1  <= '0;
          nbuf2  <= '0;
          trgsig <= 1'b0;
        end
      end
      if (state != SD2 && state_n == SD2) begin
        wcnt2  <= rdma2;
        first  <= 1'b1;
        trgsig <= 1'b0;
      end
    end
  end

  // Avalon-ST rules: only one channel carries data; SOP/EOP only with valid.
  assert property (@(posedge clk) disable iff (!rst_n) !(st1_valid && st2_valid));
  assert property (@(posedge clk) disable iff (!rst_n) (st1_sop || st1_eop) |-> st1_valid);
  assert property (@(posedge clk) disable iff (!rst_n) (st2_sop || st2_eop) |-> st2_valid);
  // A source keeps valid and data until the sink takes them.
  assert property (@(posedge clk) disable iff (!rst_n)
                   st1_valid && !st1_ready |=> st1_valid && $stable(st1_data));
  assert property (@(posedge clk) disable iff (!rst_n)
                   st2_valid && !st2_ready |=> st2_valid && $stable(st2_data));
endmodule
