// sample_sim: samples simulator of the DAQ adapter, used in place of a real
// converter to test the DMA paths at a programmed data rate.
//
// Each output block holds eight 16-bit samples that count up by one, the
// lowest sample in bits [15:0]; the next block continues the count (block k
// carries the values 8k .. 8k+7, modulo 2^16). A block is produced every
// RATE+1 cycles of clk_s, so at RATE = 0 the source runs at one 16-byte
// block per cycle. One block, number EV_AT counted from 0 after enabling,
// carries the tags EV_TAGS; this lets a test place a trigger (EvPretrig) or
// an application event at a known sample.
//
// The counting pattern follows the sample data seen in the design's
// logic-analyser capture (consecutive 16-bit values packed eight to a
// block). The rate divider and the single programmable event are this
// design's own choices.
//
// Interface: en is a level already synchronised to clk_s. rate, ev_at and
// ev_tags are quasi-static and are captured on the cycle en rises, so they
// may come from another clock domain if software changes them only while the
// simulator is disabled. Output: out_valid for one cycle per block, no
// backpressure (like a converter).
module sample_sim
  import daq_pkg::*;
(
  input  logic                clk_s,
  input  logic                rst_n,
  input  logic                en,
  input  logic [15:0]         rate,
  input  logic [31:0]         ev_at,
  input  logic [3:0]          ev_tags,
  output logic                out_valid,
  output logic [SAMPLE_W-1:0] out_data,
  output logic [3:0]          out_tags
);
  logic        en_q;
  logic [15:0] rate_q, div;
  logic [31:0] ev_at_q, blk;
  logic [3:0]  ev_tags_q;
  logic [15:0] base;

  always_ff @(posedge clk_s or negedge rst_n) begin
    if (!rst_n) begin
      en_q      <= 1'b0;
      rate_q    <= '0;
      ev_at_q   <= '0;
      ev_tags_q <= '0;
      div       <= '0;
      blk       <= '0;
      base      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_tags  <= '0;
    end else begin
      en_q      <= en;
      out_valid <= 1'b0;
      if (en && !en_q) begin
        // start: capture the settings and restart the pattern
        rate_q    <= rate;
        ev_at_q   <= ev_at;
        ev_tags_q <= ev_tags;
        div       <= '0;
        blk       <= '0;
        base      <= '0;
      end else if (en) begin
        if (div == rate_q) begin
          div       <= '0;
          out_valid <= 1'b1;
          for (int j = 0; j < 8; j++)
            out_data[16*j +: 16] <= base + 16'(j);
          out_tags  <= (blk == ev_at_q) ? ev_tags_q : 4'b0;
          base      <= base + 16'd8;
          blk       <= blk + 32'd1;
        end else begin
          div <= div + 16'd1;
        end
      end
    end
  end
endmodule
