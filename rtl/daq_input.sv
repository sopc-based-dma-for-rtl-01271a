// daq_input: input stage of the DAQ adapter, in the sample clock domain.
//
// A MUX selects the block source: the external sample port or the samples
// simulator. Each valid block is written to the input FIFO together with its
// four source tags. The FIFO is never allowed to stall the source: when it
// is full the block is dropped, and the next block that is written carries
// the EvOverrun tag, so the reader knows that samples are missing right
// before it. A count of dropped blocks is kept as well.
//
// Interface: sel_sim selects the simulator (synchronised to clk_s by the
// caller). wr_en/wr_data go to the FIFO write port; wr_full is the FIFO's
// full flag of the same cycle. The stage is combinational from source to
// FIFO; only the overrun flag and drop counter are registered.
//
// Source selection and overrun tagging follow the design; marking the next
// written block (rather than the last one before the gap) is this design's
// own choice.
module daq_input
  import daq_pkg::*;
(
  input  logic                clk_s,
  input  logic                rst_n,
  input  logic                sel_sim,
  // external samples
  input  logic                ext_valid,
  input  logic [SAMPLE_W-1:0] ext_data,
  input  logic [3:0]          ext_tags,
  // simulator samples
  input  logic                sim_valid,
  input  logic [SAMPLE_W-1:0] sim_data,
  input  logic [3:0]          sim_tags,
  // FIFO write port
  output logic                wr_en,
  output block_t              wr_data,
  input  logic                wr_full,
  output logic [31:0]         dropped
);
  logic                in_valid;
  logic [SAMPLE_W-1:0] in_data;
  logic [3:0]          in_tags;
  logic                ovr_pend;

  always_comb begin
    in_valid = sel_sim ? sim_valid : ext_valid;
    in_data  = sel_sim ? sim_data  : ext_data;
    in_tags  = sel_sim ? sim_tags  : ext_tags;
    wr_en    = in_valid && !wr_full;
    wr_data.data = in_data;
    wr_data.tags = tags_t'({ovr_pend, in_tags});
  end

  always_ff @(posedge clk_s or negedge rst_n) begin
    if (!rst_n) begin
      ovr_pend <= 1'b0;
      dropped  <= '0;
    end else if (in_valid) begin
      if (wr_full) begin
        ovr_pend <= 1'b1;
        dropped  <= dropped + 32'd1;
      end else begin
        ovr_pend <= 1'b0;
      end
    end
  end
endmodule
