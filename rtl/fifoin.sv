// fifoin: dual-clock input FIFO of the DAQ adapter (FIFOIN).
//
// Carries 133-bit blocks (128 bits of samples and five tag bits) from the
// sample clock domain (wr_clk) to the DMA system clock domain (rd_clk, the
// 100 MHz clk2). The default depth of 4096 blocks is 65536 bytes of samples,
// the FIFO size of the design's throughput measurements.
//
// How it works: a RAM of DEPTH words with one write port and one registered
// read port. Write and read pointers are DEPTH*2-range binary counters; each
// side publishes its pointer in Gray code, and the other side passes it
// through two flops before comparing. Full and empty are therefore
// pessimistic by the synchroniser delay, never wrong. The read side is
// first-word-fall-through: a block is moved from the RAM into an output
// register as soon as one is available and the register is empty or being
// consumed, so rd_valid/rd_data behave like an Avalon-ST source with
// readyLatency 0 and one block per cycle can be drained.
//
// Capacity is DEPTH+1 blocks: DEPTH in the RAM and one in the output
// register.
//
// Interface: write with wr_en when !wr_full (a write while full is ignored).
// rd_valid/rd_ready handshake on the read side. rd_used counts the blocks
// held, as seen from the read side, including the output register.
module fifoin #(
  parameter int unsigned WIDTH = 133,
  parameter int unsigned DEPTH = 4096
) (
  input  logic               wr_clk,
  input  logic               wr_rst_n,
  input  logic               wr_en,
  input  logic [WIDTH-1:0]   wr_data,
  output logic               wr_full,

  input  logic               rd_clk,
  input  logic               rd_rst_n,
  output logic               rd_valid,
  output logic [WIDTH-1:0]   rd_data,
  input  logic               rd_ready,
  output logic [$clog2(DEPTH):0] rd_used
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wr_bin, wr_gray, rd_bin, rd_gray;
  logic [AW:0] rd_gray_w1, rd_gray_w2;   // read pointer in write domain
  logic [AW:0] wr_gray_r1, wr_gray_r2;   // write pointer in read domain
  logic [AW:0] wr_bin_r;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  assign wr_full = (wr_gray == {~rd_gray_w2[AW:AW-1], rd_gray_w2[AW-2:0]});

  always_ff @(posedge wr_clk)
    if (wr_en && !wr_full) mem[wr_bin[AW-1:0]] <= wr_data;

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wr_bin     <= '0;
      wr_gray    <= '0;
      rd_gray_w1 <= '0;
      rd_gray_w2 <= '0;
    end else begin
      rd_gray_w1 <= rd_gray;
      rd_gray_w2 <= rd_gray_w1;
      if (wr_en && !wr_full) begin
        wr_bin  <= wr_bin + 1'b1;
        wr_gray <= bin2gray(wr_bin + 1'b1);
      end
    end
  end

  // ---------------- read side ----------------
  logic empty, load;
  assign empty = (rd_gray == wr_gray_r2);
  assign load  = !empty && (!rd_valid || rd_ready);
  assign wr_bin_r = gray2bin(wr_gray_r2);
  assign rd_used  = (wr_bin_r - rd_bin) + {{AW{1'b0}}, rd_valid};

  always_ff @(posedge rd_clk)
    if (load) rd_data <= mem[rd_bin[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rd_bin     <= '0;
      rd_gray    <= '0;
      wr_gray_r1 <= '0;
      wr_gray_r2 <= '0;
      rd_valid   <= 1'b0;
    end else begin
      wr_gray_r1 <= wr_gray;
      wr_gray_r2 <= wr_gray_r1;
      if (load) begin
        rd_bin   <= rd_bin + 1'b1;
        rd_gray  <= bin2gray(rd_bin + 1'b1);
        rd_valid <= 1'b1;
      end else if (rd_ready) begin
        rd_valid <= 1'b0;
      end
    end
  end

  // The pointer distance can never exceed the depth.
  assert property (@(posedge rd_clk) disable iff (!rd_rst_n)
                   (wr_bin_r - rd_bin) <= (AW+1)'(DEPTH));
endmodule
