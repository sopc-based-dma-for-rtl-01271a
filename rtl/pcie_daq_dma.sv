// pcie_daq_dma: stream DMA subsystem of a PCI Express data acquisition card,
// the part of the card that is not taken from vendor IP.
//
// The card moves samples into host (PCIe) or board (DDR3) memory with two
// scatter-gather DMA controllers (mSGDMA1/2, vendor IP) fed by the DAQ
// adapter (daq_c) over two Avalon-ST links. The PCIe hard IP with its
// Avalon-MM bridge, the clock-crossing bridges B1..B4, the DDR3 controller
// and the DMA controllers themselves connect at this module's ports.
// The module also holds the two pieces of Avalon-MM interconnect on the DMA
// side: the round-robin arbiter (avmm_arbiter) that merges the masters of
// the two stream DMA controllers in front of bridge B2, and, behind B2, the
// router (avmm_region_router) that sends each transfer to host memory
// through the PCIe IP's Txs slave (below 64 GB) or to the DDR3 controller
// (64 GB and up). Bridges B3 and B4 of the memory-to-memory DMA get a
// router each as well, and each of the two memory slaves has a round-robin
// arbiter over the three bridges. Ports:
//   csr_*     DAQ adapter registers, reached from host BAR2 through bridge B1
//   st1_*     samples to mSGDMA1 (its Avalon-ST sink), clk2
//   st2_*     samples to mSGDMA2, clk2
//   dma_m_*   the DMA masters, clk2: [0] mSGDMA1 data write, [1] its
//             descriptor read, [2] its descriptor write-back, [3..5] the
//             same for mSGDMA2 (the order is this design's own choice)
//   b2s_*     merged master towards the slave side of bridge B2, clk2
//   b2m_*     the master side of bridge B2, clk1 (125 MHz)
//   b3m_*, b4m_*  the master sides of bridges B3 and B4, through which the
//             memory-to-memory DMA3 writes and reads, clk1
//   txs_*     to the PCIe IP's Txs slave, full 37-bit address, clk1
//   ddr_*     to the DDR3 controller, address less 64 GB, clk1
//   rxm_irq   interrupt vector to the PCIe IP's RxmIrq input: bit 0 the DAQ
//             adapter, bits 1..3 the irq inputs of mSGDMA1, mSGDMA2 and the
//             memory DMA3, bits 15..4 zero (the bit assignment is this
//             design's own choice)
// This module adds reset synchronisers for the sample clock clk_s, the
// 100 MHz DMA clock clk2 and the 125 MHz PCIe core clock clk1, all released
// from the PCIe IP's reset output (npor_n here).
module pcie_daq_dma
  import daq_pkg::*;
  import avmm_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4096,
  parameter int unsigned N_DMA_M    = 6
) (
  input  logic                npor_n,
  input  logic                clk_s,
  input  logic                clk2,
  input  logic                clk1,
  // acquisition hardware
  input  logic                ext_valid,
  input  logic [SAMPLE_W-1:0] ext_data,
  input  logic [3:0]          ext_tags,
  output logic [31:0]         dropped,
  // Avalon-MM slave from bridge B1
  input  logic [CSR_AW-1:0]   csr_address,
  input  logic                csr_read,
  input  logic                csr_write,
  input  logic [31:0]         csr_writedata,
  output logic [31:0]         csr_readdata,
  output logic                csr_readdatavalid,
  // to mSGDMA1
  output logic                st1_valid,
  output logic [SAMPLE_W-1:0] st1_data,
  output logic                st1_sop,
  output logic                st1_eop,
  output logic [ST_ERR_W-1:0] st1_error,
  input  logic                st1_ready,
  // to mSGDMA2
  output logic                st2_valid,
  output logic [SAMPLE_W-1:0] st2_data,
  output logic                st2_sop,
  output logic                st2_eop,
  output logic [ST_ERR_W-1:0] st2_error,
  input  logic                st2_ready,
  // DMA masters and bridge B2
  input  avmm_req_t           dma_m_req [N_DMA_M],
  output avmm_rsp_t           dma_m_rsp [N_DMA_M],
  output avmm_req_t           b2s_req,
  input  avmm_rsp_t           b2s_rsp,
  input  avmm_req_t           b2m_req,
  output avmm_rsp_t           b2m_rsp,
  input  avmm_req_t           b3m_req,
  output avmm_rsp_t           b3m_rsp,
  input  avmm_req_t           b4m_req,
  output avmm_rsp_t           b4m_rsp,
  // memory slaves
  output avmm_req_t           txs_req,
  input  avmm_rsp_t           txs_rsp,
  output avmm_req_t           ddr_req,
  input  avmm_rsp_t           ddr_rsp,
  // interrupts
  input  logic [2:0]          dma_irq,     // mSGDMA1, mSGDMA2, DMA3
  output logic [15:0]         rxm_irq
);
  logic rst_s_n, rst2_n, rst1_n, daq_irq;
  avmm_req_t mem_req [2];
  avmm_rsp_t mem_rsp [2];

  rst_sync u_rst_s (.clk(clk_s), .rst_in_n(npor_n), .rst_out_n(rst_s_n));
  rst_sync u_rst_2 (.clk(clk2),  .rst_in_n(npor_n), .rst_out_n(rst2_n));
  rst_sync u_rst_1 (.clk(clk1),  .rst_in_n(npor_n), .rst_out_n(rst1_n));

  daq_c #(.FIFO_DEPTH(FIFO_DEPTH)) u_daq_c (
    .clk_s, .rst_s_n, .clk2, .rst2_n,
    .ext_valid, .ext_data, .ext_tags, .dropped,
    .csr_address, .csr_read, .csr_write, .csr_writedata,
    .csr_readdata, .csr_readdatavalid, .irq(daq_irq),
    .st1_valid, .st1_data, .st1_sop, .st1_eop, .st1_error, .st1_ready,
    .st2_valid, .st2_data, .st2_sop, .st2_eop, .st2_error, .st2_ready
  );

  avmm_arbiter #(.N(N_DMA_M)) u_arb (
    .clk(clk2), .rst_n(rst2_n), .m_req(dma_m_req), .m_rsp(dma_m_rsp),
    .s_req(b2s_req), .s_rsp(b2s_rsp)
  );

  // Memory side, clk1: the master sides of bridges B2, B3 and B4 each get
  // a region router; the Txs slave and the DDR3 controller each get a
  // round-robin arbiter over the three routed paths. Transfers to the two
  // memories from different bridges proceed at the same time.
  avmm_req_t bm_req [3];
  avmm_rsp_t bm_rsp [3];
  avmm_req_t rt_req [3][2];
  avmm_rsp_t rt_rsp [3][2];
  avmm_req_t sl_req [2][3];
  avmm_rsp_t sl_rsp [2][3];

  assign bm_req[0] = b2m_req;
  assign bm_req[1] = b3m_req;
  assign bm_req[2] = b4m_req;
  assign b2m_rsp   = bm_rsp[0];
  assign b3m_rsp   = bm_rsp[1];
  assign b4m_rsp   = bm_rsp[2];

  for (genvar b = 0; b < 3; b++) begin : g_route
    avmm_region_router u_route (
      .clk(clk1), .rst_n(rst1_n), .s_req(bm_req[b]), .s_rsp(bm_rsp[b]),
      .m_req(rt_req[b]), .m_rsp(rt_rsp[b])
    );
  end

  always_comb
    for (int b = 0; b < 3; b++)
      for (int p = 0; p < 2; p++) sl_req[p][b] = rt_req[b][p];
  always_comb
    for (int b = 0; b < 3; b++)
      for (int p = 0; p < 2; p++) rt_rsp[b][p] = sl_rsp[p][b];

  for (genvar p = 0; p < 2; p++) begin : g_mem_arb
    avmm_arbiter #(.N(3)) u_arb (
      .clk(clk1), .rst_n(rst1_n), .m_req(sl_req[p]), .m_rsp(sl_rsp[p]),
      .s_req(mem_req[p]), .s_rsp(mem_rsp[p])
    );
  end
  assign txs_req    = mem_req[0];
  assign ddr_req    = mem_req[1];
  assign mem_rsp[0] = txs_rsp;
  assign mem_rsp[1] = ddr_rsp;

  always_ff @(posedge clk2 or negedge rst2_n)
    if (!rst2_n) rxm_irq <= '0;
    else         rxm_irq <= {12'b0, dma_irq, daq_irq};
endmodule
