// tb_workloads: runs the subsystem at default size with the sample rates at
// which the card was measured, and checks that the adapter keeps up. The
// samples simulator produces one block per sample clock, so the sample
// clock period sets the rate: 16 bytes / period.
//   W1  1593 MB/s into one channel, sinks always ready (DMA write to board
//       memory). Single cyclic mode, 64 KiB buffers.
//   W2  1150 MB/s into a sink that accepts three blocks in four, i.e.
//       1200 MB/s (DMA write to host memory). Dual cyclic mode.
//   W3  1087 MB/s in pre-trigger mode: the ring, the trigger and the switch
//       to the post-trigger channel, which costs one idle clk2 cycle.
//   W4  1700 MB/s, above the 1600 MB/s that 16 bytes per 100 MHz clk2
//       cycle allow: overruns must be reported, and the output rate must
//       sit at 1600 MB/s. With 100 MB/s to spare the 64 KiB FIFO takes
//       about 655 us to fill, so this run is the longest.
// Each run checks sample continuity, counts overruns and measures the rate
// at the DMA side over a fixed window.
module tb_workloads;
  timeunit 1ns;
  timeprecision 1ps;
  import daq_pkg::*;
  import avmm_pkg::*;
  logic npor_n = 1, clk_s = 0, clk2 = 0;
  logic [31:0] dropped;
  logic [CSR_AW-1:0] csr_address = '0;
  logic csr_read = 0, csr_write = 0, csr_readdatavalid;
  logic [31:0] csr_writedata = '0, csr_readdata;
  logic st1_valid, st1_sop, st1_eop, st1_ready, st2_valid, st2_sop, st2_eop, st2_ready;
  logic [SAMPLE_W-1:0] st1_data, st2_data;
  logic [ST_ERR_W-1:0] st1_error, st2_error;
  logic [15:0] rxm_irq;
  int checks = 0, failures = 0;
  // the memory interconnect is idle in these runs
  avmm_req_t dma_m_req [6];
  avmm_rsp_t dma_m_rsp [6];
  avmm_req_t b2s_req, txs_req, ddr_req;
  avmm_rsp_t b2m_rsp, b3m_rsp, b4m_rsp;
  initial for (int i = 0; i < 6; i++) dma_m_req[i] = '0;

  pcie_daq_dma dut (.npor_n, .clk_s, .clk2, .ext_valid(1'b0), .ext_data('0), .ext_tags('0), .dropped,
    .csr_address, .csr_read, .csr_write, .csr_writedata, .csr_readdata, .csr_readdatavalid,
    .st1_valid, .st1_data, .st1_sop, .st1_eop, .st1_error, .st1_ready,
    .st2_valid, .st2_data, .st2_sop, .st2_eop, .st2_error, .st2_ready,
    .clk1(clk2), .dma_m_req, .dma_m_rsp, .b2s_req, .b2s_rsp('0), .b2m_req('0), .b2m_rsp,
    .b3m_req('0), .b3m_rsp, .b4m_req('0), .b4m_rsp,
    .txs_req, .txs_rsp('0), .ddr_req, .ddr_rsp('0),
    .dma_irq(3'b000), .rxm_irq);

  realtime half_s = 5.0;
  always #(half_s) clk_s = ~clk_s;
  always #5 clk2 = ~clk2;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic wr(input logic [CSR_AW-1:0] a, input logic [31:0] d);
    @(negedge clk2); csr_address = a; csr_write = 1; csr_writedata = d;
    @(negedge clk2); csr_write = 0;
  endtask
  task automatic rd(input logic [CSR_AW-1:0] a, output logic [31:0] d);
    @(negedge clk2); csr_address = a; csr_read = 1;
    @(negedge clk2); csr_read = 0;
    d = csr_readdata;
  endtask

  // sinks: ready in 'num' of every 4 cycles
  int ready_num = 4, phase_cnt = 0;
  always @(negedge clk2) begin
    phase_cnt = (phase_cnt + 1) % 4;
    st1_ready = phase_cnt < ready_num;
    st2_ready = phase_cnt < ready_num;
  end

  // receive side
  bit run = 0, have_prev = 0;
  logic [15:0] prev;
  int nrx = 0, nrx2 = 0, novr = 0, nbreak = 0;
  int t_trig = -1, t_post = -1, cyc = 0;
  always @(posedge clk2) begin
    cyc++;
    if (run && (st1_valid && st1_ready || st2_valid && st2_ready)) begin
      logic [SAMPLE_W-1:0] d;
      logic [7:0] e;
      d = st2_valid ? st2_data : st1_data;
      e = st2_valid ? st2_error : st1_error;
      nrx++;
      if (st2_valid) begin
        nrx2++;
        if (t_post < 0) t_post = cyc;
      end
      if (e[0] && t_trig < 0) t_trig = cyc;
      if (e[4]) novr++;
      if (have_prev && !e[4] && d[15:0] != prev + 16'd8) nbreak++;
      prev = d[15:0];
      have_prev = 1;
    end
  end

  task automatic reset_all();
    run = 0;
    npor_n = 0;
    repeat (4) @(posedge clk2);
    npor_n = 1;
    repeat (6) @(posedge clk2);
    npor_n = 0;
    repeat (4) @(posedge clk2);
    npor_n = 1;
    repeat (4) @(posedge clk2);
    nrx = 0; nrx2 = 0; novr = 0; nbreak = 0; have_prev = 0; t_trig = -1; t_post = -1;
    run = 1;
  endtask

  // Runs a workload and returns the rate measured at the DMA side in MB/s
  // over 'window' clk2 cycles, after 'settle' cycles.
  task automatic workload(input string name, input real mbps, input int rnum,
                          input logic [31:0] ctrl, input logic [31:0] r1, input logic [31:0] r2,
                          input int trig_at, input int settle, input int window,
                          output real meas);
    int n0;
    half_s = 8000.0 / mbps;            // period = 16 B / rate
    ready_num = rnum;
    reset_all();
    wr(A_RDMA1, r1); wr(A_RDMA2, r2);
    wr(A_SIMRATE, 0);
    wr(A_SIMEVAT, trig_at < 0 ? 32'hFFFF_FFFF : 32'(trig_at));
    wr(A_SIMEVTAG, 32'h1);
    wr(A_CTRL, ctrl);
    repeat (settle) @(posedge clk2);
    n0 = nrx;
    repeat (window) @(posedge clk2);
    meas = real'(nrx - n0) * 16.0 / (real'(window) * 10.0) * 1000.0;
    $display("%s: source %0.0f MB/s, sink %0d/4 ready: measured %0.1f MB/s, %0d blocks, %0d overruns, dropped %0d",
             name, mbps, rnum, meas, nrx, novr, dropped);
    check(nbreak == 0, $sformatf("%s: %0d unflagged gaps in the samples", name, nbreak));
  endtask

  initial begin
    real m;
    // W1: single cyclic (DMA_ena1 | cyclic | simulator), 64 KiB buffers
    workload("W1 DMA write to DDR3", 1593.0, 4, 32'h0000_0422, 65536, 0, -1, 2000, 20000, m);
    check(novr == 0 && dropped == 0, "W1: no overrun at 1593 MB/s");
    check(m > 1585.0 && m < 1600.5, $sformatf("W1: %0.1f MB/s carried", m));
    // W2: dual cyclic, 4 KiB buffers, sink at 1200 MB/s
    workload("W2 DMA write to PCIe", 1150.0, 3, 32'h0000_042A, 4096, 4096, -1, 2000, 20000, m);
    check(novr == 0 && dropped == 0, "W2: no overrun at 1150 MB/s into a 1200 MB/s sink");
    check(m > 1140.0 && m < 1160.0, $sformatf("W2: %0.1f MB/s carried", m));
    // W3: pre-trigger (DMA_ena1|DMA_ena2|B1toB2|B1toTrg|simulator), trigger at block 3000
    workload("W3 pre/post-trigger", 1087.0, 4, 32'h0000_041E, 16384, 65536, 3000, 1000, 6000, m);
    check(novr == 0 && dropped == 0, "W3: no overrun at 1087 MB/s");
    check(t_trig > 0 && t_post > 0 && nrx2 > 0, "W3: trigger switched to DMA2");
    check(t_post - t_trig <= 2, $sformatf("W3: first post-trigger block %0d cycles after the trigger block", t_post - t_trig));
    // W4: above the limit
    workload("W4 over the limit", 1700.0, 4, 32'h0000_0422, 65536, 0, -1, 70000, 10000, m);
    check(novr > 0 && dropped > 0, "W4: overruns reported above 1600 MB/s");
    check(m > 1599.0 && m < 1600.5, $sformatf("W4: output held at %0.1f MB/s", m));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk2);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
