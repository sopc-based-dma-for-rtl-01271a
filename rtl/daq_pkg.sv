// daq_pkg: types and constants shared by the DAQ adapter (DAQ_C) modules.
//
// A sample block is 128 bits of samples plus five tag bits. Four tags come
// from the data source together with the samples (EvPretrig, EvError, EvApp,
// EvAppEOP); the fifth, EvOverrun, is added on the write side of the input
// FIFO when blocks had to be dropped because it was full. The whole 133-bit
// word is what the input FIFO stores.
//
// The register map, the bit order of the tags and of the control register,
// and the state encoding are this design's own choices.
package daq_pkg;

  localparam int unsigned SAMPLE_W = 128;          // sample block width
  localparam int unsigned NTAGS    = 5;            // 4 source tags + EvOverrun
  localparam int unsigned BLOCK_W  = SAMPLE_W + NTAGS;
  localparam int unsigned BLOCK_BYTES = SAMPLE_W / 8;
  localparam int unsigned ST_ERR_W = 8;            // Avalon-ST error port width
  localparam int unsigned CSR_AW   = 5;            // CSR word address width

  // Tag bundle; bit order is also the order of the event flags.
  typedef struct packed {
    logic overrun;   // bit 4  EvOverrun
    logic app_eop;   // bit 3  EvAppEOP
    logic app;       // bit 2  EvApp
    logic error;     // bit 1  EvError
    logic pretrig;   // bit 0  EvPretrig
  } tags_t;

  typedef struct packed {
    tags_t               tags;
    logic [SAMPLE_W-1:0] data;
  } block_t;

  // Stream DMA state machine states (names follow the state diagram).
  typedef enum logic [2:0] {
    SD0   = 3'd0,
    SD1   = 3'd1,
    SD1E  = 3'd2,
    SD2   = 3'd3,
    SD2E  = 3'd4,
    SDEND = 3'd5
  } sd_state_t;

  // Control register (CSR word 0).
  typedef struct packed {
    logic [20:0] rsvd;
    logic        src_sim;    // bit 10: input MUX selects the samples simulator
    logic        evins;      // bit 9 : events byte inserted in data bits [127:120]
    logic        ublk_en;    // bit 8 : each new cycle waits for an unblock write
    logic        sh2;        // bit 7 : EvAppEOP ends a DMA2 phase
    logic        sh1;        // bit 6 : EvAppEOP ends a DMA1 phase
    logic        cyclic;     // bit 5 : repeat the sequence
    logic        b1totrg;    // bit 4 : pre-trigger mode
    logic        b1tob2;     // bit 3 : dual-channel modes
    logic        dma_ena2;   // bit 2
    logic        dma_ena1;   // bit 1
    logic        rsvd0;      // bit 0 : write 1 = unblock pulse, reads 0
  } ctrl_t;

  // CSR word addresses.
  localparam logic [CSR_AW-1:0] A_CTRL     = 5'd0;
  localparam logic [CSR_AW-1:0] A_STATUS   = 5'd1;
  localparam logic [CSR_AW-1:0] A_RDMA1    = 5'd2;
  localparam logic [CSR_AW-1:0] A_RDMA2    = 5'd3;
  localparam logic [CSR_AW-1:0] A_WCNT1    = 5'd4;
  localparam logic [CSR_AW-1:0] A_WCNT2    = 5'd5;
  localparam logic [CSR_AW-1:0] A_NBUF1    = 5'd6;
  localparam logic [CSR_AW-1:0] A_NBUF2    = 5'd7;
  localparam logic [CSR_AW-1:0] A_EVFLAGS  = 5'd8;   // write 1 to clear
  localparam logic [CSR_AW-1:0] A_IRQMASK  = 5'd9;
  localparam logic [CSR_AW-1:0] A_EV_BASE  = 5'd10;  // 10..19: per event {WCNT, NBUF}
  localparam logic [CSR_AW-1:0] A_SIMRATE  = 5'd20;
  localparam logic [CSR_AW-1:0] A_SIMEVAT  = 5'd21;
  localparam logic [CSR_AW-1:0] A_SIMEVTAG = 5'd22;
  localparam logic [CSR_AW-1:0] A_FIFOUSED = 5'd23;

  // Event flag bits beyond the five tag events.
  localparam int unsigned F_PHASE1 = 5;   // a DMA1 phase finished
  localparam int unsigned F_PHASE2 = 6;   // a DMA2 phase finished
  localparam int unsigned NFLAGS   = 7;

endpackage
