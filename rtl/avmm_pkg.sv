// avmm_pkg: Avalon-MM bundle used by the DMA-side interconnect.
//
// The DMA masters use 37-bit byte addresses (64 GB of host memory below
// 2^36, board memory above), 128-bit data and 5-bit burst counts (bursts of
// up to 16 beats, 256 bytes). A request bundle goes from master to slave, a
// response bundle back. Write bursts follow Avalon-MM: address and
// burstcount are taken with the first beat, the following beats carry only
// data. Reads are pipelined: the command is accepted when waitrequest is
// low and burstcount beats come back later with readdatavalid.
package avmm_pkg;

  localparam int unsigned ADDR_W  = 37;
  localparam int unsigned DATA_W  = 128;
  localparam int unsigned BURST_W = 5;
  localparam int unsigned BE_W    = DATA_W / 8;

  // Region boundary: addresses below are host (PCIe) memory, at or above
  // are board memory.
  localparam logic [ADDR_W-1:0] BOARD_BASE = ADDR_W'(64'h10_0000_0000);  // 64 GB

  typedef struct packed {
    logic [ADDR_W-1:0]  address;
    logic [BURST_W-1:0] burstcount;
    logic               read;
    logic               write;
    logic [DATA_W-1:0]  writedata;
    logic [BE_W-1:0]    byteenable;
  } avmm_req_t;

  typedef struct packed {
    logic               waitrequest;
    logic [DATA_W-1:0]  readdata;
    logic               readdatavalid;
  } avmm_rsp_t;

endpackage
