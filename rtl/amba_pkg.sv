// amba_pkg: types and constants shared by the multi-master AHB system and its
// multiprocessor interface (AHB-to-APB style target bus).
//
// HTRANS and HRESP encodings follow the AMBA AHB protocol. The memory map is
// this design's own choice: the multiprocessor interface answers to the
// 1 MiB window at MP_BASE, and inside it address bits [18:16] pick one of the
// target areas (control/status registers, memory, FIFO, UART, PCI interface,
// network link). Each target area owns 64 KiB of the window.
package amba_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_e;

  // Arbitration select codes for ARBITRATION[1:0]. Fixed priority = 0 and
  // round robin = 1 follow the arbiter state diagram; the other two codes are
  // this design's choice.
  typedef enum logic [1:0] {
    ARB_FIXED       = 2'b00,
    ARB_ROUND_ROBIN = 2'b01,
    ARB_FAIR        = 2'b10,
    ARB_RANDOM      = 2'b11
  } arb_mode_e;

  // Address window of the multiprocessor interface on the AHB.
  localparam logic [ADDR_W-1:0] MP_BASE = 32'h4000_0000;
  localparam logic [ADDR_W-1:0] MP_MASK = 32'hFFF0_0000;

  // Target areas behind the multiprocessor interface, selected by PADDR[18:16].
  localparam int unsigned NUM_TARGETS = 6;
  typedef enum logic [2:0] {
    TGT_CSR  = 3'd0,
    TGT_MEM  = 3'd1,
    TGT_FIFO = 3'd2,
    TGT_UART = 3'd3,
    TGT_PCI  = 3'd4,
    TGT_NET  = 3'd5
  } target_e;
  localparam int unsigned TGT_LSB = 16;

  // Master-side address/control bundle, as driven by one AHB master.
  typedef struct packed {
    logic [ADDR_W-1:0] haddr;
    htrans_e           htrans;
    logic              hwrite;
  } ahb_ctrl_t;

  // States of the multiprocessor interface state machine (3 bits).
  typedef enum logic [2:0] {
    ST_IDLE   = 3'd0,  // no transfer pending, HREADYOUT high
    ST_WWAIT  = 3'd1,  // write data phase: capture HWDATA
    ST_SETUP  = 3'd2,  // APB setup cycle (PSEL high, PENABLE low)
    ST_ENABLE = 3'd3,  // APB access cycle (PSEL and PENABLE high)
    ST_RDONE  = 3'd4   // read data registered onto HRDATA, HREADYOUT high
  } bstate_e;

endpackage
