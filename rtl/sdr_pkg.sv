// sdr_pkg: types and constants shared by the FM3TR transmitter fabric.
//
// The fabric connects a PowerPC405 hard core to the FIFOs that feed a digital
// up-converter.  Three processor interfaces reach the fabric: the on-chip
// memory ports (ISOCM for instructions, DSOCM for data), the 64-bit Processor
// Local Bus (PLB) and, behind a bridge, the 32-bit On-Chip Peripheral Bus
// (OPB).  The bus widths follow the document; the address map, the memory
// sizes and the single-beat request/acknowledge handshake are choices of this
// design.
package sdr_pkg;

  localparam int unsigned AW       = 32;  // address width of every interface
  localparam int unsigned PLB_DW   = 64;  // PLB data width (document)
  localparam int unsigned OPB_DW   = 32;  // OPB data width (document)
  localparam int unsigned SAMPLE_W = 32;  // one FIFO word: 16-bit I and 16-bit Q

  // Which interface carries the modulated data into FIFO 1 (the three
  // implementation classes).
  typedef enum logic [1:0] {
    APP_OCM = 2'd0,   // class 1: DSOCM writes into FIFO 1
    APP_PLB = 2'd1,   // class 2: PLB writes into FIFO 1
    APP_OPB = 2'd2    // class 3: PLB -> bridge -> OPB writes into FIFO 1
  } app_path_e;

  // Address map.
  localparam logic [AW-1:0] PLB_BRAM_BASE = 32'h0000_0000; // instructions / program data
  localparam logic [AW-1:0] PLB_BRAM_MASK = 32'hFFFF_0000; // 64 KB window
  localparam logic [AW-1:0] PLB_FIFO_BASE = 32'h8000_0000; // FIFO 1 on the PLB (class 2)
  localparam logic [AW-1:0] PLB_FIFO_MASK = 32'hFFFF_FF00;
  localparam logic [AW-1:0] OPB_BASE      = 32'hC000_0000; // whole OPB range, behind the bridge
  localparam logic [AW-1:0] OPB_MASK      = 32'hF000_0000;
  localparam logic [AW-1:0] OPB_FIFO_BASE = 32'hC000_0000; // FIFO 1 on the OPB (class 3)
  localparam logic [AW-1:0] OPB_FIFO_MASK = 32'hFFFF_FF00;

  // DSOCM map: low half is BRAM, registers from offset 0x8000.
  localparam logic [AW-1:0] DSOCM_BASE      = 32'h4000_0000;
  localparam logic [15:0]   DSOCM_FIFO0_OFS = 16'h8000; // read: pop FIFO 0
  localparam logic [15:0]   DSOCM_FIFO1_OFS = 16'h8004; // write: push FIFO 1 (class 1)
  localparam logic [15:0]   DSOCM_STAT_OFS  = 16'h8008; // read: {FIFO1 count, FIFO0 count}


  // On-chip memory port: one access per cycle, read data a fixed number of
  // cycles later, no wait states.
  typedef struct packed {
    logic          en;
    logic          we;
    logic [AW-1:0] addr;
    logic [3:0]    be;
    logic [31:0]   wdata;
  } dsocm_req_t;

  typedef struct packed {
    logic          en;
    logic [AW-1:0] addr;
  } isocm_req_t;

  // PLB master request / response: hold req until ack.
  typedef struct packed {
    logic              req;
    logic              rnw;
    logic [AW-1:0]     addr;
    logic [PLB_DW/8-1:0] be;
    logic [PLB_DW-1:0] wdata;
  } plb_req_t;

  typedef struct packed {
    logic              ack;
    logic              err;
    logic [PLB_DW-1:0] rdata;
  } plb_rsp_t;

endpackage
