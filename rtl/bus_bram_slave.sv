// bus_bram_slave: block RAM behind a shared-bus slave port (PLB BRAM).
//
// The document places instructions (IPLB BRAM) or program data such as the
// stack and heap (DPLB BRAM) in block RAM reached over the PLB.  This slave
// performs one single-beat access per selection: the BRAM is read or written
// (with byte enables) in the first selected cycle and the acknowledge, with
// read data, follows one cycle later.  It then waits for `sel` to drop before
// it accepts another transfer, so a held request is served once.  The word
// width follows the bus; the depth (default 2048 x 64 = 16 KB) and the
// one-wait-state timing are this design's choices.  The load port stands
// for the contents written into the BRAM at configuration time.
module bus_bram_slave #(
  parameter int unsigned AW    = 32,
  parameter int unsigned DW    = 64,
  parameter int unsigned DEPTH = 2048
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sel,
  input  logic                     rnw,
  input  logic [AW-1:0]            addr,
  input  logic [DW/8-1:0]          be,
  input  logic [DW-1:0]            wdata,
  output logic                     ack,
  output logic [DW-1:0]            rdata,
  input  logic                     load_we,
  input  logic [$clog2(DEPTH)-1:0] load_addr,
  input  logic [DW-1:0]            load_data
);
  localparam int unsigned AB = $clog2(DW / 8);
  localparam int unsigned IW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  logic [IW-1:0] widx;
  logic          served;   // transfer done, waiting for sel to drop
  logic          start;

  assign widx  = addr[AB+IW-1:AB];
  assign start = sel && !served;

  always_ff @(posedge clk) begin
    if (start && !rnw) begin
      for (int b = 0; b < DW / 8; b++)
        if (be[b]) mem[widx][8*b +: 8] <= wdata[8*b +: 8];
    end else if (load_we) begin
      mem[load_addr] <= load_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack    <= 1'b0;
      served <= 1'b0;
      rdata  <= '0;
    end else begin
      ack <= start;
      if (start && rnw) rdata <= mem[widx];
      if (start)        served <= 1'b1;
      else if (!sel)    served <= 1'b0;
      else if (ack)     served <= 1'b0;
    end
  end
endmodule
