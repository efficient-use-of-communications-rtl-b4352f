// bus_fifo_slave: bus slave that feeds FIFO 1 from the PLB or the OPB.
//
// In implementation classes 2 and 3 the processor stores each modulated
// value through the PLB (class 2) or through the PLB/OPB bridge onto the OPB
// (class 3) into FIFO 1, whose other side is drained by the up-converter.
// A bus write to the window pushes one 32-bit word; on a 64-bit bus the word
// is taken from the lane named by addr[2] (0: bits 31:0, 1: bits 63:32).
// When FIFO 1 is full the slave withholds its acknowledge until a word has
// left, so the processor stalls instead of losing data.  A read returns the
// fill level in the low half-word.  Lane order, register layout and the stall
// on full are this design's choices; the document gives only the data path.
// Timing: acknowledge one cycle after selection if the FIFO has room.
module bus_fifo_slave #(
  parameter int unsigned AW = 32,
  parameter int unsigned DW = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sel,
  input  logic             rnw,
  input  logic [AW-1:0]    addr,
  input  logic [DW/8-1:0]  be,
  input  logic [DW-1:0]    wdata,
  output logic             ack,
  output logic [DW-1:0]    rdata,
  // FIFO 1 write side
  output logic             fifo_push,
  output logic [31:0]      fifo_din,
  input  logic             fifo_full,
  input  logic [15:0]      fifo_count,
  // one pulse per cycle spent waiting on a full FIFO
  output logic             stall
);
  logic served, start;
  logic [31:0] lane;

  if (DW == 64) begin : g_w64
    assign lane = addr[2] ? wdata[63:32] : wdata[31:0];
  end else begin : g_w32
    assign lane = wdata[31:0];
  end

  assign start     = sel && !served && (rnw || !fifo_full);
  assign stall     = sel && !served && !rnw && fifo_full;
  assign fifo_push = start && !rnw && (be != '0);
  assign fifo_din  = lane;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack    <= 1'b0;
      served <= 1'b0;
      rdata  <= '0;
    end else begin
      ack <= start;
      if (start && rnw) rdata <= DW'({16'h0, fifo_count});
      if (start)    served <= 1'b1;
      else if (ack) served <= 1'b0;
    end
  end
endmodule
