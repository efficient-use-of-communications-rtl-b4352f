// plb2opb_bridge: PLB slave that re-issues its transfers on the OPB.
//
// The processor reaches OPB devices only through this bridge: it recognises
// PLB addresses in the OPB range (decoded by the PLB) and generates the
// matching OPB transaction.  The PLB is 64 bits wide and the OPB 32, as in
// the document; how a 64-bit transfer is split is this design's choice: each
// 32-bit lane with a byte enable set becomes one OPB transfer, low lane
// (bits 31:0, address with bit 2 clear) first, high lane at address + 4.
// Reads gather the lanes back into one 64-bit word.  The PLB acknowledge is
// given one cycle after the last OPB acknowledge, so the processor sees the
// whole OPB latency: the bridge posts nothing.
//
// OPB master side: hold o_req with o_rnw/o_addr/o_be/o_wdata until o_ack;
// read data on o_rdata with o_ack.  o_err from the OPB is passed to p_err.
module plb2opb_bridge #(
  parameter int unsigned AW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  // PLB slave
  input  logic          p_sel,
  input  logic          p_rnw,
  input  logic [AW-1:0] p_addr,
  input  logic [7:0]    p_be,
  input  logic [63:0]   p_wdata,
  output logic          p_ack,
  output logic [63:0]   p_rdata,
  // OPB master
  output logic          o_req,
  output logic          o_rnw,
  output logic [AW-1:0] o_addr,
  output logic [3:0]    o_be,
  output logic [31:0]   o_wdata,
  input  logic          o_ack,
  input  logic          o_err,
  input  logic [31:0]   o_rdata,
  output logic          p_err
);
  typedef enum logic [1:0] {IDLE, LO, HI, DONE} state_e;
  state_e state;
  logic   err_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      p_rdata  <= '0;
      err_seen <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (p_sel) begin
          err_seen <= 1'b0;
          if (p_be[3:0] != '0)      state <= LO;
          else if (p_be[7:4] != '0) state <= HI;
          else                      state <= DONE;
        end
        LO: if (o_ack) begin
          p_rdata[31:0] <= o_rdata;
          err_seen      <= err_seen | o_err;
          state         <= (p_be[7:4] != '0) ? HI : DONE;
        end
        HI: if (o_ack) begin
          p_rdata[63:32] <= o_rdata;
          err_seen       <= err_seen | o_err;
          state          <= DONE;
        end
        DONE: state <= IDLE;
      endcase
    end
  end

  assign o_req   = (state == LO) || (state == HI);
  assign o_rnw   = p_rnw;
  assign o_addr  = (state == HI) ? {p_addr[AW-1:3], 3'b100} : {p_addr[AW-1:3], 3'b000};
  assign o_be    = (state == HI) ? p_be[7:4] : p_be[3:0];
  assign o_wdata = (state == HI) ? p_wdata[63:32] : p_wdata[31:0];
  assign p_ack   = (state == DONE);
  assign p_err   = (state == DONE) && err_seen;
endmodule
