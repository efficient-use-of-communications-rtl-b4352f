// shared_bus: a CoreConnect-style shared bus (used for both the PLB and OPB).
//
// Following the document, every master has its own address, write-data and
// read-data connection, while the slaves share one decoupled address/write
// bus and drive their own read data and acknowledge.  A master must win the
// arbiter (bus_arbiter, round-robin) before its request is placed on the
// shared slave bus.  The width is the document's (64 bits for the PLB, 32 for
// the OPB, set by DW); the single-beat request/acknowledge protocol, the
// base/mask address decode and the decode-error response are this design's.
//
// Master side: hold m_req[i] with rnw/addr/be/wdata until m_ack[i]; read data
// is valid on m_rdata with the ack.  m_err accompanies an ack for an address
// no slave claims.  Slave side: s_sel[j] is high while slave j owns the
// transfer; the slave answers with a one-cycle s_ack[j] (and s_rdata[j]).
// Timing: grant 1 cycle after request, then the slave's own latency;
// a decode error is acknowledged one cycle after the grant.
module shared_bus #(
  parameter int unsigned NM = 2,
  parameter int unsigned NS = 2,
  parameter int unsigned AW = 32,
  parameter int unsigned DW = 64,
  parameter logic [NS-1:0][AW-1:0] SLV_BASE = '0,
  parameter logic [NS-1:0][AW-1:0] SLV_MASK = '0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // masters
  input  logic [NM-1:0]          m_req,
  input  logic [NM-1:0]          m_rnw,
  input  logic [NM-1:0][AW-1:0]  m_addr,
  input  logic [NM-1:0][DW/8-1:0] m_be,
  input  logic [NM-1:0][DW-1:0]  m_wdata,
  output logic [NM-1:0]          m_ack,
  output logic                   m_err,
  output logic [DW-1:0]          m_rdata,
  // slaves
  output logic [NS-1:0]          s_sel,
  output logic                   s_rnw,
  output logic [AW-1:0]          s_addr,
  output logic [DW/8-1:0]        s_be,
  output logic [DW-1:0]          s_wdata,
  input  logic [NS-1:0]          s_ack,
  input  logic [NS-1:0][DW-1:0]  s_rdata,
  // monitoring
  output logic [NM-1:0]          gnt,
  output logic                   contention
);
  logic busy, done, owner_req, miss, err_q;

  bus_arbiter #(.NM(NM)) u_arb (
    .clk, .rst_n, .req(m_req), .done, .gnt, .busy, .contention
  );

  // Put the owner's request on the shared slave bus.
  always_comb begin
    s_rnw = 1'b0; s_addr = '0; s_be = '0; s_wdata = '0; owner_req = 1'b0;
    for (int i = 0; i < NM; i++) begin
      if (gnt[i]) begin
        s_rnw     = m_rnw[i];
        s_addr    = m_addr[i];
        s_be      = m_be[i];
        s_wdata   = m_wdata[i];
        owner_req = m_req[i];
      end
    end
  end

  always_comb begin
    for (int j = 0; j < NS; j++)
      s_sel[j] = busy && owner_req && ((s_addr & SLV_MASK[j]) == SLV_BASE[j]);
  end
  assign miss = busy && owner_req && (s_sel == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) err_q <= 1'b0;
    else        err_q <= miss && !err_q;
  end

  always_comb begin
    m_rdata = '0;
    for (int j = 0; j < NS; j++)
      if (s_sel[j] && s_ack[j]) m_rdata = s_rdata[j];
  end

  assign done    = |(s_ack & s_sel) || err_q;
  assign m_ack   = done ? gnt : '0;
  assign m_err   = err_q;

  a_one_slave: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(s_sel))
    else $error("shared_bus: overlapping slave windows");
  a_ack_sel: assert property (@(posedge clk) disable iff (!rst_n) (s_ack & ~s_sel) == '0)
    else $error("shared_bus: acknowledge from an unselected slave");
endmodule
