// sdr_fabric_top: FPGA fabric of the FM3TR transmitter around a PowerPC405.
//
// Samples enter FIFO 0 from an external source.  Software on the PowerPC
// (the MSK modulator) reads them over its data-side on-chip memory port
// (DSOCM), modulates them and stores each modulated value into FIFO 1.  A
// digital up-converter (outside this module) drains FIFO 1 and pushes its
// pass-band output into FIFO 2, from which the sink reads.  What the design
// studies is the path taken by each kind of processor traffic:
//   * instructions: ISOCM block RAM, or PLB block RAM (IPLB master);
//   * program data (stack/heap): DSOCM block RAM, or PLB block RAM (DPLB);
//   * modulated data into FIFO 1, chosen by APP_PATH:
//       APP_OCM  class 1: DSOCM register write (dedicated, fixed latency),
//       APP_PLB  class 2: PLB write to the FIFO 1 slave (shared, arbitrated),
//       APP_OPB  class 3: PLB write through the PLB/OPB bridge to the OPB.
// The PLB has two masters (0 = instruction side, 1 = data side) that compete
// in a round-robin arbiter; the OPB has the bridge as its only master.
// Instruction and data placement is chosen by the software's addresses: both
// memories are always present.  Windows not used by the selected APP_PATH are
// left out of the address decode, so stray accesses get a bus error.
//
// What follows the document: the FIFO 0 / FIFO 1 / FIFO 2 chain, the three
// interfaces, PLB 64 bits and OPB 32 bits, a PLB arbiter and an OPB arbiter,
// the bridge, and the BRAMs on ISOCM, DSOCM and the PLB.  The address map,
// memory and FIFO sizes, latencies and bus handshakes are this design's.
// Caches are inside the processor and are not part of the fabric.
//
// The processor's ports (ISOCM, DSOCM, IPLB, DPLB) and the up-converter's
// ports (FIFO 1 read side, FIFO 2 write side) are brought out.  All logic is
// on one clock; reset is asynchronous, active low.
module sdr_fabric_top
  import sdr_pkg::*;
#(
  parameter app_path_e   APP_PATH    = APP_OCM,
  parameter int unsigned FIFO_DEPTH  = 512,
  parameter int unsigned ISOCM_DEPTH = 2048,  // 64-bit words
  parameter int unsigned DSOCM_DEPTH = 4096,  // 32-bit words
  parameter int unsigned PLBRAM_DEPTH = 2048, // 64-bit words
  parameter int unsigned OCM_LATENCY = 2
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // source -> FIFO 0
  input  logic                            src_push,
  input  logic [SAMPLE_W-1:0]             src_data,
  output logic                            src_full,
  // processor instruction-side OCM
  input  isocm_req_t                      isocm_req,
  output logic [63:0]                     isocm_rdata,
  output logic                            isocm_rvalid,
  // processor data-side OCM
  input  dsocm_req_t                      dsocm_req,
  output logic [31:0]                     dsocm_rdata,
  output logic                            dsocm_rvalid,
  // processor PLB masters
  input  plb_req_t                        iplb_req,
  output plb_rsp_t                        iplb_rsp,
  input  plb_req_t                        dplb_req,
  output plb_rsp_t                        dplb_rsp,
  // up-converter: FIFO 1 read side, FIFO 2 write side
  input  logic                            duc_pop,
  output logic [SAMPLE_W-1:0]             duc_din,
  output logic                            duc_empty,
  input  logic                            duc_push,
  input  logic [SAMPLE_W-1:0]             duc_dout,
  output logic                            duc_full,
  // sink <- FIFO 2
  input  logic                            sink_pop,
  output logic [SAMPLE_W-1:0]             sink_data,
  output logic                            sink_empty,
  // configuration-time loading of the ISOCM and PLB block RAMs
  input  logic                            iload_we,
  input  logic [$clog2(ISOCM_DEPTH)-1:0]  iload_addr,
  input  logic [63:0]                     iload_data,
  input  logic                            pload_we,
  input  logic [$clog2(PLBRAM_DEPTH)-1:0] pload_addr,
  input  logic [63:0]                     pload_data,
  // monitoring
  output logic                            plb_contention,
  output logic                            opb_xfer,
  output logic                            fifo1_stall,
  output logic                            fifo1_overflow,
  output logic                            fifo0_underflow,
  output logic [15:0]                     fifo1_level
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;
  localparam bit PLB_FIFO_EN = (APP_PATH == APP_PLB);
  localparam bit OPB_EN      = (APP_PATH == APP_OPB);

  // PLB slave 0: block RAM, 1: FIFO 1 slave, 2: PLB/OPB bridge.
  localparam logic [2:0][AW-1:0] PLB_BASE = {
    OPB_EN      ? OPB_BASE      : 32'h0000_0001,
    PLB_FIFO_EN ? PLB_FIFO_BASE : 32'h0000_0001,
    PLB_BRAM_BASE};
  localparam logic [2:0][AW-1:0] PLB_MASK = {
    OPB_EN      ? OPB_MASK      : 32'h0000_0000,
    PLB_FIFO_EN ? PLB_FIFO_MASK : 32'h0000_0000,
    PLB_BRAM_MASK};

  // ---------------- FIFO 0 ----------------
  logic                fifo0_pop, fifo0_empty, fifo0_full, fifo0_ovf;
  logic [SAMPLE_W-1:0] fifo0_dout;
  logic [CW-1:0]       fifo0_count;

  sync_fifo #(.DW(SAMPLE_W), .DEPTH(FIFO_DEPTH)) u_fifo0 (
    .clk, .rst_n, .push(src_push), .din(src_data), .pop(fifo0_pop),
    .dout(fifo0_dout), .full(fifo0_full), .empty(fifo0_empty),
    .count(fifo0_count), .overflow(fifo0_ovf), .underflow(fifo0_underflow));
  assign src_full = fifo0_full;

  // ---------------- FIFO 1 ----------------
  logic                fifo1_push, fifo1_full, fifo1_udf;
  logic [SAMPLE_W-1:0] fifo1_din;
  logic [CW-1:0]       fifo1_count;
  logic                ocm_f1_push, plb_f1_push, opb_f1_push;
  logic [31:0]         ocm_f1_din, plb_f1_din, opb_f1_din;

  always_comb begin
    unique case (APP_PATH)
      APP_PLB: begin fifo1_push = plb_f1_push; fifo1_din = plb_f1_din; end
      APP_OPB: begin fifo1_push = opb_f1_push; fifo1_din = opb_f1_din; end
      default: begin fifo1_push = ocm_f1_push; fifo1_din = ocm_f1_din; end
    endcase
  end

  sync_fifo #(.DW(SAMPLE_W), .DEPTH(FIFO_DEPTH)) u_fifo1 (
    .clk, .rst_n, .push(fifo1_push), .din(fifo1_din), .pop(duc_pop),
    .dout(duc_din), .full(fifo1_full), .empty(duc_empty),
    .count(fifo1_count), .overflow(fifo1_overflow), .underflow(fifo1_udf));
  assign fifo1_level = 16'(fifo1_count);

  // ---------------- FIFO 2 ----------------
  logic          fifo2_ovf, fifo2_udf;
  logic [CW-1:0] fifo2_count;

  sync_fifo #(.DW(SAMPLE_W), .DEPTH(FIFO_DEPTH)) u_fifo2 (
    .clk, .rst_n, .push(duc_push), .din(duc_dout), .pop(sink_pop),
    .dout(sink_data), .full(duc_full), .empty(sink_empty),
    .count(fifo2_count), .overflow(fifo2_ovf), .underflow(fifo2_udf));

  // ---------------- on-chip memory ----------------
  ocm_bram #(.DEPTH(ISOCM_DEPTH), .DW(64), .LATENCY(OCM_LATENCY)) u_isocm (
    .clk, .rst_n, .req(isocm_req), .rdata(isocm_rdata), .rvalid(isocm_rvalid),
    .load_we(iload_we), .load_addr(iload_addr), .load_data(iload_data));

  dsocm_ctrl #(.DEPTH(DSOCM_DEPTH), .LATENCY(OCM_LATENCY),
               .APP_OCM_EN(APP_PATH == APP_OCM)) u_dsocm (
    .clk, .rst_n, .req(dsocm_req), .rdata(dsocm_rdata), .rvalid(dsocm_rvalid),
    .fifo0_pop, .fifo0_dout, .fifo0_empty, .fifo0_count(16'(fifo0_count)),
    .fifo1_push(ocm_f1_push), .fifo1_din(ocm_f1_din),
    .fifo1_count(16'(fifo1_count)));

  // ---------------- PLB ----------------
  logic [2:0]            ps_sel, ps_ack;
  logic                  ps_rnw;
  logic [AW-1:0]         ps_addr;
  logic [7:0]            ps_be;
  logic [63:0]           ps_wdata;
  logic [2:0][63:0]      ps_rdata;
  logic [1:0]            pm_ack, plb_gnt;
  logic                  pm_err;
  logic [63:0]           pm_rdata;
  logic                  plb_stall;

  shared_bus #(.NM(2), .NS(3), .AW(AW), .DW(PLB_DW),
               .SLV_BASE(PLB_BASE), .SLV_MASK(PLB_MASK)) u_plb (
    .clk, .rst_n,
    .m_req  ({dplb_req.req,   iplb_req.req}),
    .m_rnw  ({dplb_req.rnw,   iplb_req.rnw}),
    .m_addr ({dplb_req.addr,  iplb_req.addr}),
    .m_be   ({dplb_req.be,    iplb_req.be}),
    .m_wdata({dplb_req.wdata, iplb_req.wdata}),
    .m_ack(pm_ack), .m_err(pm_err), .m_rdata(pm_rdata),
    .s_sel(ps_sel), .s_rnw(ps_rnw), .s_addr(ps_addr), .s_be(ps_be),
    .s_wdata(ps_wdata), .s_ack(ps_ack), .s_rdata(ps_rdata),
    .gnt(plb_gnt), .contention(plb_contention));

  assign iplb_rsp = '{ack: pm_ack[0], err: pm_err & plb_gnt[0], rdata: pm_rdata};
  assign dplb_rsp = '{ack: pm_ack[1], err: pm_err & plb_gnt[1], rdata: pm_rdata};

  bus_bram_slave #(.AW(AW), .DW(PLB_DW), .DEPTH(PLBRAM_DEPTH)) u_plb_bram (
    .clk, .rst_n, .sel(ps_sel[0]), .rnw(ps_rnw), .addr(ps_addr), .be(ps_be),
    .wdata(ps_wdata), .ack(ps_ack[0]), .rdata(ps_rdata[0]),
    .load_we(pload_we), .load_addr(pload_addr), .load_data(pload_data));

  logic plb_f1_full;
  assign plb_f1_full = fifo1_full;

  bus_fifo_slave #(.AW(AW), .DW(PLB_DW)) u_plb_fifo (
    .clk, .rst_n, .sel(ps_sel[1]), .rnw(ps_rnw), .addr(ps_addr), .be(ps_be),
    .wdata(ps_wdata), .ack(ps_ack[1]), .rdata(ps_rdata[1]),
    .fifo_push(plb_f1_push), .fifo_din(plb_f1_din), .fifo_full(plb_f1_full),
    .fifo_count(16'(fifo1_count)), .stall(plb_stall));

  // ---------------- PLB/OPB bridge and OPB ----------------
  logic          ob_req, ob_rnw, ob_ack, ob_err, br_err;
  logic [AW-1:0] ob_addr;
  logic [3:0]    ob_be;
  logic [31:0]   ob_wdata, ob_rdata;
  logic [0:0]    os_sel, os_ack, om_ack, opb_gnt;
  logic          os_rnw, opb_cont;
  logic [AW-1:0] os_addr;
  logic [3:0]    os_be;
  logic [31:0]   os_wdata;
  logic [0:0][31:0] os_rdata;
  logic          opb_stall;

  plb2opb_bridge #(.AW(AW)) u_bridge (
    .clk, .rst_n, .p_sel(ps_sel[2]), .p_rnw(ps_rnw), .p_addr(ps_addr),
    .p_be(ps_be), .p_wdata(ps_wdata), .p_ack(ps_ack[2]), .p_rdata(ps_rdata[2]),
    .o_req(ob_req), .o_rnw(ob_rnw), .o_addr(ob_addr), .o_be(ob_be),
    .o_wdata(ob_wdata), .o_ack(ob_ack), .o_err(ob_err), .o_rdata(ob_rdata),
    .p_err(br_err));

  shared_bus #(.NM(1), .NS(1), .AW(AW), .DW(OPB_DW),
               .SLV_BASE({OPB_FIFO_BASE}), .SLV_MASK({OPB_FIFO_MASK})) u_opb (
    .clk, .rst_n,
    .m_req(ob_req), .m_rnw(ob_rnw), .m_addr(ob_addr), .m_be(ob_be),
    .m_wdata(ob_wdata), .m_ack(om_ack), .m_err(ob_err), .m_rdata(ob_rdata),
    .s_sel(os_sel), .s_rnw(os_rnw), .s_addr(os_addr), .s_be(os_be),
    .s_wdata(os_wdata), .s_ack(os_ack), .s_rdata(os_rdata),
    .gnt(opb_gnt), .contention(opb_cont));
  assign ob_ack = om_ack[0];

  bus_fifo_slave #(.AW(AW), .DW(OPB_DW)) u_opb_fifo (
    .clk, .rst_n, .sel(os_sel[0]), .rnw(os_rnw), .addr(os_addr), .be(os_be),
    .wdata(os_wdata), .ack(os_ack[0]), .rdata(os_rdata[0]),
    .fifo_push(opb_f1_push), .fifo_din(opb_f1_din), .fifo_full(fifo1_full),
    .fifo_count(16'(fifo1_count)), .stall(opb_stall));

  assign opb_xfer    = ob_ack;
  assign fifo1_stall = plb_stall | opb_stall;
endmodule
