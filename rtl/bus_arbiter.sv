// bus_arbiter: grants a shared bus (PLB or OPB) to one master at a time.
//
// The document says only that a device must first ask the arbiter, which
// grants or denies the bus depending on its activity; contention between the
// instruction-side and data-side PLB masters is what slows implementations
// 2.c/2.d and 3.b.  This design uses round-robin: when the bus is idle the
// first requester after the last granted one gets it; the grant is held until
// the slave acknowledges the transfer (`done`), then released for one cycle.
//
// Interface: req[i] held high by master i until its transfer completes;
// gnt (one-hot, registered) names the owner; busy marks an owned bus.
// `contention` is high in every cycle in which some master waits while the
// bus is owned by another or while several request at once.
// Timing: grant one cycle after the request reaches an idle bus.
module bus_arbiter #(
  parameter int unsigned NM = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NM-1:0] req,
  input  logic          done,
  output logic [NM-1:0] gnt,
  output logic          busy,
  output logic          contention
);
  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1;

  logic [MW-1:0] last;
  logic [MW-1:0] pick;
  logic          any;

  // Round-robin choice: first requester strictly after `last`.
  always_comb begin
    pick = last;
    any  = 1'b0;
    for (int k = 1; k <= NM; k++) begin
      int unsigned idx;
      idx = (int'(last) + k) % NM;
      if (!any && req[idx]) begin
        pick = MW'(idx);
        any  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt  <= '0;
      busy <= 1'b0;
      last <= MW'(NM - 1);
    end else if (busy) begin
      if (done) begin
        gnt  <= '0;
        busy <= 1'b0;
      end
    end else if (any) begin
      gnt       <= '0;
      gnt[pick] <= 1'b1;
      busy      <= 1'b1;
      last      <= pick;
    end
  end

  assign contention = busy ? |(req & ~gnt) : ($countones(req) > 1);

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_grant_req: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> |(gnt & req)) else $error("bus_arbiter: owner dropped its request");
endmodule
