// tb_plb2opb_bridge: self-checking test of the PLB-to-OPB bridge.
// Random 64-bit PLB reads and writes with random byte enables are presented
// to the bridge; a behavioural OPB slave answers each OPB transfer after 1-3
// cycles.  Checks: one OPB transfer per 32-bit lane with an enable set, low
// lane first at addr, high lane at addr+4, with the right byte enables and
// data; reads return the two OPB words assembled; an OPB error is reported
// with the PLB acknowledge; the PLB acknowledge is a single pulse one cycle
// after the last OPB acknowledge.
module tb_plb2opb_bridge;
  logic clk = 0, rst_n = 0;
  logic p_sel = 0, p_rnw = 0, p_ack, p_err;
  logic [31:0] p_addr = '0;
  logic [7:0] p_be = '0;
  logic [63:0] p_wdata = '0, p_rdata;
  logic o_req, o_rnw, o_ack = 0, o_err = 0;
  logic [31:0] o_addr, o_wdata, o_rdata = '0;
  logic [3:0] o_be;
  int checks = 0, failures = 0;
  typedef struct { logic rnw; logic [31:0] addr; logic [3:0] be; logic [31:0] wdata; } opb_t;
  opb_t seen [$];
  int last_oack_cyc, cyc = 0;

  plb2opb_bridge #(.AW(32)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  function automatic logic [31:0] rfun(logic [31:0] a);
    return a ^ 32'h5A5A_0F0F;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // behavioural OPB slave: errors for addresses with bit 20 set
  initial forever begin
    @(posedge clk); #1;
    if (o_req) begin
      repeat ($urandom_range(0, 2)) begin @(posedge clk); #1; end
      seen.push_back('{o_rnw, o_addr, o_be, o_wdata});
      o_rdata = rfun(o_addr); o_err = o_addr[20]; o_ack = 1;
      last_oack_cyc = cyc;
      @(posedge clk); #1;
      o_ack = 0; o_err = 0;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      logic [31:0] a; logic [7:0] b; logic [63:0] d; bit r, e; int lat, nexp, k;
      a = {4'hC, 7'($urandom), ($urandom_range(0, 7) == 0), 17'($urandom) & 17'h1FFF8};
      b = 8'($urandom); r = $urandom_range(0, 1); d = {$urandom, $urandom};
      e = a[20];
      seen.delete();
      @(negedge clk);
      p_sel = 1; p_rnw = r; p_addr = a; p_be = b; p_wdata = d;
      lat = 0;
      do begin @(posedge clk); #2; lat++; end while (!p_ack && lat < 50);
      check(p_ack, "PLB acknowledge");
      nexp = (b[3:0] != 0) + (b[7:4] != 0);
      check(seen.size() == nexp, "one OPB transfer per enabled lane");
      if (nexp > 0) check(cyc == last_oack_cyc + 1, "PLB ack one cycle after last OPB ack");
      check(p_err == (e && nexp > 0), "error passed through");
      k = 0;
      if (b[3:0] != 0 && seen.size() > k) begin
        check(seen[k].addr == a && seen[k].be == b[3:0] && seen[k].rnw == r, "low lane transfer");
        if (!r) check(seen[k].wdata == d[31:0], "low lane data");
        if (r) check(p_rdata[31:0] == rfun(a), "low lane read data");
        k++;
      end
      if (b[7:4] != 0 && seen.size() > k) begin
        check(seen[k].addr == (a | 32'h4) && seen[k].be == b[7:4] && seen[k].rnw == r, "high lane transfer");
        if (!r) check(seen[k].wdata == d[63:32], "high lane data");
        if (r) check(p_rdata[63:32] == rfun(a | 32'h4), "high lane read data");
      end
      @(posedge clk); #1;
      p_sel = 0;
      check(!p_ack, "single acknowledge");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
