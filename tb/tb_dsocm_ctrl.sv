// tb_dsocm_ctrl: self-checking test of the DSOCM decoder.
// Checks BRAM read-after-write with byte enables, FIFO 0 pops through the
// data register (including a pop of an empty FIFO), FIFO 1 pushes, the status
// register, and that every read returns exactly LATENCY cycles after issue.
// Small FIFOs (sync_fifo) are attached as in the full design.
module tb_dsocm_ctrl;
  import sdr_pkg::*;
  localparam int LAT = 2, DEPTH = 256;
  logic clk = 0, rst_n = 0;
  dsocm_req_t req;
  logic [31:0] rdata;
  logic rvalid;
  logic fifo0_pop, fifo0_empty, fifo1_push;
  logic [31:0] fifo0_dout, fifo1_din;
  logic [15:0] fifo0_count, fifo1_count;
  logic f0_push = 0, f1_pop = 0;
  logic [31:0] f0_din = '0, f1_dout;
  logic f0_full, f1_full, f1_empty, f0_o, f0_u, f1_o, f1_u;
  logic [4:0] c0, c1;
  int checks = 0, failures = 0;
  logic [31:0] ref_mem [DEPTH];
  int n_reads = 0;

  dsocm_ctrl #(.DEPTH(DEPTH), .LATENCY(LAT), .APP_OCM_EN(1'b1)) dut (.*);
  sync_fifo #(.DW(32), .DEPTH(16)) f0 (.clk, .rst_n, .push(f0_push), .din(f0_din),
    .pop(fifo0_pop), .dout(fifo0_dout), .full(f0_full), .empty(fifo0_empty),
    .count(c0), .overflow(f0_o), .underflow(f0_u));
  sync_fifo #(.DW(32), .DEPTH(16)) f1 (.clk, .rst_n, .push(fifo1_push), .din(fifo1_din),
    .pop(f1_pop), .dout(f1_dout), .full(f1_full), .empty(f1_empty),
    .count(c1), .overflow(f1_o), .underflow(f1_u));
  assign fifo0_count = 16'(c0);
  assign fifo1_count = 16'(c1);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] d, input logic [3:0] be);
    @(negedge clk);
    req = '{en: 1'b1, we: 1'b1, addr: a, be: be, wdata: d};
    @(negedge clk);
    req = '0;
  endtask

  // read and require the data exactly LAT cycles after the request edge
  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    req = '{en: 1'b1, we: 1'b0, addr: a, be: 4'hF, wdata: '0};
    @(negedge clk);
    req = '0;
    for (int i = 1; i < LAT; i++) begin
      check(!rvalid, "no early rvalid");
      @(negedge clk);
    end
    check(rvalid, "rvalid after LATENCY");
    d = rdata;
    n_reads++;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d;
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // BRAM full-word writes then readback
    for (int i = 0; i < 32; i++) begin
      ref_mem[i] = $urandom;
      wr(DSOCM_BASE + 32'(i * 4), ref_mem[i], 4'hF);
    end
    // byte-enable writes
    for (int i = 0; i < 32; i++) begin
      logic [31:0] v; logic [3:0] be;
      v = $urandom; be = 4'($urandom);
      for (int b = 0; b < 4; b++) if (be[b]) ref_mem[i][8*b +: 8] = v[8*b +: 8];
      wr(DSOCM_BASE + 32'(i * 4), v, be);
    end
    for (int i = 0; i < 32; i++) begin
      rd(DSOCM_BASE + 32'(i * 4), d);
      check(d == ref_mem[i], "bram readback");
    end
    // FIFO 0: fill from the source side, pop through the register
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); f0_push = 1; f0_din = 32'hA000_0000 + 32'(i);
    end
    @(negedge clk); f0_push = 0;
    rd(DSOCM_BASE + 32'(DSOCM_STAT_OFS), d);
    check(d == {16'd0, 16'd5}, "status after fill");
    for (int i = 0; i < 5; i++) begin
      rd(DSOCM_BASE + 32'(DSOCM_FIFO0_OFS), d);
      check(d == 32'hA000_0000 + 32'(i), "fifo0 pop order");
    end
    rd(DSOCM_BASE + 32'(DSOCM_FIFO0_OFS), d);
    check(d == 32'h0, "empty fifo0 read returns 0");
    check(fifo0_empty, "fifo0 still empty");
    // FIFO 1 pushes
    for (int i = 0; i < 7; i++) wr(DSOCM_BASE + 32'(DSOCM_FIFO1_OFS), 32'hB000_0000 + 32'(i), 4'hF);
    rd(DSOCM_BASE + 32'(DSOCM_STAT_OFS), d);
    check(d == {16'd7, 16'd0}, "status after fifo1 pushes");
    for (int i = 0; i < 7; i++) begin
      check(f1_dout == 32'hB000_0000 + 32'(i), "fifo1 order");
      @(negedge clk); f1_pop = 1; @(negedge clk); f1_pop = 0;
    end
    // an address outside the DSOCM window must not touch anything
    wr(32'h5000_0000, 32'hDEAD_BEEF, 4'hF);
    rd(DSOCM_BASE, d);
    check(d == ref_mem[0], "out-of-window write ignored");
    check(f1_empty, "fifo1 drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
