// tb_sync_fifo: self-checking test of sync_fifo.
// Random pushes and pops, including pushes into a full FIFO and pops from an
// empty one, are compared every cycle with a queue reference model: output
// word, full/empty, count and the overflow/underflow pulses.
module tb_sync_fifo;
  localparam int DW = 16, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [DW-1:0] din = '0, dout;
  logic full, empty, overflow, underflow;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0;
  logic [DW-1:0] model[$];
  bit exp_ovf, exp_udf;
  int n_full = 0, n_ovf = 0, n_udf = 0;

  sync_fifo #(.DW(DW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // phases: fill-biased, drain-biased, balanced
      int bias;
      bias = (cyc / 500) % 3;
      @(negedge clk);
      push = ($urandom_range(0, 9) < (bias == 0 ? 8 : bias == 1 ? 2 : 5));
      pop  = ($urandom_range(0, 9) < (bias == 0 ? 2 : bias == 1 ? 8 : 5));
      din  = DW'($urandom);
      // compare before the edge
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(dout == model[0], "dout");
      if (full) n_full++;
      exp_ovf = push && (model.size() == DEPTH);
      exp_udf = pop && (model.size() == 0);
      if (exp_ovf) n_ovf++;
      if (exp_udf) n_udf++;
      begin
        int sz;
        logic [DW-1:0] d;
        sz = model.size();
        d  = din;
        if (pop && sz > 0) void'(model.pop_front());
        if (push && sz < DEPTH) model.push_back(d);
      end
      @(posedge clk); #1;
      check(overflow == exp_ovf, "overflow pulse");
      check(underflow == exp_udf, "underflow pulse");
    end
    check(n_full > 0 && n_ovf > 0 && n_udf > 0, "full/overflow/underflow all exercised");
    $display("full cycles=%0d overflows=%0d underflows=%0d", n_full, n_ovf, n_udf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
