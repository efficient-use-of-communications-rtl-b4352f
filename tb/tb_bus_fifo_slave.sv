// tb_bus_fifo_slave: self-checking test of the FIFO 1 bus slave (64-bit).
// Writes alternate between the low and high 32-bit lanes; the words must
// appear in FIFO 1 in order.  When FIFO 1 (4 deep here) is full the
// acknowledge must be withheld (stall) until the up-converter side pops a
// word, after which the write completes.  Reads return the fill level.
module tb_bus_fifo_slave;
  localparam int DW = 64;
  logic clk = 0, rst_n = 0;
  logic sel = 0, rnw = 0;
  logic [31:0] addr = '0;
  logic [DW/8-1:0] be = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic ack, fifo_push, fifo_full, stall;
  logic [31:0] fifo_din, f_dout;
  logic [15:0] fifo_count;
  logic f_pop = 0, f_empty, f_o, f_u;
  logic [2:0] f_cnt;
  int checks = 0, failures = 0, n_stall = 0;
  logic [31:0] expq [$];

  bus_fifo_slave #(.AW(32), .DW(DW)) dut (.*);
  sync_fifo #(.DW(32), .DEPTH(4)) f1 (.clk, .rst_n, .push(fifo_push), .din(fifo_din),
    .pop(f_pop), .dout(f_dout), .full(fifo_full), .empty(f_empty), .count(f_cnt),
    .overflow(f_o), .underflow(f_u));
  assign fifo_count = 16'(f_cnt);

  always #5 clk = ~clk;
  always @(posedge clk) if (stall) n_stall++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic xfer(input bit r, input logic [31:0] a, input logic [DW-1:0] d,
                      output int lat, output logic [DW-1:0] q);
    @(negedge clk);
    sel = 1; rnw = r; addr = a; be = r ? '1 : (a[2] ? 8'hF0 : 8'h0F); wdata = d;
    lat = 0;
    do begin @(negedge clk); lat++; end while (!ack && lat < 50);
    q = rdata;
    sel = 0;
    @(negedge clk);
    check(!ack, "single acknowledge");
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lat; logic [DW-1:0] q;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      // fill the FIFO: 4 writes, alternating lanes
      for (int i = 0; i < 4; i++) begin
        logic [31:0] w; logic [31:0] a;
        w = $urandom; a = 32'h8000_0000 | (32'(i & 1) << 2);
        expq.push_back(w);
        xfer(0, a, {w, w} ^ (a[2] ? 64'h0000_0000_FFFF_FFFF : 64'hFFFF_FFFF_0000_0000), lat, q);
        check(lat == 1, "write acknowledged in one cycle");
      end
      xfer(1, 32'h8000_0000, '0, lat, q);
      check(q[15:0] == 16'd4, "count reads 4");
      // fifth write must stall until a pop
      fork
        begin
          logic [31:0] w;
          w = $urandom; expq.push_back(w);
          xfer(0, 32'h8000_0000, {32'h0, w}, lat, q);
          check(lat >= 5, "write stalled while full");
        end
        begin
          repeat (6) @(negedge clk);
          check(sel && !ack, "still waiting while full");
          check(f_dout == expq[0], "fifo head");
          void'(expq.pop_front());
          f_pop = 1; @(negedge clk); f_pop = 0;
        end
      join
      // drain and compare
      while (!f_empty) begin
        check(f_dout == expq[0], "fifo order");
        void'(expq.pop_front());
        @(negedge clk); f_pop = 1; @(negedge clk); f_pop = 0;
      end
      check(expq.size() == 0, "all words delivered");
    end
    check(n_stall > 0, "stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
