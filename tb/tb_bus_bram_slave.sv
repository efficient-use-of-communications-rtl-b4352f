// tb_bus_bram_slave: self-checking test of the bus block-RAM slave.
// Preloads part of the RAM through the configuration port, then performs
// random single-beat reads and byte-enabled writes as the shared bus presents
// them (select held until acknowledge, then one idle cycle).  Each
// acknowledge must come exactly one cycle after selection, exactly once, and
// read data must match a reference memory.
module tb_bus_bram_slave;
  localparam int DW = 64, DEPTH = 32;
  logic clk = 0, rst_n = 0;
  logic sel = 0, rnw = 0;
  logic [31:0] addr = '0;
  logic [DW/8-1:0] be = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic ack;
  logic load_we = 0;
  logic [$clog2(DEPTH)-1:0] load_addr = '0;
  logic [DW-1:0] load_data = '0;
  logic [DW-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  bus_bram_slave #(.AW(32), .DW(DW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic xfer(input bit r, input int idx, input logic [DW/8-1:0] b,
                      input logic [DW-1:0] d, output logic [DW-1:0] q);
    int lat;
    @(negedge clk);
    sel = 1; rnw = r; addr = 32'(idx) << 3; be = b; wdata = d;
    lat = 0;
    do begin
      @(negedge clk); lat++;
    end while (!ack && lat < 10);
    check(lat == 1, "acknowledge one cycle after select");
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
    logic [DW-1:0] q;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      ref_mem[i] = {$urandom, $urandom};
      load_we = 1; load_addr = i[$clog2(DEPTH)-1:0]; load_data = ref_mem[i];
    end
    @(negedge clk); load_we = 0;
    for (int n = 0; n < 600; n++) begin
      int idx;
      idx = $urandom_range(0, DEPTH - 1);
      if ($urandom_range(0, 1)) begin
        xfer(1, idx, '1, '0, q);
        check(q == ref_mem[idx], "read data");
      end else begin
        logic [DW-1:0] d; logic [DW/8-1:0] b;
        d = {$urandom, $urandom}; b = (DW/8)'($urandom);
        for (int k = 0; k < DW / 8; k++) if (b[k]) ref_mem[idx][8*k +: 8] = d[8*k +: 8];
        xfer(0, idx, b, d, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
