// tb_ocm_bram: self-checking test of the ISOCM block RAM.
// Loads a reference image through the configuration port, then issues a
// fetch on most cycles and checks that each fetch returns the right 64-bit
// word exactly LATENCY cycles later, and that rvalid is low otherwise.
module tb_ocm_bram;
  import sdr_pkg::*;
  localparam int DEPTH = 64, LAT = 2;
  logic clk = 0, rst_n = 0;
  isocm_req_t req;
  logic [63:0] rdata;
  logic rvalid;
  logic load_we = 0;
  logic [$clog2(DEPTH)-1:0] load_addr = '0;
  logic [63:0] load_data = '0;
  logic [63:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;
  // expected response per cycle: valid flag and data, indexed by issue cycle
  bit          exp_v [$];
  logic [63:0] exp_d [$];

  ocm_bram #(.DEPTH(DEPTH), .DW(64), .LATENCY(LAT)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      ref_mem[i] = {$urandom, $urandom};
      load_we = 1; load_addr = i[$clog2(DEPTH)-1:0]; load_data = ref_mem[i];
    end
    @(negedge clk); load_we = 0;
    // a pipeline of LAT empty slots to start
    for (int i = 0; i < LAT; i++) begin exp_v.push_back(0); exp_d.push_back('0); end
    for (int cyc = 0; cyc < 2000; cyc++) begin
      int idx;
      @(negedge clk);
      // response of the request issued LAT cycles ago
      check(rvalid == exp_v[0], "rvalid timing");
      if (exp_v[0]) check(rdata == exp_d[0], "rdata");
      void'(exp_v.pop_front()); void'(exp_d.pop_front());
      idx = $urandom_range(0, DEPTH - 1);
      req.en   = ($urandom_range(0, 3) != 0);
      req.addr = 32'hFFFF_0000 | (idx << 3) | 32'($urandom_range(0, 7));
      exp_v.push_back(req.en);
      exp_d.push_back(ref_mem[idx]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
