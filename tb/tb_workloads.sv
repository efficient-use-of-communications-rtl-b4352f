// tb_workloads: the document's twelve implementations, as far as the fabric
// sees them.  The twelve differ in where instructions, program data and
// modulated data travel, and in the processor's caches.  Caches are inside
// the processor, so the twelve reduce to seven fabric placements:
//   1.b      ISOCM  / DSOCM / OCM         1.a, 1.c  ISOCM / PLB   / OCM
//   2.a      ISOCM  / DSOCM / PLB         2.b       ISOCM / PLB   / PLB
//   2.c-2.f  PLB    / DSOCM / PLB         3.a       ISOCM / DSOCM / OPB
//   3.b, 3.c PLB    / DSOCM / OPB
// (instructions / program data / modulated data).  Each runs the same
// 128-bit block with a source and up-converter that never hold it back, so
// the cycle count reflects only the interfaces (with no caches modelled).
// Besides checking every output value, the test checks that the orderings
// the document measured between placements that differ only in the fabric
// hold here: all-OCM beats program data on the PLB (1.b < 1.a, 2.a < 2.b),
// instruction fetch over the PLB costs (2.a < 2.c, 3.a < 3.b), and for the same
// placement the OCM path beats the PLB path, which beats the OPB path
// (1.b < 2.a < 3.a).
module tb_workloads;
  import sdr_pkg::*;
  localparam int N = 128, NW = 7;
  localparam string NAMES [NW] = '{"1.b", "1.a/1.c", "2.a", "2.b", "2.c-2.f", "3.a", "3.b/3.c"};
  logic clk = 0, rst_n = 0;
  bit done [NW];
  int checks [NW], failures [NW], cycles [NW], cont [NW], stall [NW], opb [NW], f1p [NW], f0p [NW];
  int tchecks = 0, tfail = 0;

  always #5 clk = ~clk;

`define WL(IDX, PATH, IPLB, DPLB) \
  sdr_system #(.APP_PATH(PATH), .INSTR_ON_PLB(IPLB), .PDATA_ON_PLB(DPLB), .N_SAMPLES(N), \
               .FIFO_DEPTH(64), .DUC_GAP(1), .SRC_GAP(1)) w``IDX ( \
    .clk, .rst_n, .done(done[IDX]), .checks(checks[IDX]), .failures(failures[IDX]), \
    .cycles(cycles[IDX]), .n_contention(cont[IDX]), .n_stall(stall[IDX]), .n_opb(opb[IDX]), \
    .n_f1_full_polls(f1p[IDX]), .n_f0_empty_polls(f0p[IDX]));

  `WL(0, APP_OCM, 0, 0)
  `WL(1, APP_OCM, 0, 1)
  `WL(2, APP_PLB, 0, 0)
  `WL(3, APP_PLB, 0, 1)
  `WL(4, APP_PLB, 1, 0)
  `WL(5, APP_OPB, 0, 0)
  `WL(6, APP_OPB, 1, 0)
`undef WL

  task automatic check(bit cond, string what);
    tchecks++;
    if (!cond) begin tfail++; $display("FAIL %s", what); end
  endtask

  task automatic report();
    int c, f;
    c = tchecks; f = tfail;
    for (int i = 0; i < NW; i++) begin c += checks[i]; f += failures[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    tfail++; $display("watchdog expired");
    report(); $finish;
  end

  initial begin
    bit all;
    repeat (4) @(posedge clk);
    rst_n = 1;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < NW; i++) all &= done[i];
    end while (!all);
    repeat (5) @(posedge clk);
    for (int i = 0; i < NW; i++)
      $display("%-8s %6d cycles  %0d per sample  PLB contention cycles %0d  OPB transfers %0d",
               NAMES[i], cycles[i], cycles[i] / N, cont[i], opb[i]);
    check(cycles[0] < cycles[1], "1.b faster than 1.a");
    check(cycles[2] < cycles[4], "2.a faster than 2.c");
    check(cycles[2] < cycles[3], "2.a faster than 2.b");
    check(cycles[5] < cycles[6], "3.a faster than 3.b");
    check(cycles[0] < cycles[2] && cycles[2] < cycles[5], "OCM faster than PLB faster than OPB");
    check(cont[4] > 0 && cont[6] > 0 && cont[0] == 0, "PLB contention only with shared PLB");
    report();
    $finish;
  end
endmodule
