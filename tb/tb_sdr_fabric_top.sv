// tb_sdr_fabric_top: end-to-end test of the transmitter fabric in one
// configuration of each implementation class, run side by side:
//   class 1 (1.a / 1.c placement): instructions ISOCM, program data on PLB
//           BRAM, modulated data to FIFO 1 over the DSOCM;
//   class 2 (2.c placement): instructions on PLB BRAM, program data DSOCM,
//           modulated data to FIFO 1 over the PLB;
//   class 3 (3.b placement): instructions on PLB BRAM, program data DSOCM,
//           modulated data over the PLB/OPB bridge to FIFO 1 on the OPB.
// Every output sample is checked against the reference, and each mechanism
// must have happened at least once: PLB contention, a stalled write into a
// full FIFO 1, OPB transfers, polling of a full FIFO 1 and of an empty
// FIFO 0.  The up-converter model is deliberately slow for the first half,
// so the cycle counts printed here measure back-pressure, not interfaces.
module tb_sdr_fabric_top;
  import sdr_pkg::*;
  localparam int N = 96;
  logic clk = 0, rst_n = 0;
  bit done [3];
  int checks [3], failures [3], cycles [3], cont [3], stall [3], opb [3], f1p [3], f0p [3];
  int tchecks = 0, tfail = 0;

  always #5 clk = ~clk;

  sdr_system #(.APP_PATH(APP_OCM), .INSTR_ON_PLB(0), .PDATA_ON_PLB(1), .N_SAMPLES(N)) s1 (
    .clk, .rst_n, .done(done[0]), .checks(checks[0]), .failures(failures[0]), .cycles(cycles[0]),
    .n_contention(cont[0]), .n_stall(stall[0]), .n_opb(opb[0]), .n_f1_full_polls(f1p[0]),
    .n_f0_empty_polls(f0p[0]));
  sdr_system #(.APP_PATH(APP_PLB), .INSTR_ON_PLB(1), .PDATA_ON_PLB(0), .N_SAMPLES(N)) s2 (
    .clk, .rst_n, .done(done[1]), .checks(checks[1]), .failures(failures[1]), .cycles(cycles[1]),
    .n_contention(cont[1]), .n_stall(stall[1]), .n_opb(opb[1]), .n_f1_full_polls(f1p[1]),
    .n_f0_empty_polls(f0p[1]));
  sdr_system #(.APP_PATH(APP_OPB), .INSTR_ON_PLB(1), .PDATA_ON_PLB(0), .N_SAMPLES(N)) s3 (
    .clk, .rst_n, .done(done[2]), .checks(checks[2]), .failures(failures[2]), .cycles(cycles[2]),
    .n_contention(cont[2]), .n_stall(stall[2]), .n_opb(opb[2]), .n_f1_full_polls(f1p[2]),
    .n_f0_empty_polls(f0p[2]));

  task automatic check(bit cond, string what);
    tchecks++;
    if (!cond) begin tfail++; $display("FAIL %s", what); end
  endtask

  task automatic report();
    int c, f;
    c = tchecks; f = tfail;
    for (int i = 0; i < 3; i++) begin c += checks[i]; f += failures[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    tfail++; $display("watchdog expired");
    report(); $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2]);
    repeat (5) @(posedge clk);
    for (int i = 0; i < 3; i++)
      $display("class %0d: %0d cycles for %0d samples, contention=%0d stall=%0d opb=%0d f1_full_polls=%0d f0_empty_polls=%0d",
               i + 1, cycles[i], N, cont[i], stall[i], opb[i], f1p[i], f0p[i]);
    check(cont[1] + cont[2] > 0, "PLB contention happened");
    check(cont[0] == 0, "no PLB contention with instructions on the ISOCM");
    check(stall[1] > 0 && stall[2] > 0, "bus write stalled on a full FIFO 1");
    check(opb[2] >= N && opb[0] == 0 && opb[1] == 0, "OPB carried exactly the class 3 data");
    check(f1p[0] > 0, "software polled a full FIFO 1 on the OCM path");
    check(f0p[0] + f0p[1] + f0p[2] > 0, "software polled an empty FIFO 0");
    report();
    $finish;
  end
endmodule
