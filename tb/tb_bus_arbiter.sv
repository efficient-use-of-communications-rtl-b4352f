// tb_bus_arbiter: self-checking test of the round-robin bus arbiter.
// Three masters request at random and hold their request until their
// transfer is done; the slave finishes a granted transfer after 1-4 cycles.
// A reference model predicts every grant (round-robin after the last owner,
// one cycle after the bus becomes idle) and the contention flag; the test
// also checks that no master waits through more than NM-1 other transfers.
module tb_bus_arbiter;
  localparam int NM = 3;
  logic clk = 0, rst_n = 0;
  logic [NM-1:0] req = '0, gnt;
  logic done = 0, busy, contention;
  int checks = 0, failures = 0;
  int m_busy, m_last, m_owner;
  int hold, waited [NM];
  int n_cont = 0, n_xfer = 0;

  bus_arbiter #(.NM(NM)) dut (.*);

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
    m_busy = 0; m_last = NM - 1; m_owner = -1; hold = 0;
    foreach (waited[i]) waited[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      logic [NM-1:0] exp_gnt;
      bit exp_cont;
      @(negedge clk);
      // expected outputs for the present state
      exp_gnt = '0;
      if (m_busy) exp_gnt[m_owner] = 1'b1;
      check(gnt == exp_gnt, "grant matches model");
      check(busy == m_busy, "busy matches model");
      // new requests (held until done)
      for (int i = 0; i < NM; i++)
        if (!req[i] && $urandom_range(0, 3) == 0) req[i] = 1'b1;
      done = 1'b0;
      if (m_busy) begin
        if (hold == 0) done = 1'b1; else hold--;
      end
      exp_cont = m_busy ? |(req & ~exp_gnt) : ($countones(req) > 1);
      #1;
      check(contention == exp_cont, "contention flag");
      if (contention) n_cont++;
      // model the clock edge
      @(posedge clk);
      if (m_busy) begin
        if (done) begin
          req[m_owner] = 1'b0;
          for (int i = 0; i < NM; i++) if (req[i] && i != m_owner) begin
            waited[i]++;
            check(waited[i] <= NM - 1, "bounded wait");
          end
          m_busy = 0; n_xfer++;
        end
      end else if (req != '0) begin
        for (int k = 1; k <= NM; k++)
          if (req[(m_last + k) % NM]) begin m_owner = (m_last + k) % NM; break; end
        m_last = m_owner; m_busy = 1; hold = $urandom_range(0, 3);
        waited[m_owner] = 0;
      end
    end
    check(n_cont > 100 && n_xfer > 100, "contention and transfers exercised");
    $display("transfers=%0d contention cycles=%0d", n_xfer, n_cont);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
