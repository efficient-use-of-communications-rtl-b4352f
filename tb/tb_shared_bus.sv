// tb_shared_bus: self-checking test of the shared bus (2 masters, 2 slaves).
// Both masters issue random reads and writes at the same time, to slave 0
// (0x0000_xxxx), slave 1 (0x8000_00xx) and to an unmapped address.  The
// slaves are behavioural: they acknowledge after 1-3 cycles, record writes
// and answer reads with a function of the address.  Checks: write data,
// byte enables and address reach the right slave; read data reaches the
// right master; unmapped addresses are acknowledged with an error; only one
// slave is ever selected; both masters compete (contention is seen).
module tb_shared_bus;
  localparam int NM = 2, NS = 2, AW = 32, DW = 64;
  localparam logic [NS-1:0][AW-1:0] BASE = {32'h8000_0000, 32'h0000_0000};
  localparam logic [NS-1:0][AW-1:0] MASK = {32'hFFFF_FF00, 32'hFFFF_0000};
  logic clk = 0, rst_n = 0;
  logic [NM-1:0] m_req = '0, m_rnw = '0, m_ack, gnt;
  logic [NM-1:0][AW-1:0] m_addr = '0;
  logic [NM-1:0][DW/8-1:0] m_be = '0;
  logic [NM-1:0][DW-1:0] m_wdata = '0;
  logic m_err, contention;
  logic [DW-1:0] m_rdata;
  logic [NS-1:0] s_sel, s_ack;
  logic s_rnw;
  logic [AW-1:0] s_addr;
  logic [DW/8-1:0] s_be;
  logic [DW-1:0] s_wdata;
  logic [NS-1:0][DW-1:0] s_rdata;
  int checks = 0, failures = 0, n_cont = 0, n_err = 0, n_done = 0;
  // last write seen by each slave
  logic [AW-1:0] last_wa [NS];
  logic [DW-1:0] last_wd [NS];
  logic [DW/8-1:0] last_be [NS];
  int            n_wr [NS];

  shared_bus #(.NM(NM), .NS(NS), .AW(AW), .DW(DW), .SLV_BASE(BASE), .SLV_MASK(MASK)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (contention) n_cont++;

  function automatic logic [DW-1:0] rfun(int s, logic [AW-1:0] a);
    return {32'(s) ^ 32'hC0DE_0000, a ^ 32'h1234_5678};
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // behavioural slaves
  for (genvar s = 0; s < NS; s++) begin : g_slv
    initial begin
      s_ack[s] = 0; s_rdata[s] = '0; n_wr[s] = 0;
      forever begin
        @(posedge clk); #1;
        if (s_sel[s]) begin
          repeat ($urandom_range(0, 2)) begin @(posedge clk); #1; end
          if (!s_rnw) begin
            last_wa[s] = s_addr; last_wd[s] = s_wdata; last_be[s] = s_be; n_wr[s]++;
          end
          s_rdata[s] = rfun(s, s_addr);
          s_ack[s]   = 1'b1;
          @(posedge clk); #1;
          s_ack[s]   = 1'b0;
        end
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (!$onehot0(s_sel)) begin failures++; $display("FAIL two slaves selected"); end
  end

  for (genvar m = 0; m < NM; m++) begin : g_mst
    initial begin
      @(posedge rst_n);
      for (int n = 0; n < 300; n++) begin
        int tgt, lat, nw_before;
        logic [AW-1:0] a; logic [DW-1:0] d; logic [DW/8-1:0] b; bit r;
        tgt = $urandom_range(0, 4);          // 0,1: slave 0; 2,3: slave 1; 4: unmapped
        a = (tgt < 2) ? {16'h0000, 16'($urandom) & 16'hFFF8}
          : (tgt < 4) ? {24'h800000, 8'($urandom) & 8'hF8} : 32'h4000_0000;
        r = $urandom_range(0, 1); d = {$urandom, $urandom}; b = 8'($urandom) | 8'h01;
        @(negedge clk);
        m_req[m] = 1; m_rnw[m] = r; m_addr[m] = a; m_wdata[m] = d; m_be[m] = b;
        nw_before = (tgt < 4) ? n_wr[tgt / 2] : 0;
        lat = 0;
        while (!m_ack[m] && lat < 100) begin @(posedge clk); #2; lat++; end
        check(m_ack[m], "acknowledged");
        if (tgt == 4) begin
          check(m_err, "unmapped address gives error"); n_err++;
        end else begin
          check(!m_err, "no error for mapped address");
          if (r) check(m_rdata == rfun(tgt / 2, a), "read data to right master");
          else check(last_wa[tgt / 2] == a && last_wd[tgt / 2] == d && last_be[tgt / 2] == b,
                     "write reaches right slave");
        end
        @(posedge clk); #1;
        m_req[m] = 0;
        repeat ($urandom_range(0, 2)) @(posedge clk);
      end
      n_done++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_done == NM);
    check(n_cont > 0, "masters contended for the bus");
    check(n_err > 0, "decode error exercised");
    $display("contention cycles=%0d errors=%0d", n_cont, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
