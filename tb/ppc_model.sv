// ppc_model: behavioural stand-in for the PowerPC405 running the MSK
// modulation loop (testbench only, not synthesizable).
//
// For every input sample the model runs two activities side by side, as a
// pipelined processor overlaps instruction fetch with data access:
//   * fetches INSNS instruction words of the loop body, from the ISOCM block
//     RAM (pipelined, one fetch per cycle) or, when INSTR_ON_PLB, over the
//     PLB instruction-side master (one transfer at a time);
//   * the data work: read the sample from FIFO 0 through the DSOCM (reading
//     the status register when its count of available words runs out), save
//     and restore the modulator phase in program data (DSOCM BRAM, or PLB
//     BRAM when PDATA_ON_PLB) as a stack push/pop, compute the MSK symbol and
//     store it into FIFO 1 over the path APP_PATH selects (on the OCM path,
//     which has no back-pressure, the status register is read when its count
//     of free words runs out).
// MSK mapping used here: the phase advances by +90 degrees for a 1 and by
// -90 degrees for a 0; the symbol is {I, Q} = amplitude * (cos, sin).
// Every instruction word fetched is compared with the loaded image, and
// every program-data restore with what was saved.  No caches are modelled.
module ppc_model
  import sdr_pkg::*;
#(
  parameter app_path_e   APP_PATH     = APP_OCM,
  parameter bit          INSTR_ON_PLB = 1'b0,
  parameter bit          PDATA_ON_PLB = 1'b0,
  parameter int unsigned N_SAMPLES    = 64,
  parameter int unsigned INSNS        = 4,
  parameter int unsigned FIFO_DEPTH   = 512,
  parameter int unsigned OCM_LATENCY  = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  output isocm_req_t  isocm_req,
  input  logic [63:0] isocm_rdata,
  input  logic        isocm_rvalid,
  output dsocm_req_t  dsocm_req,
  input  logic [31:0] dsocm_rdata,
  input  logic        dsocm_rvalid,
  output plb_req_t    iplb_req,
  input  plb_rsp_t    iplb_rsp,
  output plb_req_t    dplb_req,
  input  plb_rsp_t    dplb_rsp,
  output logic        iload_we,
  output logic [10:0] iload_addr,
  output logic [63:0] iload_data,
  output logic        pload_we,
  output logic [10:0] pload_addr,
  output logic [63:0] pload_data,
  output bit          done,
  output int          cycles,
  output int          checks,
  output int          failures,
  output int          f0_empty_polls,
  output int          f1_full_polls
);
  localparam logic [31:0] ISOCM_ADDR = 32'hFFFF_C000;
  localparam logic [31:0] PDATA_PLB  = 32'h0000_2000;
  localparam logic [31:0] PDATA_OCM  = DSOCM_BASE + 32'h100;
  localparam logic signed [15:0] AMP = 16'sd16384;

  logic [63:0] image [INSNS];
  int          cyc_ctr = 0;
  int          f0_avail = 0, f1_free = 0;

  always @(posedge clk) cyc_ctr++;

  function automatic logic [31:0] msk_symbol(int phase);
    case (phase & 3)
      0: return {AMP, 16'sd0};
      1: return {16'sd0, AMP};
      2: return {-AMP, 16'sd0};
      default: return {16'sd0, -AMP};
    endcase
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL ppc_model %s at %0t", what, $time); end
  endtask

  task automatic plb(input bit is_i, input bit rnw, input logic [31:0] a,
                     input logic [7:0] be, input logic [63:0] wd, output logic [63:0] rd);
    plb_req_t r;
    plb_rsp_t s;
    r = '{req: 1'b1, rnw: rnw, addr: a, be: be, wdata: wd};
    if (is_i) iplb_req = r; else dplb_req = r;
    forever begin
      @(posedge clk); #1;
      s = is_i ? iplb_rsp : dplb_rsp;
      if (s.ack) break;
    end
    rd = s.rdata;
    check(!s.err, "PLB transfer without error");
    @(posedge clk); #1;
    if (is_i) iplb_req = '0; else dplb_req = '0;
  endtask

  task automatic ds_rd(input logic [31:0] a, output logic [31:0] d);
    dsocm_req = '{en: 1'b1, we: 1'b0, addr: a, be: 4'hF, wdata: '0};
    @(posedge clk); #1;
    dsocm_req = '0;
    repeat (OCM_LATENCY - 1) @(posedge clk);
    #1;
    check(dsocm_rvalid, "DSOCM read data after fixed latency");
    d = dsocm_rdata;
  endtask

  task automatic ds_wr(input logic [31:0] a, input logic [31:0] d);
    dsocm_req = '{en: 1'b1, we: 1'b1, addr: a, be: 4'hF, wdata: d};
    @(posedge clk); #1;
    dsocm_req = '0;
  endtask

  // ISOCM fetches are pipelined, one per cycle: the port has a fixed
  // latency and never stalls.  PLB fetches are one transfer at a time.
  task automatic fetch_loop_body();
    logic [63:0] w;
    if (INSTR_ON_PLB) begin
      for (int i = 0; i < INSNS; i++) begin
        plb(1'b1, 1'b1, 32'(i) << 3, 8'hFF, '0, w);
        check(w == image[i], "instruction word over PLB");
      end
    end else begin
      for (int k = 0; k < INSNS + OCM_LATENCY; k++) begin
        if (k < INSNS) isocm_req = '{en: 1'b1, addr: ISOCM_ADDR + (32'(k) << 3)};
        else           isocm_req = '0;
        if (k >= OCM_LATENCY) begin
          check(isocm_rvalid, "ISOCM fetch after fixed latency");
          check(isocm_rdata == image[k - OCM_LATENCY], "instruction word over ISOCM");
        end
        @(posedge clk); #1;
      end
      isocm_req = '0;
    end
  endtask

  task automatic data_work(input int n, inout int phase);
    logic [31:0] d, st;
    logic [63:0] q;
    // read one input bit from FIFO 0
    // (the software keeps a count of words known to be there and reads the
    // status register only when that count runs out)
    while (f0_avail == 0) begin
      ds_rd(DSOCM_BASE + 32'(DSOCM_STAT_OFS), st);
      f0_avail = int'(st[15:0]);
      if (f0_avail == 0) f0_empty_polls++;
    end
    ds_rd(DSOCM_BASE + 32'(DSOCM_FIFO0_OFS), d);
    f0_avail--;
    // program data: push the phase onto the stack and pop it back
    if (PDATA_ON_PLB) begin
      plb(1'b0, 1'b0, PDATA_PLB + 32'((n % 4) * 8), 8'h0F, 64'(phase), q);
      plb(1'b0, 1'b1, PDATA_PLB + 32'((n % 4) * 8), 8'hFF, '0, q);
      check(q[31:0] == 32'(phase), "program data restored over PLB");
    end else begin
      ds_wr(PDATA_OCM + 32'((n % 4) * 4), 32'(phase));
      ds_rd(PDATA_OCM + 32'((n % 4) * 4), st);
      check(st == 32'(phase), "program data restored over DSOCM");
    end
    phase = d[0] ? phase + 1 : phase - 1;
    // store the modulated symbol into FIFO 1
    unique case (APP_PATH)
      APP_OCM: begin
        // no back-pressure on the OCM: track the free space in FIFO 1
        while (f1_free == 0) begin
          ds_rd(DSOCM_BASE + 32'(DSOCM_STAT_OFS), st);
          f1_free = int'(FIFO_DEPTH) - int'(st[31:16]);
          if (f1_free == 0) f1_full_polls++;
        end
        ds_wr(DSOCM_BASE + 32'(DSOCM_FIFO1_OFS), msk_symbol(phase));
        f1_free--;
      end
      APP_PLB: plb(1'b0, 1'b0, PLB_FIFO_BASE, 8'h0F, {32'h0, msk_symbol(phase)}, q);
      default: plb(1'b0, 1'b0, OPB_FIFO_BASE, 8'h0F, {32'h0, msk_symbol(phase)}, q);
    endcase
  endtask

  initial begin
    int phase;
    isocm_req = '0; dsocm_req = '0; iplb_req = '0; dplb_req = '0;
    iload_we = 0; iload_addr = '0; iload_data = '0;
    pload_we = 0; pload_addr = '0; pload_data = '0;
    done = 0; cycles = 0; checks = 0; failures = 0;
    f0_empty_polls = 0; f1_full_polls = 0; phase = 0;
    for (int i = 0; i < INSNS; i++) image[i] = {$urandom, $urandom};
    wait (rst_n);
    // configuration: load the program image
    for (int i = 0; i < INSNS; i++) begin
      @(posedge clk); #1;
      if (INSTR_ON_PLB) begin pload_we = 1; pload_addr = 11'(i); pload_data = image[i]; end
      else              begin iload_we = 1; iload_addr = 11'(i); iload_data = image[i]; end
    end
    @(posedge clk); #1;
    iload_we = 0; pload_we = 0;
    begin
      int t0;
      t0 = cyc_ctr;
      for (int n = 0; n < N_SAMPLES; n++) begin
        fork
          fetch_loop_body();
          data_work(n, phase);
        join
      end
      cycles = cyc_ctr - t0;
    end
    done = 1;
  end
endmodule
