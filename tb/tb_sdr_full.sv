// tb_sdr_full: the transmitter fabric with every parameter at its default
// (class 1 data path, 512-word FIFOs, 16 KB memories) carrying a block of
// 1500 bits from the source to the sink, three times the FIFO depth.
// Placement as in implementation 1.b: instructions and program data both on
// the on-chip memory ports.  The up-converter starts slow so that FIFO 1
// fills completely and the software has to poll before writing, and the
// source slows down later so that FIFO 0 runs dry.  Every pass-band value is
// checked against a reference computed from the source bits.
module tb_sdr_full;
  import sdr_pkg::*;
  localparam int N = 1500, FIFO_DEPTH = 512, DUC_GAP = 60, SRC_GAP = 100;
  logic clk = 0, rst_n = 0;
  logic src_push, src_full;
  logic [31:0] src_data;
  isocm_req_t isocm_req;
  logic [63:0] isocm_rdata;
  logic isocm_rvalid;
  dsocm_req_t dsocm_req;
  logic [31:0] dsocm_rdata;
  logic dsocm_rvalid;
  plb_req_t iplb_req, dplb_req;
  plb_rsp_t iplb_rsp, dplb_rsp;
  logic duc_pop, duc_empty, duc_push, duc_full;
  logic [31:0] duc_din, duc_dout;
  logic sink_pop, sink_empty;
  logic [31:0] sink_data;
  logic iload_we, pload_we;
  logic [10:0] iload_addr, pload_addr;
  logic [63:0] iload_data, pload_data;
  logic plb_contention, opb_xfer, fifo1_stall, fifo1_overflow, fifo0_underflow;
  logic [15:0] fifo1_level;
  bit ppc_done;
  int p_checks, p_failures, checks = 0, failures = 0, cyc = 0, cycles;
  int f0p, f1p, src_idx = 0, snk_idx = 0, max_level = 0;
  bit bits [N];
  logic [31:0] expect_out [N];
  logic duc_en;

  always #5 clk = ~clk;

  sdr_fabric_top u_dut (.*);

  ppc_model #(.APP_PATH(APP_OCM), .INSTR_ON_PLB(0), .PDATA_ON_PLB(0),
              .N_SAMPLES(N), .FIFO_DEPTH(FIFO_DEPTH)) u_ppc (
    .clk, .rst_n, .isocm_req, .isocm_rdata, .isocm_rvalid, .dsocm_req, .dsocm_rdata,
    .dsocm_rvalid, .iplb_req, .iplb_rsp, .dplb_req, .dplb_rsp, .iload_we, .iload_addr,
    .iload_data, .pload_we, .pload_addr, .pload_data, .done(ppc_done), .cycles,
    .checks(p_checks), .failures(p_failures), .f0_empty_polls(f0p), .f1_full_polls(f1p));

  duc_model u_duc (.clk, .rst_n, .enable(duc_en), .pop(duc_pop), .din(duc_din),
                   .empty(duc_empty), .push(duc_push), .dout(duc_dout), .full(duc_full));

  initial begin
    int ph;
    ph = 0;
    for (int n = 0; n < N; n++) begin
      logic signed [31:0] i_v, q_v;
      bits[n] = 1'($urandom);
      ph = bits[n] ? ph + 1 : ph - 1;
      case (ph & 3)
        0: begin i_v = 16384;  q_v = 0;      end
        1: begin i_v = 0;      q_v = 16384;  end
        2: begin i_v = -16384; q_v = 0;      end
        default: begin i_v = 0; q_v = -16384; end
      endcase
      case (n % 4)
        0: expect_out[n] = i_v;
        1: expect_out[n] = -q_v;
        2: expect_out[n] = -i_v;
        default: expect_out[n] = q_v;
      endcase
    end
  end

  always @(posedge clk) cyc++;
  assign duc_en   = (snk_idx > N / 2) || (cyc % DUC_GAP == 0);
  assign src_push = rst_n && (src_idx < N) && !src_full && ((src_idx < N / 2) || (cyc % SRC_GAP == 0));
  assign src_data = {31'h0, bits[src_idx < N ? src_idx : 0]};
  assign sink_pop = !sink_empty;

  always @(posedge clk) if (rst_n) begin
    if (src_push) src_idx++;
    if (int'(fifo1_level) > max_level) max_level = int'(fifo1_level);
    if (fifo1_overflow || fifo0_underflow || plb_contention || opb_xfer || fifo1_stall) begin
      failures++; $display("FAIL unexpected event on the class 1 path");
    end
    if (sink_pop) begin
      checks++;
      if (snk_idx >= N || sink_data !== expect_out[snk_idx]) begin
        failures++; $display("FAIL sink word %0d: got %h", snk_idx, sink_data);
      end
      snk_idx++;
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + p_checks, failures + p_failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (ppc_done && snk_idx == N);
    repeat (5) @(posedge clk);
    $display("%0d samples in %0d cycles; FIFO 1 peak %0d words; polls: FIFO 1 full %0d, FIFO 0 empty %0d",
             N, cycles, max_level, f1p, f0p);
    check(max_level == FIFO_DEPTH, "FIFO 1 filled to its depth");
    check(f1p > 0 && f0p > 0, "both polling waits happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks + p_checks, failures + p_failures);
    $finish;
  end
endmodule
