// sdr_system: one complete transmitter around sdr_fabric_top for the
// end-to-end testbenches: a bursty bit source feeding FIFO 0, the processor
// model running the modulation loop, the up-converter model between FIFO 1
// and FIFO 2, and a sink that checks every pass-band value against a
// reference computed here from the source bits (MSK phase walk, then the
// quarter-rate mixer).  It counts how often each mechanism of the fabric
// happened: PLB contention, a PLB/OPB write stalled on a full FIFO 1, OPB
// transfers through the bridge, software polls on a full FIFO 1 or an empty
// FIFO 0.
module sdr_system
  import sdr_pkg::*;
#(
  parameter app_path_e   APP_PATH     = APP_OCM,
  parameter bit          INSTR_ON_PLB = 1'b0,
  parameter bit          PDATA_ON_PLB = 1'b0,
  parameter int unsigned N_SAMPLES    = 64,
  parameter int unsigned FIFO_DEPTH   = 16,
  parameter int unsigned DUC_GAP      = 100,
  parameter int unsigned SRC_GAP      = 60
) (
  input  logic clk,
  input  logic rst_n,
  output bit   done,
  output int   checks,
  output int   failures,
  output int   cycles,
  output int   n_contention,
  output int   n_stall,
  output int   n_opb,
  output int   n_f1_full_polls,
  output int   n_f0_empty_polls
);
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
  int p_checks, p_failures, s_checks = 0, s_failures = 0, cyc = 0;
  int src_idx = 0, snk_idx = 0;
  bit bits [N_SAMPLES];
  logic [31:0] expect_out [N_SAMPLES];
  logic duc_en;

  sdr_fabric_top #(.APP_PATH(APP_PATH), .FIFO_DEPTH(FIFO_DEPTH)) u_dut (.*);

  ppc_model #(.APP_PATH(APP_PATH), .INSTR_ON_PLB(INSTR_ON_PLB), .PDATA_ON_PLB(PDATA_ON_PLB),
              .N_SAMPLES(N_SAMPLES), .FIFO_DEPTH(FIFO_DEPTH)) u_ppc (
    .clk, .rst_n, .isocm_req, .isocm_rdata, .isocm_rvalid, .dsocm_req, .dsocm_rdata,
    .dsocm_rvalid, .iplb_req, .iplb_rsp, .dplb_req, .dplb_rsp, .iload_we, .iload_addr,
    .iload_data, .pload_we, .pload_addr, .pload_data, .done(ppc_done), .cycles,
    .checks(p_checks), .failures(p_failures), .f0_empty_polls(n_f0_empty_polls),
    .f1_full_polls(n_f1_full_polls));

  duc_model u_duc (.clk, .rst_n, .enable(duc_en), .pop(duc_pop), .din(duc_din),
                   .empty(duc_empty), .push(duc_push), .dout(duc_dout), .full(duc_full));

  // reference: MSK phase walk, quarter-rate mixer
  initial begin
    int ph;
    ph = 0;
    for (int n = 0; n < N_SAMPLES; n++) begin
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
  // the up-converter runs slower than the processor for the first half so
  // that FIFO 1 fills up, then at full rate
  assign duc_en   = (snk_idx > N_SAMPLES / 2) || (cyc % DUC_GAP == 0);
  // the source delivers the second half of the bits slower than the
  // processor consumes them, so that FIFO 0 runs dry
  assign src_push = rst_n && (src_idx < N_SAMPLES) && !src_full &&
                    ((src_idx < N_SAMPLES / 2) || (cyc % SRC_GAP == 0));
  assign src_data = {31'h0, bits[src_idx < N_SAMPLES ? src_idx : 0]};
  assign sink_pop = !sink_empty;

  always @(posedge clk) if (rst_n) begin
    if (src_push) src_idx++;
    if (plb_contention) n_contention++;
    if (fifo1_stall) n_stall++;
    if (opb_xfer) n_opb++;
    if (fifo1_overflow) begin s_failures++; $display("FAIL FIFO 1 overflow"); end
    if (fifo0_underflow) begin s_failures++; $display("FAIL FIFO 0 underflow"); end
    if (sink_pop) begin
      s_checks++;
      if (snk_idx >= N_SAMPLES || sink_data !== expect_out[snk_idx]) begin
        s_failures++;
        $display("FAIL sink word %0d: got %h", snk_idx, sink_data);
      end
      snk_idx++;
    end
  end

  initial begin
    n_contention = 0; n_stall = 0; n_opb = 0;
  end

  assign done     = ppc_done && (snk_idx == N_SAMPLES);
  assign checks   = p_checks + s_checks;
  assign failures = p_failures + s_failures;
endmodule
