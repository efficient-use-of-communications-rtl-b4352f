// dsocm_ctrl: data-side on-chip memory (DSOCM) of the PowerPC405.
//
// The DSOCM is the processor's dedicated, fixed-latency path into the fabric.
// In the document it holds the input samples, the program data of some
// implementations (stack and heap), and in implementation class 1 it is the
// path by which modulated values reach FIFO 1, whose second BRAM port feeds
// the up-converter.  This block decodes one DSOCM access per cycle:
//   offset 0x0000-0x7FFF  read/write BRAM (DEPTH 32-bit words, byte enables)
//   offset 0x8000  read   pop one sample from FIFO 0
//   offset 0x8004  write  push one modulated word into FIFO 1 (if APP_OCM_EN)
//   offset 0x8008  read   status {FIFO 1 count[15:0], FIFO 0 count[15:0]}
// The register offsets, the size and the latency are this design's choices.
// Read data returns exactly LATENCY cycles after the request; nothing stalls,
// which is what gives the OCM its determinism.  A FIFO 0 pop when it is empty
// returns 0 (the sync_fifo flags the underflow); a FIFO 1 push when full is
// dropped by the FIFO and flagged as overflow.
module dsocm_ctrl
  import sdr_pkg::*;
#(
  parameter int unsigned DEPTH      = 4096,
  parameter int unsigned LATENCY    = 2,
  parameter bit          APP_OCM_EN = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  dsocm_req_t  req,
  output logic [31:0] rdata,
  output logic        rvalid,
  // FIFO 0 read side
  output logic        fifo0_pop,
  input  logic [31:0] fifo0_dout,
  input  logic        fifo0_empty,
  input  logic [15:0] fifo0_count,
  // FIFO 1 write side
  output logic        fifo1_push,
  output logic [31:0] fifo1_din,
  input  logic [15:0] fifo1_count
);
  localparam int unsigned IW = $clog2(DEPTH);

  logic [31:0] mem [DEPTH];
  logic [15:0] ofs;
  logic        hit, is_mem, is_fifo0, is_fifo1, is_stat;
  logic [IW-1:0] widx;
  logic [31:0] rd_mux;
  logic [31:0] pipe_d [LATENCY];
  logic        pipe_v [LATENCY];

  assign ofs      = req.addr[15:0];
  assign hit      = req.en && (req.addr[AW-1:16] == DSOCM_BASE[AW-1:16]);
  assign is_mem   = hit && !ofs[15];
  assign is_fifo0 = hit && (ofs == DSOCM_FIFO0_OFS);
  assign is_fifo1 = hit && (ofs == DSOCM_FIFO1_OFS);
  assign is_stat  = hit && (ofs == DSOCM_STAT_OFS);
  assign widx     = req.addr[IW+1:2];

  assign fifo0_pop  = is_fifo0 && !req.we && !fifo0_empty;
  assign fifo1_push = APP_OCM_EN && is_fifo1 && req.we;
  assign fifo1_din  = req.wdata;

  always_ff @(posedge clk) begin
    if (is_mem && req.we)
      for (int b = 0; b < 4; b++)
        if (req.be[b]) mem[widx][8*b +: 8] <= req.wdata[8*b +: 8];
  end

  always_comb begin
    rd_mux = '0;
    if (is_mem)                       rd_mux = mem[widx];
    else if (is_fifo0 && !fifo0_empty) rd_mux = fifo0_dout;
    else if (is_stat)                 rd_mux = {fifo1_count, fifo0_count};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) begin
        pipe_v[i] <= 1'b0;
        pipe_d[i] <= '0;
      end
    end else begin
      pipe_v[0] <= req.en && !req.we;
      pipe_d[0] <= rd_mux;
      for (int i = 1; i < LATENCY; i++) begin
        pipe_v[i] <= pipe_v[i-1];
        pipe_d[i] <= pipe_d[i-1];
      end
    end
  end

  assign rdata  = pipe_d[LATENCY-1];
  assign rvalid = pipe_v[LATENCY-1];
endmodule
