// ocm_bram: instruction-side on-chip memory (ISOCM) block RAM.
//
// The ISOCM port of the PowerPC405 fetches instructions straight from block
// RAM in the fabric.  The document's point about the OCM is that it has a
// fixed, guaranteed latency and reaches only a small memory; it gives neither
// the width, the size nor the latency.  This design fetches 64 bits (two
// instructions) per access from a 2048-word (16 KB) array whose contents are
// loaded at configuration time (here: through the `load_*` port, standing in
// for the bitstream).  Every access returns its data exactly LATENCY cycles
// later; there is no stall and no handshake.
//
// Interface: req.en/req.addr start a fetch (byte address, word = addr[..:3]);
// rdata/rvalid come back LATENCY (>= 1) cycles later.
module ocm_bram
  import sdr_pkg::*;
#(
  parameter int unsigned DEPTH   = 2048,
  parameter int unsigned DW      = 64,
  parameter int unsigned LATENCY = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  isocm_req_t               req,
  output logic [DW-1:0]            rdata,
  output logic                     rvalid,
  // configuration-time load port
  input  logic                     load_we,
  input  logic [$clog2(DEPTH)-1:0] load_addr,
  input  logic [DW-1:0]            load_data
);
  localparam int unsigned AB = $clog2(DW / 8);
  localparam int unsigned IW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  logic [DW-1:0] pipe_d [LATENCY];
  logic          pipe_v [LATENCY];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  // Stage 0 is the block RAM output register; further stages only delay.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) begin
        pipe_v[i] <= 1'b0;
        pipe_d[i] <= '0;
      end
    end else begin
      pipe_v[0] <= req.en;
      if (req.en) pipe_d[0] <= mem[req.addr[AB+IW-1:AB]];
      for (int i = 1; i < LATENCY; i++) begin
        pipe_v[i] <= pipe_v[i-1];
        pipe_d[i] <= pipe_d[i-1];
      end
    end
  end

  assign rdata  = pipe_d[LATENCY-1];
  assign rvalid = pipe_v[LATENCY-1];

  initial assert (LATENCY >= 1) else $error("ocm_bram: LATENCY must be at least 1");
endmodule
