// sync_fifo: single-clock first-in first-out queue held in one block RAM.
//
// Used for FIFO 0 (source -> modulator), FIFO 1 (modulator -> up-converter)
// and FIFO 2 (up-converter -> sink).  The document draws each FIFO around a
// BRAM but gives neither its depth nor its handshake; this design uses a
// circular buffer with wrap-extended pointers, a 512-word default (one
// 512 x 36 Virtex-II Pro block RAM) and first-word-fall-through output.
//
// Interface: push/din write when not full; pop removes dout when not empty.
// A push while full is dropped and raises `overflow` for one cycle; a pop
// while empty is ignored and raises `underflow`.  Push and pop may happen in
// the same cycle.  `count` is the number of stored words.
// Timing: a pushed word is visible on dout the cycle after the push.
module sync_fifo #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [DW-1:0]            din,
  input  logic                     pop,
  output logic [DW-1:0]            dout,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     overflow,
  output logic                     underflow
);
  localparam int unsigned PW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  logic [PW:0]   wr_ptr, rd_ptr;
  logic          do_push, do_pop;

  assign full    = (wr_ptr[PW] != rd_ptr[PW]) && (wr_ptr[PW-1:0] == rd_ptr[PW-1:0]);
  assign empty   = (wr_ptr == rd_ptr);
  assign count   = wr_ptr - rd_ptr;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd_ptr[PW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr[PW-1:0]] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      if (do_push) wr_ptr <= wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= rd_ptr + 1'b1;
      overflow  <= push && full;
      underflow <= pop && empty;
    end
  end

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("sync_fifo: DEPTH must be a power of two");
endmodule
