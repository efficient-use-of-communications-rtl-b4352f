// duc_model: behavioural stand-in for the digital up-converter (testbench
// only).  The real up-converter is a vendor core whose insides are not part
// of this design.  This model takes one {I, Q} symbol from FIFO 1 whenever
// `enable` is high, FIFO 1 has data and FIFO 2 has room, mixes it with a
// carrier at a quarter of the sample rate (cos/sin sequences 1,0,-1,0 and
// 0,1,0,-1), and pushes the real pass-band value I*cos - Q*sin,
// sign-extended to 32 bits, into FIFO 2 in the same cycle.
module duc_model (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  output logic        pop,
  input  logic [31:0] din,
  input  logic        empty,
  output logic        push,
  output logic [31:0] dout,
  input  logic        full
);
  logic [1:0] n;
  logic signed [15:0] i_s, q_s;

  assign i_s  = din[31:16];
  assign q_s  = din[15:0];
  assign pop  = enable && !empty && !full;
  assign push = pop;

  always_comb begin
    case (n)
      2'd0:    dout = 32'(signed'(i_s));
      2'd1:    dout = -32'(signed'(q_s));
      2'd2:    dout = -32'(signed'(i_s));
      default: dout = 32'(signed'(q_s));
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n <= '0;
    else if (pop) n <= n + 1'b1;
  end
endmodule
