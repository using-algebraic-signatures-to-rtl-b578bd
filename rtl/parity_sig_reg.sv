// parity_sig_reg: zero-component (alpha^0 = 1) algebraic signature register.
//
// With gamma = 1 every power of gamma is 1, so the signature of a stream of
// IN_W-bit words is their bitwise XOR. Each input line has its own flip-flop
// that, whenever a word is accepted, is replaced by its old value XOR the
// input bit; no bit ever moves to a neighbour. The register therefore needs
// only as many flip-flops as the input has bits.
//
// Interface and timing: on a rising clk edge with en high the register takes
// sig ^ din; clear (synchronous, higher priority than en) sets it to zero,
// which is the starting value of every signature; rst_n is a synchronous
// active-low reset that also zeroes it. sig is the register output, so a word
// accepted at edge k is reflected in sig after that edge.
//
// The XOR-per-flip-flop structure and the zero start value follow the
// document; the enable, the synchronous clear/reset and the default width of
// 6 input lines (its small example) are this design's choices.
module parity_sig_reg #(
  parameter int IN_W = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            en,
  input  logic [IN_W-1:0] din,
  output logic [IN_W-1:0] sig
);

  logic [IN_W-1:0] q;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) q <= '0;
    else if (en)         q <= q ^ din;
  end

  assign sig = q;

endmodule
