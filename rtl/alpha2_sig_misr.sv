// alpha2_sig_misr: second-component (alpha^2) algebraic signature MISR over GF(2^N).
//
// Same register as the alpha MISR, but each accepted word beta is folded in as
//     sig <= sig * alpha^2 + beta     (arithmetic modulo PHI),
// i.e. the contents shift by two flip-flops per word. The two bits pushed out
// (the t^N and t^(N+1) coefficients, from the last two flip-flops) are
// reduced by XORing phi and t*phi into the register. The next state is
// formed as two successive multiplications by t, which gives exactly the
// document's rule "add phi if FF(N-2) is set, t*phi if FF(N-1) is set"
// whenever phi has no t^(N-1) term, and stays correct otherwise. For
// GF(2^8), PHI = t^8+t^5+t^3+t^2+1, it yields
//   f0=f6^in0 f1=f7^in1 f2=f0^f6^in2 f3=f1^f6^f7^in3
//   f4=f2^f7^in4 f5=f3^f6^in5 f6=f4^f7^in6 f7=f5^in7.
//
// Interface and timing: as alpha_sig_misr (one word per clk edge with en,
// synchronous clear above en, synchronous active-low rst_n, zero start).
//
// The recurrence and the default field (GF(2^8), PHI = 0x12D, eight input
// lines) follow the document; control signals are this design's choice.
module alpha2_sig_misr
  import algsig_pkg::*;
#(
  parameter int          N    = 8,
  parameter logic [32:0] PHI  = 33'h12D,
  parameter int          IN_W = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            en,
  input  logic [IN_W-1:0] din,
  output logic [N-1:0]    sig
);

  logic [N-1:0] q, d;

  initial begin
    assert (IN_W >= 1 && IN_W <= N) else $fatal(1, "IN_W must be 1..N");
    assert (N >= 3 && N <= MAXW)    else $fatal(1, "N must be 3..32");
    assert (PHI[N] && PHI[0])       else $fatal(1, "PHI must have degree N and a constant term");
  end

  always_comb begin
    logic [MAXW-1:0] t1, t2;
    t1 = gf_mul_alpha(MAXW'(q), PHI, N);
    t2 = gf_mul_alpha(t1, PHI, N);
    d  = t2[N-1:0] ^ N'(din);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) q <= '0;
    else if (en)         q <= d;
  end

  assign sig = q;

endmodule
