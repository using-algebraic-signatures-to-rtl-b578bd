// alpha_sig_misr: first-component (alpha) algebraic signature MISR over GF(2^N).
//
// The register holds a field element, bit i being the coefficient of t^i
// (flip-flop FF_i). Each accepted word beta is folded in by Horner's rule,
//     sig <= sig * alpha + beta      (alpha = t, arithmetic modulo PHI),
// so after words beta_0..beta_m the register holds
//     beta_0*alpha^m + beta_1*alpha^(m-1) + ... + beta_m.
// Multiplying by t moves every flip-flop into its successor; the bit falling
// out of the last flip-flop (the t^N coefficient) is fed back and XORed into
// every flip-flop i for which PHI has a t^i term, and input line i is XORed
// into flip-flop i. With PHI = t^10+t^3+1 the feedback from FF9 enters FF0 and
// FF3; with PHI = t^4+t+1 and N = 4 it is the classic four-bit MISR.
//
// IN_W <= N input lines drive flip-flops 0..IN_W-1; the structure does not
// depend on IN_W.
//
// Interface and timing: one word per clk edge while en is high; clear
// (synchronous, above en) and rst_n (synchronous, active low) zero the
// register, which is the starting value of a signature. sig is the register
// output.
//
// The recurrence, the bit-to-flip-flop mapping and the default field
// (GF(2^10), PHI = t^10+t^3+1, six input lines) follow the document; enable,
// clear and reset handling are this design's choices. PHI must be primitive
// for the signature guarantees to hold; the module does not check it.
module alpha_sig_misr #(
  parameter int          N    = 10,
  parameter logic [32:0] PHI  = 33'h409,
  parameter int          IN_W = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            en,
  input  logic [IN_W-1:0] din,
  output logic [N-1:0]    sig
);

  logic [N-1:0] q, d, in_ext;
  logic         fb;

  initial begin
    assert (IN_W >= 1 && IN_W <= N) else $fatal(1, "IN_W must be 1..N");
    assert (N >= 2 && N <= 32)      else $fatal(1, "N must be 2..32");
    assert (PHI[N] && PHI[0])       else $fatal(1, "PHI must have degree N and a constant term");
  end

  assign in_ext = N'(din);
  assign fb     = q[N-1];

  always_comb begin
    d[0] = (fb & PHI[0]) ^ in_ext[0];
    for (int i = 1; i < N; i++)
      d[i] = q[i-1] ^ (fb & PHI[i]) ^ in_ext[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) q <= '0;
    else if (en)         q <= d;
  end

  assign sig = q;

endmodule
