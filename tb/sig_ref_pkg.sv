// sig_ref_pkg: reference arithmetic for the signature testbenches.
//
// Computes GF(2^n) products by schoolbook carry-less multiplication followed
// by polynomial long division by phi, and signatures directly from their
// definition as a sum of weighted words, so the expected values do not share
// the shift-and-feedback structure of the registers under test.
// Words are in 32-bit containers, phi carries its leading term.
package sig_ref_pkg;

  function automatic logic [31:0] ref_mod(logic [63:0] p, logic [32:0] phi, int n);
    for (int b = 63; b >= n; b--)
      if (p[b]) p = p ^ (64'(phi) << (b - n));
    return p[31:0];
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b,
                                          input logic [32:0] phi, input int n);
    logic [63:0] p = '0;
    for (int i = 0; i < 32; i++)
      if (b[i]) p = p ^ (64'(a) << i);
    return ref_mod(p, phi, n);
  endfunction

  function automatic logic [31:0] ref_pow(logic [31:0] g, int e,
                                          input logic [32:0] phi, input int n);
    logic [31:0] r = 32'd1;
    for (int i = 0; i < e; i++) r = ref_mul(r, g, phi, n);
    return r;
  endfunction

  // Signature of words w[0..len-1] as the registers form it:
  //   sum over v of w[v] * gamma^(len-1-v), with gamma = alpha^comp.
  // comp = 0 is the parity signature.
  function automatic logic [31:0] ref_sig(const ref logic [31:0] w[],
                                          input int len, input int comp,
                                          input logic [32:0] phi, input int n);
    logic [31:0] s = '0;
    logic [31:0] g = ref_pow(32'd2, comp, phi, n);
    logic [31:0] gp = 32'd1;
    for (int v = len - 1; v >= 0; v--) begin
      s  = s ^ ref_mul(w[v], gp, phi, n);
      gp = ref_mul(gp, g, phi, n);
    end
    return s;
  endfunction

endpackage

