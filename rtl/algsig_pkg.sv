// algsig_pkg: shared types and Galois-field helpers for the algebraic-signature
// BIST blocks.
//
// Field elements of GF(2^n) are bit vectors whose bit i is the coefficient of
// t^i (bit 0 is the constant term). The field is generated by a primitive
// polynomial phi given with its leading t^n term, e.g. t^8+t^5+t^3+t^2+1 is
// 9'h12D. Multiplying by alpha = t is a left shift followed by an XOR with phi
// when the t^n coefficient is set; this is the only field operation the
// signature registers need. Elements are carried in MAXW-bit containers so one
// function serves every field size up to GF(2^MAXW).
//
// The configuration names follow the four output-response-analyzer variants
// compared for ROM testing: one alpha signature; parity plus alpha; alpha plus
// alpha^2; parity, alpha and alpha^2. The TPG kinds are this design's choice.
package algsig_pkg;

  localparam int MAXW = 32;

  typedef enum logic [1:0] {
    ORA_SINGLE     = 2'd0,  // alpha-signature only
    ORA_DOUBLE     = 2'd1,  // alpha^0 (parity) and alpha
    ORA_DOUBLE_ALT = 2'd2,  // alpha and alpha^2
    ORA_TRIPLE     = 2'd3   // alpha^0, alpha and alpha^2
  } ora_cfg_e;

  typedef enum logic {
    TPG_COUNTER = 1'b0,     // binary up-counter (every pattern, in order)
    TPG_LFSR    = 1'b1      // maximal-length Galois LFSR (never all-zero)
  } tpg_kind_e;

  // Number of signature components used by a configuration (the k of the
  // k-error detection guarantee).
  function automatic int ora_components(ora_cfg_e cfg);
    return (cfg == ORA_TRIPLE) ? 3 : (cfg == ORA_SINGLE) ? 1 : 2;
  endfunction

  function automatic logic ora_has_parity(ora_cfg_e cfg);
    return (cfg == ORA_DOUBLE) || (cfg == ORA_TRIPLE);
  endfunction

  function automatic logic ora_has_alpha2(ora_cfg_e cfg);
    return (cfg == ORA_DOUBLE_ALT) || (cfg == ORA_TRIPLE);
  endfunction

  // x * t mod phi in GF(2^n); bits of x at n and above must be zero.
  function automatic logic [MAXW-1:0] gf_mul_alpha(logic [MAXW-1:0] x,
                                                   logic [MAXW:0]   phi,
                                                   int              n);
    logic [MAXW:0] s;
    s = {x, 1'b0};
    if (s[n]) s = s ^ phi;
    return s[MAXW-1:0];
  endfunction

endpackage
