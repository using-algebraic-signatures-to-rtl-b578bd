// Contents of the test ROM used as circuit under test: a fixed, irregular
// function of the address, word(a) = (a * 37 + (a >> 3)) xor 0x5A, cut to the
// word width.
package rom_ref_pkg;
  function automatic logic [31:0] rom_word(int a, int dw);
    logic [31:0] v = 32'(a * 37 + (a >> 3)) ^ 32'h5A;
    return v & ((32'd1 << dw) - 1);
  endfunction
endpackage
