// rom_model: behavioural model of the circuit under test used by the BIST
// testbenches, a 2^AW x DW read-only memory with a registered output (one
// cycle from address to data). Its contents follow rom_ref_pkg::rom_word;
// flip_bit() toggles one stored bit to emulate a programming error and
// repair() restores all contents.
module rom_model
  import rom_ref_pkg::*;
#(
  parameter int AW = 10,
  parameter int DW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);
  logic [DW-1:0] mem[1 << AW];

  function automatic void repair();
    for (int a = 0; a < (1 << AW); a++) mem[a] = DW'(rom_word(a, DW));
  endfunction

  function automatic void flip_bit(int a, int b);
    mem[a][b] = ~mem[a][b];
  endfunction

  initial repair();

  always_ff @(posedge clk) data <= mem[addr];
endmodule
