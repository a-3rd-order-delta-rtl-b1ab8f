// thermo_enc: 4-bit signed modulator code to 15-bit thermometer code.
//
// A code q in -8..+7 selects q+8 of the 15 unit elements: the q+8 lowest bits of therm are
// ones, the rest zeros (so +7 gives all ones, 0 gives the 8 lowest, -8 gives none). Bit 0 is
// element 1. Purely combinational; the mapping is the source's encoder table.
module thermo_enc
  import dac_pkg::*;
(
  input  code_t  code,
  output therm_t therm
);
  logic [4:0] nsel;

  always_comb begin
    nsel = 5'(signed'(code) + 5'sd8);
    for (int i = 0; i < N_ELEM; i++) therm[i] = (5'(i) < nsel);
  end
endmodule
