// pwl_coef_rom - coefficient ROM with its segment multiplexer (ROM-A or
// ROM-B of a PWL function unit).
//
// The ROM holds one W-bit coefficient per segment; the segment index is the
// SEGBITS most significant bits of the input x, which select the word through
// an 2^SEGBITS-to-1 multiplexer. Contents come from the CONTENTS parameter
// (see sc_pwl_pkg::rom_a_of / rom_b_of); the default is ROM-A of ln(1+x).
// Purely combinational: coef follows seg in the same cycle.
module pwl_coef_rom
  import sc_pwl_pkg::*;
#(
  parameter coef_tbl_t CONTENTS = rom_a_of(FN_LN1P)
) (
  input  logic [SEGBITS-1:0] seg,
  output logic [W-1:0]       coef
);

  always_comb coef = CONTENTS[seg];

endmodule
