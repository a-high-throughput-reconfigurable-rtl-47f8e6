// phi_lut: the 7-bit look-up table of the magnitude processor.
//
// phi(x) = -ln(tanh(x / 2)), with input and output on a 7-bit grid with 4
// fractional bits (x = code / 16). The 128 entries are computed at elaboration
// from the formula (ldpc_pkg::phi_value), rounded to nearest and limited to 127;
// phi(0), which is infinite, maps to 127. phi is its own inverse, so the same
// table serves both ends of the magnitude processor. Combinational ROM.
// The 7-bit width with 4 fractional bits follows the source paper; the rounding and
// the value at 0 are this design's choices.
module phi_lut
  import ldpc_pkg::*;
(
  input  logic [MAG_W-1:0] x,
  output logic [MAG_W-1:0] y
);

  typedef logic [MAG_W-1:0] table_t [1 << MAG_W];

  function automatic table_t gen_table();
    table_t t;
    for (int i = 0; i < (1 << MAG_W); i++) t[i] = MAG_W'(phi_value(i));
    return t;
  endfunction

  localparam table_t TABLE = gen_table();

  assign y = TABLE[x];

endmodule
