// s_to_u: the "S-to-U" converter of the row-column processor. Turns a two's
// complement LLR into sign and magnitude; the magnitude saturates at the 7-bit
// range of the magnitude processor (4 fractional bits, so at most 7.9375).
// Sign 1 means a negative LLR, i.e. a hard decision of 1. Combinational.
// Saturation and the sign convention are this design's choices.
module s_to_u
  import ldpc_pkg::*;
#(
  parameter int unsigned IN_W = POST_W + 1
) (
  input  logic signed [IN_W-1:0] v,
  output logic                   sgn,
  output logic [MAG_W-1:0]       mag
);

  logic [IN_W-1:0] absv;

  always_comb begin
    sgn  = v[IN_W-1];
    absv = sgn ? IN_W'(-v) : IN_W'(v);
    mag  = (absv > IN_W'(MAG_MAX)) ? MAG_W'(MAG_MAX) : absv[MAG_W-1:0];
  end

endmodule
