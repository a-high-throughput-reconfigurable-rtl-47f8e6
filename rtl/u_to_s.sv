// u_to_s: the "U-to-S" converter of the row-column processor. Turns a sign and
// a 7-bit magnitude back into a two's complement check message of LLR_W bits
// (8 bits: -127 .. +127). Sign 1 gives a negative value. Combinational.
module u_to_s
  import ldpc_pkg::*;
(
  input  logic                    sgn,
  input  logic [MAG_W-1:0]        mag,
  output logic signed [LLR_W-1:0] v
);

  assign v = sgn ? -$signed({1'b0, mag}) : $signed({1'b0, mag});

endmodule
