// row_column_processor: the degree-8 junction row-column processor of the
// layered sum-product decoder.
//
// For one row m of the parity-check matrix it takes the current posterior LLRs
// Z_n of the (up to 8) code bits in the row and the row's previous check
// messages Y_mn, and returns the updated Z'_n and Y'_mn in the same cycle:
//   x_n   = Z_n - Y_mn                      (input subtractors)
//   Y'_mn = sign * phi( sum_{i != n} phi(|x_i|) )  (S-to-U, sign and magnitude
//                                              processors, U-to-S)
//   Z'_n  = x_n + Y'_mn                     (output adders)
// so the column (bit-node) update is merged into the row update. Slots with
// en = 0 (rows with fewer than 8 ones) enter the check update as a large
// positive value, which leaves every other output unchanged.
// sign_parity is the sign processor's product P of the input signs (1 = odd
// number of negative x_n), the parity check result drawn in the processor's
// block diagram. parity_ok is 1 when the hard decisions of the updated Z' of the row satisfy
// the row's parity check; the decoder uses it for early termination.
// Structure and widths (8-bit messages, 7-bit magnitudes with 4 fractional bits)
// follow the source paper. The 10-bit saturating posterior LLR and forming the
// parity check from the updated Z' signs are this design's choices.
module row_column_processor
  import ldpc_pkg::*;
#(
  parameter int unsigned DEG = ROW_DEG
) (
  input  logic [DEG-1:0]                    en,
  input  logic signed [DEG-1:0][POST_W-1:0] z,
  input  logic signed [DEG-1:0][LLR_W-1:0]  y,
  output logic signed [DEG-1:0][POST_W-1:0] z_new,
  output logic signed [DEG-1:0][LLR_W-1:0]  y_new,
  output logic                              parity_ok,
  output logic                              sign_parity
);

  localparam int unsigned XW = POST_W + 1;
  localparam logic signed [XW-1:0] ZMAX = XW'((1 << (POST_W - 1)) - 1);

  logic signed [DEG-1:0][XW-1:0] x;
  logic [DEG-1:0]                sgn_raw, sgn_in, sgn_out;
  logic [DEG-1:0][MAG_W-1:0]     mag_raw, mag_in, mag_out;
  logic                          p_all;
  logic [DEG-1:0]                hard;

  for (genvar i = 0; i < DEG; i++) begin : g_in
    assign x[i] = XW'($signed(z[i])) - XW'($signed(y[i]));
    s_to_u #(.IN_W(XW)) u_s2u (.v($signed(x[i])), .sgn(sgn_raw[i]), .mag(mag_raw[i]));
    assign sgn_in[i] = en[i] & sgn_raw[i];
    assign mag_in[i] = en[i] ? mag_raw[i] : MAG_W'(MAG_MAX);
  end

  sign_processor #(.DEG(DEG)) u_sign (.s(sgn_in), .s_out(sgn_out), .p(p_all));

  magnitude_processor #(.DEG(DEG)) u_mag (.m(mag_in), .y(mag_out));

  for (genvar i = 0; i < DEG; i++) begin : g_out
    logic signed [XW:0] zsum;
    u_to_s u_u2s (.sgn(sgn_out[i]), .mag(mag_out[i]), .v(y_new[i]));
    assign zsum = (XW+1)'($signed(x[i])) + (XW+1)'($signed(y_new[i]));
    assign z_new[i] = (zsum > (XW+1)'(ZMAX))  ? POST_W'(ZMAX)  :
                      (zsum < -(XW+1)'(ZMAX)) ? POST_W'(-ZMAX) : POST_W'(zsum);
    assign hard[i] = en[i] & z_new[i][POST_W-1];
  end

  assign parity_ok   = ~^hard;
  assign sign_parity = p_all;

endmodule
