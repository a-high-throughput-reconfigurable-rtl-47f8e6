// sign_processor: sign part of the degree-8 check-node update.
//
// P = XOR of all input signs (the product of the signs, Eq. 12, with sign 1
// standing for -1) takes a tree of 7 XOR gates; each output sign is
// P XOR s_i (Eq. 13), the product of all other signs, taking 8 more: 15 XOR
// gates in all, as the source paper counts. P = 0 means the row's parity check on
// the input signs is satisfied. Combinational.
module sign_processor #(
  parameter int unsigned DEG = 8
) (
  input  logic [DEG-1:0] s,
  output logic [DEG-1:0] s_out,
  output logic           p
);

  assign p = ^s;
  assign s_out = s ^ {DEG{p}};

endmodule
