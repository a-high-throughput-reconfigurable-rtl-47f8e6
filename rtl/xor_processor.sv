// xor_processor: one bit of a parity vector, q_i(k) = XOR_j x_ij(k) XOR q_(i-1)(k).
//
// x holds bit k of every shifted systematic vector X_ij = K(S_ij) p_j that is
// non-zero in block row i (the source paper's Eq. 9); s_prev is bit k of the
// previous parity vector (zero for the first block row). The XOR of all inputs
// is formed as a balanced tree so that the delay grows with log2 of the number
// of inputs, as the source paper asks for. Purely combinational.
module xor_processor #(
  parameter int unsigned NIN = 6  // systematic inputs per block row
) (
  input  logic [NIN-1:0] x,
  input  logic           s_prev,
  output logic           q
);

  localparam int unsigned NL = NIN + 1;               // leaves of the tree
  localparam int unsigned LV = (NL > 1) ? $clog2(NL) : 1;
  localparam int unsigned NP = 1 << LV;               // leaves padded to a power of two

  logic [NP-1:0] lvl [LV+1];

  always_comb begin
    lvl[0] = '0;
    lvl[0][NIN-1:0] = x;
    lvl[0][NIN] = s_prev;
    for (int l = 1; l <= LV; l++) begin
      lvl[l] = '0;
      for (int n = 0; n < (NP >> l); n++) lvl[l][n] = lvl[l-1][2*n] ^ lvl[l-1][2*n+1];
    end
  end

  assign q = lvl[LV][0];

endmodule
