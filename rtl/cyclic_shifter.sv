// cyclic_shifter: multiplies a vector by a circularly shifted identity matrix.
//
// dout[k] = din[(k + shift) mod N], i.e. the vector is rotated towards index 0
// by `shift` places, which is the product K(S) * p of the source paper's shifted
// identity sub-matrix K(S) with a vector p. The rotation is built as a
// logarithmic barrel shifter: stage b rotates by (2^b mod N) when bit b of
// `shift` is set, so any shift below N takes $clog2(N) stages of 2:1
// multiplexers. Elements are W bits wide, so the same block rotates single
// code bits (W = 1, encoder) and LLRs (decoder). Purely combinational.
// The barrel-shifter structure is this design's choice; the source paper only says
// that p_j is shifted by S_ij places.
module cyclic_shifter #(
  parameter int unsigned N = 72,  // elements, the sub-matrix size a
  parameter int unsigned W = 1,   // bits per element
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][W-1:0] din,
  input  logic [SW-1:0]       shift,  // 0 .. N-1
  output logic [N-1:0][W-1:0] dout
);

  logic [N-1:0][W-1:0] stage [SW+1];

  assign stage[0] = din;

  for (genvar b = 0; b < SW; b++) begin : g_stage
    localparam int unsigned AMT = (1 << b) % N;
    for (genvar k = 0; k < N; k++) begin : g_elem
      assign stage[b+1][k] = shift[b] ? stage[b][(k + AMT) % N] : stage[b][k];
    end
  end

  assign dout = stage[SW];

endmodule
