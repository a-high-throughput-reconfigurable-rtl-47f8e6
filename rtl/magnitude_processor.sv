// magnitude_processor: magnitude part of the degree-8 sum-product check-node update.
//
// For inputs m_1..m_8 each output is y_k = phi( sum_{i != k} phi(m_i) ), the
// sum-product rule in the phi domain. The first rank of 8 phi tables maps the
// magnitudes, one adder tree forms the total, each output subtracts its own
// term, saturates the result to the 7-bit table range and maps it back through
// a second rank of 8 phi tables. Combinational.
// The source paper prints the rule with one phi; the inner phi of the standard
// sum-product update is assumed here.
module magnitude_processor
  import ldpc_pkg::*;
#(
  parameter int unsigned DEG = 8
) (
  input  logic [DEG-1:0][MAG_W-1:0] m,
  output logic [DEG-1:0][MAG_W-1:0] y
);

  localparam int unsigned SUM_W = MAG_W + $clog2(DEG) + 1;

  logic [DEG-1:0][MAG_W-1:0] f;
  logic [DEG-1:0][MAG_W-1:0] ext;
  logic [SUM_W-1:0]          total;

  for (genvar i = 0; i < DEG; i++) begin : g_fwd
    phi_lut u_phi (.x(m[i]), .y(f[i]));
  end

  always_comb begin
    logic [SUM_W-1:0] e;
    total = '0;
    for (int i = 0; i < DEG; i++) total += SUM_W'(f[i]);
    for (int i = 0; i < DEG; i++) begin
      e = total - SUM_W'(f[i]);
      ext[i] = (e > SUM_W'(MAG_MAX)) ? MAG_W'(MAG_MAX) : e[MAG_W-1:0];
    end
  end

  for (genvar i = 0; i < DEG; i++) begin : g_back
    phi_lut u_phi (.x(ext[i]), .y(y[i]));
  end

endmodule
