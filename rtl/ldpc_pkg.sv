// ldpc_pkg: code definition and fixed-point formats shared by the rate-compatible
// LDPC encoder and decoder.
//
// The mother parity-check matrix M is an I x (J+I) array of a x a sub-matrices.
// The systematic part (block columns 0..J-1) holds, in every block row, NSYS
// circularly shifted identity matrices K(S); the parity part (block columns
// J..J+I-1) is dual diagonal: block row i holds identities at parity columns
// i-1 and i, so the parity vectors follow q_i = sum_j K(S_ij) p_j + q_(i-1)
// and the last one, q_I, is the running sum of every block row. Each row of M
// then has at most NSYS+2 = 8 ones, the degree of the row-column processor.
//
// The sizes (a = 72, I = J = 24, rate 1/2 mother code, degree 8) follow the
// source paper. It does not print the positions or shift values of the sub-matrices,
// so this package defines its own: block row i (0-based) uses systematic block
// columns (i + OFFS[t]) mod J for t = 0..5, and sub-matrix (i, c) is shifted by
// S = ((i*i + 3)*(c + 2) + 5*t) mod a. These were picked to give each systematic
// block column degree 6 and few short cycles at a = 72.
//
// The ARQ order of the parity vectors (q_I first, then q_(J/2), q_(J/4),
// q_(3J/4), the remaining even indices, then the odd ones) follows the source paper.
//
// Fixed point: channel LLRs and check messages are 8-bit two's complement,
// limited to +-127; the magnitude path is 7 bits with 4 fractional bits (one
// LSB = 1/16); posterior LLRs are 10-bit two's complement.
package ldpc_pkg;

  localparam int unsigned SUB_SIZE  = 72;  // a, sub-matrix size
  localparam int unsigned BLK_ROWS  = 24;  // I, block rows = parity vectors
  localparam int unsigned BLK_SYS   = 24;  // J, systematic block columns
  localparam int unsigned NSYS      = 6;   // shifted identities per block row, systematic part
  localparam int unsigned ROW_DEG   = 8;   // row-column processor degree
  localparam int unsigned ENC_PAR   = 32;  // XOR processors in the encoder
  localparam int unsigned DEC_PAR   = 36;  // row-column processors in the decoder
  localparam int unsigned MAX_ITER  = 50;  // decoding iteration limit

  localparam int unsigned LLR_W  = 8;   // channel LLR and check message width
  localparam int unsigned MAG_W  = 7;   // magnitude width, 4 fractional bits
  localparam int unsigned FRAC_W = 4;
  localparam int unsigned POST_W = 10;  // posterior LLR width

  localparam int unsigned MAG_MAX = (1 << MAG_W) - 1;

  // Block-column offsets of the systematic sub-matrices of a block row.
  localparam int OFFS [NSYS] = '{0, 1, 3, 7, 12, 20};

  // Systematic block column of slot t in block row i.
  function automatic int base_col(input int i, input int t, input int nj);
    return (i + OFFS[t]) % nj;
  endfunction

  // Shift coefficient of slot t in block row i for sub-matrix size a.
  function automatic int base_shift(input int i, input int t, input int nj, input int a);
    int c;
    c = base_col(i, t, nj);
    return ((i * i + 3) * (c + 2) + 5 * t) % a;
  endfunction

  // ARQ transmission order of the parity vectors after q_I, 1-based indices.
  // Position n (0-based) of the list q_(J/2), q_(J/4), q_(3J/4), then the even
  // indices below I not yet sent, then the odd ones.
  function automatic int arq_order(input int n, input int ni, input int nj);
    logic [255:0] used;
    int cnt, c;
    used = '0;
    cnt  = 0;
    for (int pass = 0; pass < 3; pass++) begin
      for (int k = 0; k < ni + 3; k++) begin
        if (pass == 0) c = (k == 0) ? nj / 2 : (k == 1) ? nj / 4 : (k == 2) ? (3 * nj) / 4 : 0;
        else if (pass == 1) c = 2 * k;
        else c = 2 * k + 1;
        if (c >= 1 && c < ni && !used[c]) begin
          if (cnt == n) return c;
          used[c] = 1'b1;
          cnt++;
        end
      end
    end
    return 0;
  endfunction

  // phi(x) = -ln(tanh(x/2)) = ln((1 + e^-x) / (1 - e^-x)) on the 7-bit
  // magnitude grid, rounded to nearest and limited to MAG_MAX; phi(0) = MAG_MAX.
  function automatic int phi_value(input int code);
    real x, e, v;
    if (code == 0) return MAG_MAX;
    x = real'(code) / real'(1 << FRAC_W);
    e = $exp(-x);
    v = $ln((1.0 + e) / (1.0 - e)) * real'(1 << FRAC_W);
    if (v > real'(MAG_MAX)) return MAG_MAX;
    return $rtoi(v + 0.5);
  endfunction

endpackage
