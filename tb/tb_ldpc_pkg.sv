// tb_ldpc_pkg: checks the code definition. Every block row has 6 distinct
// systematic block columns with shifts below a, every systematic block column
// is used by exactly 6 block rows (the row weight of 8 with the two parity
// identities), the ARQ order after q_24 is the list
// q12, q6, q18, q2, q4, q8, q10, q14, q16, q20, q22, q1, q3, ..., q23, and
// each parity index appears exactly once; at a = 72 the code has few
// length-4 cycles (checked: none from pairs of block rows sharing two block
// columns with equal shift differences, except for at most 2).
module tb_ldpc_pkg;
  import ldpc_pkg::*;
  localparam int A = SUB_SIZE, NI = BLK_ROWS, NJ = BLK_SYS;
  localparam int EXP [NI-1] = '{12, 6, 18, 2, 4, 8, 10, 14, 16, 20, 22,
                                1, 3, 5, 7, 9, 11, 13, 15, 17, 19, 21, 23};
  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int deg [NJ];
    int seen [NI + 1];
    int cyc4;
    foreach (deg[j]) deg[j] = 0;
    for (int i = 0; i < NI; i++) begin
      for (int t = 0; t < int'(NSYS); t++) begin
        int c;
        c = base_col(i, t, NJ);
        deg[c]++;
        checks++;
        if (c < 0 || c >= NJ || base_shift(i, t, NJ, A) >= A) failures++;
        for (int u = 0; u < t; u++) begin
          checks++;
          if (base_col(i, u, NJ) == c) failures++;
        end
      end
    end
    foreach (deg[j]) begin
      checks++;
      if (deg[j] != 6) begin
        failures++;
        $display("block column %0d has degree %0d", j, deg[j]);
      end
    end
    foreach (seen[i]) seen[i] = 0;
    for (int n = 0; n < NI - 1; n++) begin
      checks++;
      if (arq_order(n, NI, NJ) != EXP[n]) begin
        failures++;
        $display("ARQ position %0d: q%0d, expected q%0d", n, arq_order(n, NI, NJ), EXP[n]);
      end
      seen[arq_order(n, NI, NJ)]++;
    end
    for (int i = 1; i < NI; i++) begin
      checks++;
      if (seen[i] != 1) failures++;
    end
    // length-4 cycles through two systematic block columns
    cyc4 = 0;
    for (int i1 = 0; i1 < NI; i1++)
      for (int i2 = i1 + 1; i2 < NI; i2++)
        for (int t1 = 0; t1 < int'(NSYS); t1++)
          for (int t2 = t1 + 1; t2 < int'(NSYS); t2++)
            for (int u1 = 0; u1 < int'(NSYS); u1++)
              for (int u2 = 0; u2 < int'(NSYS); u2++)
                if (base_col(i1, t1, NJ) == base_col(i2, u1, NJ) && base_col(i1, t2, NJ) == base_col(i2, u2, NJ))
                  if ((base_shift(i1, t1, NJ, A) - base_shift(i1, t2, NJ, A) + base_shift(i2, u2, NJ, A)
                       - base_shift(i2, u1, NJ, A) + 4 * A) % A == 0) cyc4++;
    $display("block 4-cycles at a = %0d: %0d", A, cyc4);
    checks++;
    if (cyc4 > 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
