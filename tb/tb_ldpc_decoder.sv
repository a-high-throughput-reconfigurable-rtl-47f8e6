// tb_ldpc_decoder: the decoder at its default size (a = 72, I = J = 24,
// 36 row-column processors). Codewords come from the bit-level reference
// encoder; the testbench acts as channel and demodulator, giving each sent bit
// an LLR of random magnitude (positive for 0) and turning some bits into
// weak LLRs of the wrong sign. Cases:
//   mother code, no errors: decoded in one iteration, 1 + 48 clocks
//   highest rate 24/25 (p and q_24 only, the rest zero filled), no errors
//   mother code with bit errors, rate 24/28 and 24/25 with a few errors
//   random LLRs with an iteration limit of 3: dec_ok = 0 after exactly 3
// For every decode it checks the hard decisions against the message and the
// clock count: 1 load clock + iterations * I * a / P, counted here from the
// edge that takes dec_start to the edge that samples dec_done (one more).
module tb_ldpc_decoder;
  import ldpc_pkg::*;
  import tb_ldpc_ref_pkg::*;
  localparam int A = SUB_SIZE, NI = BLK_ROWS, NJ = BLK_SYS, P = DEC_PAR;
  localparam int NC = NI + NJ;
  localparam int ORDER [NI] = '{24, 12, 6, 18, 2, 4, 8, 10, 14, 16, 20, 22,
                               1, 3, 5, 7, 9, 11, 13, 15, 17, 19, 21, 23};

  logic clk = 0, rst_n = 0;
  logic frame_start = 0, llr_valid = 0, dec_start = 0;
  logic [5:0] llr_seg = '0;
  logic signed [A-1:0][7:0] llr_data = '0;
  logic [5:0] max_iter = '0;
  logic dec_busy, dec_done, dec_ok;
  logic [5:0] dec_iters;
  logic [NJ*A-1:0] dec_sys;
  int checks = 0, failures = 0;

  ldpc_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sends the n_par first parity vectors of the ARQ order; errs in 1/1000
  int mag_lo = 24, mag_hi = 80;

  function automatic int llr_of(input bit b, input int err_pm);
    int mag;
    if (int'($urandom_range(0, 999)) < err_pm)
      return b ? int'($urandom_range(4, 20)) : -int'($urandom_range(4, 20));
    mag = int'($urandom_range(mag_lo, mag_hi));
    return b ? -mag : mag;
  endfunction

  task automatic decode_case(input string name, input int n_par, input int err_pm,
                             input bit garbage, input int lim, input bit expect_ok,
                             input int expect_iters);
    bit sys[], par[];
    bit sent [NC];
    int t0, t1, nerr;
    sys = new[NJ * A];
    foreach (sys[b]) sys[b] = 1'($urandom);
    ref_encode(sys, par, A, NI, NJ);
    foreach (sent[c]) sent[c] = (c < NJ);
    for (int n = 0; n < n_par; n++) sent[NJ + ORDER[n] - 1] = 1;

    @(negedge clk);
    frame_start = 1;
    @(negedge clk);
    frame_start = 0;
    for (int c = 0; c < NC; c++) begin
      if (!sent[c]) continue;
      llr_valid = 1;
      llr_seg = 6'(c);
      for (int k = 0; k < A; k++) begin
        bit b;
        b = (c < NJ) ? sys[c * A + k] : par[(c - NJ) * A + k];
        llr_data[k] = garbage ? 8'($urandom_range(0, 60) - 30) : 8'(llr_of(b, err_pm));
      end
      @(negedge clk);
    end
    llr_valid = 0;
    max_iter = 6'(lim);
    dec_start = 1;
    @(posedge clk);
    t0 = $time / 10;
    @(negedge clk);
    dec_start = 0;
    do @(posedge clk); while (!dec_done);
    t1 = $time / 10;
    nerr = 0;
    foreach (sys[b]) if (dec_sys[b] != sys[b]) nerr++;
    $display("%-28s ok=%b iterations=%0d clocks=%0d bit errors=%0d", name, dec_ok, dec_iters, t1 - t0, nerr);
    checks++;
    if (dec_ok !== expect_ok) begin
      failures++;
      $display("  dec_ok %b, expected %b", dec_ok, expect_ok);
    end
    if (expect_ok) begin
      checks++;
      if (nerr != 0) failures++;
    end
    if (expect_iters > 0) begin
      checks++;
      if (int'(dec_iters) != expect_iters) begin
        failures++;
        $display("  %0d iterations, expected %0d", dec_iters, expect_iters);
      end
    end
    checks++;
    if (t1 - t0 != 2 + int'(dec_iters) * NI * (A / P)) begin
      failures++;
      $display("  %0d clocks, expected %0d", t1 - t0, 2 + int'(dec_iters) * NI * (A / P));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    decode_case("mother code, clean",   24, 0,  0, 0, 1, 1);
    mag_lo = 64; mag_hi = 127;
    decode_case("rate 24/25, clean",     1, 0,  0, 0, 1, 0);
    mag_lo = 24; mag_hi = 80;
    decode_case("mother code, errors",  24, 20, 0, 0, 1, 0);
    decode_case("rate 24/28, errors",    4, 3,  0, 0, 1, 0);
    mag_lo = 64; mag_hi = 127;
    decode_case("rate 24/25, errors",    1, 1,  0, 0, 1, 0);
    mag_lo = 24; mag_hi = 80;
    decode_case("random LLRs, limit 3", 24, 0,  1, 3, 0, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
