// tb_rate_sweep: frame error test of the decoder over the code-rate family, at
// the default size (a = 72, I = J = 24, 1728 message bits, 36 processors,
// 50-iteration limit).
// For each number of parity vectors sent, n_par = 24, 22, 11, 7, 4, 3, 2, 1
// (rates 0.50, 0.52, 0.69, 0.77, 0.86, 0.89, 0.92, 0.96), it encodes random
// messages with the bit-level reference encoder and sends p, q_24 and the next
// parity vectors of the transmission order over a BPSK channel with additive
// white Gaussian noise (Box-Muller from $urandom). Each received sample y
// becomes the LLR g*y in steps of 1/16, limited to +-127, with the gain
// g = 2/sigma^2 but at most 5. The cap keeps channel values below the largest
// check message: at full gain, high-SNR LLRs all clip at 127, a disagreeing
// check then cancels a posterior to exactly 0, and those zeros spread as if
// the bits were erased. Too low a gain starves long runs of punctured parity
// bits instead; 5 decodes every rate here. The parity
// vectors not sent stay zero filled. Eb/N0 is set per rate, well above where
// the code family starts to decode reliably, so every frame must decode
// (dec_ok = 1, message bits correct). The clock count of each decode must be
// 1 load clock + iterations * 48 (sampled one edge later, as in
// tb_ldpc_decoder). The test prints the raw channel bit errors and the mean
// iteration count per rate.
module tb_rate_sweep;
  import ldpc_pkg::*;
  import tb_ldpc_ref_pkg::*;
  localparam int A = SUB_SIZE, NI = BLK_ROWS, NJ = BLK_SYS, P = DEC_PAR;
  localparam int NC = NI + NJ;
  localparam int ORDER [NI] = '{24, 12, 6, 18, 2, 4, 8, 10, 14, 16, 20, 22,
                               1, 3, 5, 7, 9, 11, 13, 15, 17, 19, 21, 23};
  localparam int NR = 8;
  localparam int NPAR [NR] = '{24, 22, 11, 7, 4, 3, 2, 1};
  // Eb/N0 in tenths of a dB per rate
  localparam int EBN0 [NR] = '{40, 40, 45, 50, 60, 65, 70, 80};
  localparam int FRAMES = 3;
  localparam real GAIN_MAX = 5.0;

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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real uniform();
    return (real'($urandom_range(0, 32'hFFFFFE)) + 1.0) / 16777216.0;
  endfunction

  function automatic real gauss();
    return $sqrt(-2.0 * $ln(uniform())) * $cos(6.283185307179586 * uniform());
  endfunction

  // one frame at rate J/(J+n_par); returns the raw channel bit errors
  task automatic run_frame(input int n_par, input real sigma, output int raw, output int iters);
    bit sys[], par[];
    bit sent [NC];
    int t0, t1, nerr, q;
    real y, gain;
    gain = 2.0 / (sigma * sigma);
    if (gain > GAIN_MAX) gain = GAIN_MAX;
    sys = new[NJ * A];
    foreach (sys[b]) sys[b] = 1'($urandom);
    ref_encode(sys, par, A, NI, NJ);
    foreach (sent[c]) sent[c] = (c < NJ);
    for (int n = 0; n < n_par; n++) sent[NJ + ORDER[n] - 1] = 1;
    raw = 0;

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
        y = (b ? -1.0 : 1.0) + sigma * gauss();
        if ((y < 0.0) != b) raw++;
        q = $rtoi(gain * y * 16.0 + (y < 0.0 ? -0.5 : 0.5));
        if (q > 127) q = 127;
        if (q < -127) q = -127;
        llr_data[k] = 8'(q);
      end
      @(negedge clk);
    end
    llr_valid = 0;
    max_iter = '0;
    dec_start = 1;
    @(posedge clk);
    t0 = $time / 10;
    @(negedge clk);
    dec_start = 0;
    do @(posedge clk); while (!dec_done);
    t1 = $time / 10;
    nerr = 0;
    foreach (sys[b]) if (dec_sys[b] != sys[b]) nerr++;
    iters = int'(dec_iters);
    checks += 3;
    if (!dec_ok) failures++;
    if (nerr != 0) failures++;
    if (t1 - t0 != 2 + iters * NI * (A / P)) failures++;
    if (!dec_ok || nerr != 0)
      $display("  frame failed: ok=%b iterations=%0d bit errors=%0d", dec_ok, iters, nerr);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < NR; r++) begin
      real rate, ebn0, sigma;
      int raw, it, raw_sum, it_sum;
      rate  = real'(NJ) / real'(NJ + NPAR[r]);
      ebn0  = 10.0 ** (real'(EBN0[r]) / 100.0);
      sigma = $sqrt(1.0 / (2.0 * rate * ebn0));
      raw_sum = 0;
      it_sum = 0;
      for (int f = 0; f < FRAMES; f++) begin
        run_frame(NPAR[r], sigma, raw, it);
        raw_sum += raw;
        it_sum += it;
      end
      $display("rate %0d/%0d = %4.2f  Eb/N0 %3.1f dB  channel bit errors %0d  mean iterations %4.1f",
               NJ, NJ + NPAR[r], rate, real'(EBN0[r]) / 10.0, raw_sum, real'(it_sum) / FRAMES);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
