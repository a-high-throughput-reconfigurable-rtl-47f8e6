// tb_rcrc_ldpc_codec: end-to-end test of the codec at its default parameters
// (a = 72, I = J = 24, 32-parallel encoder, 36-parallel decoder, 50 iterations).
// Random messages stream into the encoder; the testbench takes the transmitted
// segments, plays modulator, channel and demodulator by turning each bit into
// an LLR (random magnitude, some bits weak and of the wrong sign), writes them
// into the decoder and starts it. When a decode fails it asks the transmitter
// for the next parity vector (ARQ) and decodes again, until success or until
// every parity vector is in; then it acknowledges the frame. Each decoded
// message is compared with the one sent.
// Mechanisms counted, each must happen at least once: punctured (zero-filled)
// frames, rate switches between frames, ARQ retransmissions, decodes ended early
// by the parity test, decodes stopped by the iteration limit, back-pressure on
// the segment stream, and message loading overlapped with a held frame.
module tb_rcrc_ldpc_codec;
  import ldpc_pkg::*;
  localparam int A = SUB_SIZE, NI = BLK_ROWS, NJ = BLK_SYS, P = ENC_PAR;
  localparam int WORDS = NJ * A / P;
  localparam int NF = 6;
  // per frame: parity vectors sent first, error rate in 1/1000, LLR magnitude range, iteration limit
  localparam int NPAR [NF] = '{24, 1, 1, 4, 11, 2};
  localparam int ERR  [NF] = '{0, 1, 25, 3, 5, 1};
  localparam int MLO  [NF] = '{24, 64, 24, 40, 24, 64};
  localparam int MHI  [NF] = '{80, 127, 60, 100, 80, 127};
  localparam int LIM  [NF] = '{0, 0, 8, 0, 0, 0};

  logic clk = 0, rst_n = 0;
  logic msg_valid = 0, msg_ready;
  logic [P-1:0] msg_data = '0;
  logic [4:0] n_par = 5'(NPAR[0]);
  logic arq_req = 0, ack = 0, arq_exhausted, frame_held;
  logic tx_valid, tx_ready = 1, tx_first, tx_retx;
  logic [5:0] tx_seg;
  logic [A-1:0] tx_data;
  logic frame_start = 0, llr_valid = 0, dec_start = 0;
  logic [5:0] llr_seg = '0;
  logic signed [A-1:0][LLR_W-1:0] llr_data = '0;
  logic [5:0] max_iter = '0;
  logic dec_busy, dec_done, dec_ok;
  logic [5:0] dec_iters;
  logic [NJ*A-1:0] dec_sys;

  int checks = 0, failures = 0;
  int n_punct = 0, n_switch = 0, n_arq = 0, n_early = 0, n_limit = 0, n_stall = 0, n_overlap = 0;
  bit bp = 0;

  rcrc_ldpc_codec dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NJ*A-1:0] msgs [NF];

  // message source
  initial begin
    foreach (msgs[f]) for (int b = 0; b < NJ * A; b += 32) msgs[f][b +: 32] = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++)
      for (int w = 0; w < WORDS; w++) begin
        @(negedge clk);
        msg_valid = 1;
        msg_data = msgs[f][w * P +: P];
        @(posedge clk);
        while (!msg_ready) @(posedge clk);
        if (frame_held) n_overlap++;
      end
    @(negedge clk);
    msg_valid = 0;
  end

  // back-pressure on the segment stream when enabled
  always @(negedge clk) tx_ready = bp ? 1'($urandom % 4 != 0) : 1'b1;
  always @(posedge clk) if (tx_valid && !tx_ready) n_stall++;

  typedef struct { int seg; logic [A-1:0] bits; } segment_t;
  segment_t rx_q [$];

  function automatic logic signed [A-1:0][LLR_W-1:0] demod(input logic [A-1:0] bits, input int f);
    logic signed [A-1:0][LLR_W-1:0] l;
    for (int k = 0; k < A; k++) begin
      int mag;
      mag = int'($urandom_range(MLO[f], MHI[f]));
      if (int'($urandom_range(0, 999)) < ERR[f]) l[k] = LLR_W'(bits[k] ? 12 : -12);
      else l[k] = LLR_W'(bits[k] ? -mag : mag);
    end
    return l;
  endfunction

  task automatic take_segment();
    segment_t s;
    do @(posedge clk); while (!(tx_valid && tx_ready));
    s.seg = int'(tx_seg);
    s.bits = tx_data;
    rx_q.push_back(s);
  endtask

  task automatic write_rx(input int f);
    while (rx_q.size() > 0) begin
      segment_t s;
      s = rx_q.pop_front();
      @(negedge clk);
      llr_valid = 1;
      llr_seg = 6'(s.seg);
      llr_data = demod(s.bits, f);
    end
    @(negedge clk);
    llr_valid = 0;
  endtask

  task automatic run_decoder(input int f);
    @(negedge clk);
    max_iter = 6'(LIM[f]);
    dec_start = 1;
    @(negedge clk);
    dec_start = 0;
    do @(posedge clk); while (!dec_done);
    if (dec_ok && int'(dec_iters) < ((LIM[f] == 0) ? MAX_ITER : LIM[f])) n_early++;
    if (!dec_ok) n_limit++;
  endtask

  initial begin
    int nsent;
    @(posedge rst_n);
    for (int f = 0; f < NF; f++) begin
      bp = (f == 1);
      nsent = NPAR[f];
      for (int s = 0; s < NJ + NPAR[f]; s++) take_segment();
      if (NPAR[f] < NI) n_punct++;
      if (f > 0 && NPAR[f] != NPAR[f-1]) n_switch++;
      bp = 0;
      @(negedge clk);
      frame_start = 1;
      @(negedge clk);
      frame_start = 0;
      write_rx(f);
      run_decoder(f);
      while (!dec_ok && !arq_exhausted) begin
        @(negedge clk);
        arq_req = 1;
        @(negedge clk);
        arq_req = 0;
        take_segment();
        n_arq++;
        nsent++;
        write_rx(f);
        run_decoder(f);
      end
      $display("frame %0d: %0d parity vectors sent, ok=%b after %0d iterations", f, nsent, dec_ok, dec_iters);
      checks++;
      if (!dec_ok || dec_sys !== msgs[f]) begin
        failures++;
        $display("  frame %0d decoded wrongly", f);
      end
      @(negedge clk);
      if (f + 1 < NF) n_par = 5'(NPAR[f + 1]);
      ack = 1;
      @(negedge clk);
      ack = 0;
    end
    $display("punctured=%0d rate_switches=%0d arq=%0d early_stop=%0d iteration_limit=%0d stalls=%0d overlap=%0d",
             n_punct, n_switch, n_arq, n_early, n_limit, n_stall, n_overlap);
    checks += 7;
    if (n_punct == 0)   failures++;
    if (n_switch == 0)  failures++;
    if (n_arq == 0)     failures++;
    if (n_early == 0)   failures++;
    if (n_limit == 0)   failures++;
    if (n_stall == 0)   failures++;
    if (n_overlap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
