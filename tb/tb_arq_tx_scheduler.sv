// tb_arq_tx_scheduler: segment order and ARQ behaviour of the transmitter at
// I = J = 24 (the source paper's order) with small a = 8 vectors. For several
// n_par settings it checks that a frame is p_1..p_J, q_24, then the first
// n_par-1 entries of q12, q6, q18, q2, q4, q8, q10, q14, q16, q20, q22, q1, q3,
// ..., q23 (the order written out here independently of the RTL), with the
// right data in each segment; that every arq_req sends the next vector; that
// arq_exhausted rises after all 24; that ack releases the frame; and that a
// frame of n_par segments takes J + n_par clocks without back-pressure. One
// frame runs with random tx_ready back-pressure.
module tb_arq_tx_scheduler;
  localparam int A = 8, NI = 24, NJ = 24;
  localparam int EXP_ORDER [NI] = '{24, 12, 6, 18, 2, 4, 8, 10, 14, 16, 20, 22,
                                    1, 3, 5, 7, 9, 11, 13, 15, 17, 19, 21, 23};

  logic clk = 0, rst_n = 0;
  logic cw_valid = 0, cw_ready;
  logic [NJ*A-1:0] cw_sys;
  logic [NI*A-1:0] cw_par;
  logic [4:0] n_par = 5'd1;
  logic arq_req = 0, ack = 0, arq_exhausted, frame_held;
  logic tx_valid, tx_ready = 1, tx_first, tx_retx;
  logic [5:0] tx_seg;
  logic [A-1:0] tx_data;
  int checks = 0, failures = 0;
  bit bp = 0;

  arq_tx_scheduler #(.A(A), .NI(NI), .NJ(NJ)) dut (.*);

  always #5 clk = ~clk;

  // random back-pressure when enabled
  always @(negedge clk) tx_ready = bp ? 1'($urandom % 3 != 0) : 1'b1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_seg(input int seg, input bit first, input bit retx);
    logic [A-1:0] want;
    do @(posedge clk); while (!(tx_valid && tx_ready));
    want = (seg < NJ) ? cw_sys[seg*A +: A] : cw_par[(seg-NJ)*A +: A];
    checks++;
    if (int'(tx_seg) != seg || tx_data !== want || tx_first !== first || tx_retx !== retx) begin
      failures++;
      $display("segment: got %0d (first %b retx %b), expected %0d", tx_seg, tx_first, tx_retx, seg);
    end
  endtask

  task automatic run_frame(input int np, input int extra, input bit backp);
    int t0, t1;
    @(negedge clk);
    for (int b = 0; b < NJ*A; b += 32) cw_sys[b +: 32] = $urandom;
    for (int b = 0; b < NI*A; b += 32) cw_par[b +: 32] = $urandom;
    n_par = 5'(np);
    bp = backp;
    cw_valid = 1;
    do @(posedge clk); while (!cw_ready);
    t0 = $time / 10;
    @(negedge clk);
    cw_valid = 0;
    for (int j = 0; j < NJ; j++) expect_seg(j, j == 0, 0);
    for (int n = 0; n < np; n++) expect_seg(NJ + EXP_ORDER[n] - 1, 0, 0);
    t1 = $time / 10;
    if (!backp) begin
      checks++;
      if (t1 - t0 != NJ + np) begin
        failures++;
        $display("frame took %0d clocks, expected %0d", t1 - t0, NJ + np);
      end
    end
    @(negedge clk);
    checks++;
    if (!frame_held || tx_valid) failures++;
    for (int n = np; n < np + extra && n < NI; n++) begin
      @(negedge clk);
      arq_req = 1;
      @(negedge clk);
      arq_req = 0;
      expect_seg(NJ + EXP_ORDER[n] - 1, 0, 1);
      @(negedge clk);
    end
    checks++;
    if (arq_exhausted !== (np + extra >= NI)) begin
      failures++;
      $display("arq_exhausted %b after %0d vectors", arq_exhausted, np + extra);
    end
    @(negedge clk);
    ack = 1;
    @(negedge clk);
    ack = 0;
    checks++;
    if (!cw_ready) failures++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(1, 0, 0);    // highest rate, 24/25
    run_frame(4, 3, 0);    // rate 24/28, then three ARQ rounds
    run_frame(1, 23, 0);   // ARQ down to the mother code, then exhausted
    run_frame(24, 0, 0);   // mother code, rate 1/2
    run_frame(11, 2, 1);   // with back-pressure
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
