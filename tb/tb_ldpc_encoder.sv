// tb_ldpc_encoder: encoder at its default size (a = 72, I = J = 24, 32 XOR
// processors). Streams random messages (plus an all-zero and a single-one
// message) back to back, compares every codeword with the bit-level reference
// encoder and checks that it satisfies every parity check of the mother
// matrix. Checks the timing: the codeword appears ceil(I*a/P) + 1 clocks after
// the last message word is accepted, and with loading overlapped a new
// codeword is ready every max(J*a/P, ceil(I*a/P) + 1) = 55 clocks when the
// consumer never stalls. Also stalls the
// consumer to check that the codeword holds.
module tb_ldpc_encoder;
  import ldpc_pkg::*;
  import tb_ldpc_ref_pkg::*;
  localparam int A = SUB_SIZE, NI = BLK_ROWS, NJ = BLK_SYS, P = ENC_PAR;
  localparam int WORDS = NJ * A / P, ENC_CY = (NI * A + P - 1) / P;
  localparam int NMSG = 6;

  logic clk = 0, rst_n = 0;
  logic msg_valid = 0, msg_ready, cw_valid, cw_ready = 1;
  logic [P-1:0] msg_data = '0;
  logic [NJ*A-1:0] cw_sys;
  logic [NI*A-1:0] cw_par;
  int checks = 0, failures = 0;
  int cyc = 0;

  ldpc_encoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit msgs [NMSG][];
  int last_word_cyc [NMSG];
  int cw_cyc [NMSG];

  // producer
  initial begin
    for (int m = 0; m < NMSG; m++) begin
      msgs[m] = new[NJ * A];
      foreach (msgs[m][b]) msgs[m][b] = (m == 0) ? 1'b0 : (m == 1) ? (b == 100) : 1'($urandom);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < NMSG; m++) begin
      for (int w = 0; w < WORDS; w++) begin
        @(negedge clk);
        msg_valid = 1;
        for (int b = 0; b < P; b++) msg_data[b] = msgs[m][w * P + b];
        @(posedge clk);
        while (!msg_ready) @(posedge clk);
        if (w == WORDS - 1) last_word_cyc[m] = cyc;
      end
      @(negedge clk);
      msg_valid = 0;
    end
  end

  // consumer: stalls on codeword 4 for 20 clocks
  initial begin
    for (int m = 0; m < NMSG; m++) begin
      bit sys[], par[], ref_par[];
      @(negedge clk);
      cw_ready = (m != 4);
      do @(posedge clk); while (!cw_valid);
      cw_cyc[m] = cyc;
      if (m == 4) begin
        logic [NI*A-1:0] held;
        held = cw_par;
        repeat (20) begin
          @(posedge clk);
          checks++;
          if (!cw_valid || cw_par !== held) failures++;
        end
        @(negedge clk);
        cw_ready = 1;
        @(posedge clk);
      end
      sys = new[NJ * A];
      par = new[NI * A];
      foreach (sys[b]) sys[b] = cw_sys[b];
      foreach (par[b]) par[b] = cw_par[b];
      checks++;
      if (sys != msgs[m]) begin
        failures++;
        $display("codeword %0d: systematic part differs", m);
      end
      ref_encode(msgs[m], ref_par, A, NI, NJ);
      checks++;
      if (par != ref_par) begin
        int nd = 0;
        foreach (par[b]) if (par[b] != ref_par[b]) nd++;
        failures++;
        $display("codeword %0d: %0d parity bits differ from the reference", m, nd);
      end
      checks++;
      if (ref_unsat(sys, par, A, NI, NJ) != 0) begin
        failures++;
        $display("codeword %0d: %0d parity checks fail", m, ref_unsat(sys, par, A, NI, NJ));
      end
    end
    // latency of the first codeword: one transfer clock plus ENC_CY clocks,
    // plus the clock edge at which this testbench samples cw_valid
    checks++;
    if (cw_cyc[0] - last_word_cyc[0] != ENC_CY + 2) begin
      failures++;
      $display("latency %0d, expected %0d", cw_cyc[0] - last_word_cyc[0], ENC_CY + 2);
    end
    // steady state: one codeword per max(WORDS, ENC_CY + 1) clocks
    for (int m = 2; m < 4; m++) begin
      checks++;
      if (cw_cyc[m] - cw_cyc[m-1] != ((WORDS > ENC_CY + 1) ? WORDS : ENC_CY + 1)) begin
        failures++;
        $display("codeword interval %0d", cw_cyc[m] - cw_cyc[m-1]);
      end
    end
    $display("encoder: %0d info bits per %0d clocks", NJ * A, cw_cyc[3] - cw_cyc[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
