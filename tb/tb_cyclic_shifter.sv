// tb_cyclic_shifter: checks dout[k] == din[(k + shift) mod N] for every shift
// at N = 72 (the sub-matrix size) and N = 5 (not a power of two, small), with
// random element values.
module tb_cyclic_shifter;
  localparam int N1 = 72, W1 = 4, N2 = 5, W2 = 3;
  logic [N1-1:0][W1-1:0] d1, o1;
  logic [6:0]            s1;
  logic [N2-1:0][W2-1:0] d2, o2;
  logic [2:0]            s2;
  int checks = 0, failures = 0;

  cyclic_shifter #(.N(N1), .W(W1)) dut1 (.din(d1), .shift(s1), .dout(o1));
  cyclic_shifter #(.N(N2), .W(W2)) dut2 (.din(d2), .shift(s2), .dout(o2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int k = 0; k < N1; k++) d1[k] = W1'($urandom);
      for (int k = 0; k < N2; k++) d2[k] = W2'($urandom);
      for (int s = 0; s < N1; s++) begin
        s1 = 7'(s);
        #1;
        for (int k = 0; k < N1; k++) begin
          checks++;
          if (o1[k] !== d1[(k + s) % N1]) begin
            failures++;
            if (failures < 10) $display("N=72 shift %0d k %0d: got %h want %h", s, k, o1[k], d1[(k + s) % N1]);
          end
        end
      end
      for (int s = 0; s < N2; s++) begin
        s2 = 3'(s);
        #1;
        for (int k = 0; k < N2; k++) begin
          checks++;
          if (o2[k] !== d2[(k + s) % N2]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
