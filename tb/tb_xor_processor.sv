// tb_xor_processor: exhaustive check of the 6-input-plus-carry XOR tree against
// a bit count, and of a 24-input instance (one input per systematic block
// column) with random inputs.
module tb_xor_processor;
  logic [5:0]  x6;
  logic [23:0] x24;
  logic        s6, s24, q6, q24;
  int checks = 0, failures = 0;

  xor_processor #(.NIN(6))  dut6  (.x(x6),  .s_prev(s6),  .q(q6));
  xor_processor #(.NIN(24)) dut24 (.x(x24), .s_prev(s24), .q(q24));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      x6 = v[5:0];
      s6 = v[6];
      #1;
      checks++;
      if (q6 !== 1'($countones(v[6:0]) % 2)) begin
        failures++;
        $display("x=%b s=%b: got %b", x6, s6, q6);
      end
    end
    for (int r = 0; r < 500; r++) begin
      x24 = 24'($urandom);
      s24 = 1'($urandom);
      #1;
      checks++;
      if (q24 !== 1'(($countones(x24) + s24) % 2)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
