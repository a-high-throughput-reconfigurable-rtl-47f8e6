// tb_phi_lut: all 128 entries against phi(x) = -ln(tanh(x/2)) computed with
// $tanh, plus the self-inverse property phi(phi(x)) ~ x in the middle range.
module tb_phi_lut;
  import tb_ldpc_ref_pkg::*;
  logic [6:0] x, y;
  int checks = 0, failures = 0;

  phi_lut dut (.x(x), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first [128];
    for (int i = 0; i < 128; i++) begin
      x = 7'(i);
      #1;
      first[i] = int'(y);
      checks++;
      if (int'(y) != ref_phi(i)) begin
        failures++;
        $display("phi(%0d): got %0d want %0d", i, y, ref_phi(i));
      end
    end
    // monotone decreasing
    for (int i = 1; i < 128; i++) begin
      checks++;
      if (first[i] > first[i-1]) failures++;
    end
    // phi is close to its own inverse for x in 8..40 (0.5 .. 2.5)
    for (int i = 8; i <= 40; i++) begin
      x = 7'(first[i]);
      #1;
      checks++;
      if (int'(y) > i + 2 || int'(y) < i - 2) begin
        failures++;
        $display("phi(phi(%0d)) = %0d", i, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
