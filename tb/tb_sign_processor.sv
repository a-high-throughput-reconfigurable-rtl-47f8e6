// tb_sign_processor: all 256 sign patterns: P is the XOR of all signs and each
// output is the XOR of the other seven.
module tb_sign_processor;
  logic [7:0] s, so;
  logic       p;
  int checks = 0, failures = 0;

  sign_processor #(.DEG(8)) dut (.s(s), .s_out(so), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      s = 8'(v);
      #1;
      checks++;
      if (p !== 1'($countones(s) % 2)) failures++;
      for (int i = 0; i < 8; i++) begin
        logic [7:0] others;
        others = s;
        others[i] = 1'b0;
        checks++;
        if (so[i] !== 1'($countones(others) % 2)) begin
          failures++;
          if (failures < 10) $display("s=%b i=%0d: got %b", s, i, so[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
