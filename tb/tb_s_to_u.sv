// tb_s_to_u: every 11-bit two's complement input: sign is the sign bit and the
// magnitude is min(|v|, 127).
module tb_s_to_u;
  logic signed [10:0] v;
  logic               sgn;
  logic [6:0]         mag;
  int checks = 0, failures = 0;

  s_to_u #(.IN_W(11)) dut (.v(v), .sgn(sgn), .mag(mag));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -1024; i < 1024; i++) begin
      int a, want;
      v = 11'(i);
      #1;
      a = (i < 0) ? -i : i;
      want = (a > 127) ? 127 : a;
      checks++;
      if (sgn !== (i < 0) || int'(mag) != want) begin
        failures++;
        if (failures < 10) $display("v=%0d: got sgn %b mag %0d", i, sgn, mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
