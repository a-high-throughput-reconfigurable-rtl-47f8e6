// tb_u_to_s: every sign and 7-bit magnitude gives the 8-bit value +-magnitude.
module tb_u_to_s;
  logic              sgn;
  logic [6:0]        mag;
  logic signed [7:0] v;
  int checks = 0, failures = 0;

  u_to_s dut (.sgn(sgn), .mag(mag), .v(v));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++)
      for (int m = 0; m < 128; m++) begin
        sgn = 1'(s);
        mag = 7'(m);
        #1;
        checks++;
        if (int'(v) != (s ? -m : m)) begin
          failures++;
          if (failures < 10) $display("s=%0d m=%0d: got %0d", s, m, v);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
