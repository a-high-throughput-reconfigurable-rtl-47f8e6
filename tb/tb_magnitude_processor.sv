// tb_magnitude_processor: random and corner magnitude sets against
// y_k = phi(min(127, sum_{i != k} phi(m_i))) computed with the reference phi.
// Also checks the min-like behaviour: an output never exceeds the smallest
// other input by more than one LSB of rounding.
module tb_magnitude_processor;
  import tb_ldpc_ref_pkg::*;
  logic [7:0][6:0] m, y;
  int checks = 0, failures = 0;

  magnitude_processor #(.DEG(8)) dut (.m(m), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_set();
    int f [8];
    int tot;
    #1;
    tot = 0;
    for (int i = 0; i < 8; i++) begin
      f[i] = ref_phi(int'(m[i]));
      tot += f[i];
    end
    for (int k = 0; k < 8; k++) begin
      int e, want, mn;
      e = tot - f[k];
      if (e > 127) e = 127;
      want = ref_phi(e);
      checks++;
      if (int'(y[k]) != want) begin
        failures++;
        if (failures < 10) $display("m=%p k=%0d: got %0d want %0d", m, k, y[k], want);
      end
      mn = 127;
      for (int i = 0; i < 8; i++) if (i != k && int'(m[i]) < mn) mn = int'(m[i]);
      checks++;
      if (mn < 40 && int'(y[k]) > mn + 2) begin
        failures++;
        $display("output %0d above the smallest other input %0d", y[k], mn);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < 2000; r++) begin
      for (int i = 0; i < 8; i++) m[i] = 7'($urandom_range(0, 127));
      check_set();
    end
    // all saturated: every other input is "certain"
    for (int i = 0; i < 8; i++) m[i] = 7'd127;
    check_set();
    // one weak input
    m[3] = 7'd5;
    check_set();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
