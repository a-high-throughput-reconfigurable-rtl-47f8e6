// tb_row_column_processor: random rows against an integer model of the merged
// row-column update: x = Z - Y, Y' = sign * phi(sum_{i!=n} phi(min(|x_i|,127)))
// with disabled slots contributing nothing, Z' = sat10(x + Y'), and the
// parity of the signs of the updated Z'. Also runs a consistent row
// (even number of negative LLRs) and an inconsistent one.
module tb_row_column_processor;
  import ldpc_pkg::*;
  import tb_ldpc_ref_pkg::*;
  logic [7:0]                  en;
  logic signed [7:0][9:0]      z, zn;
  logic signed [7:0][7:0]      y, yn;
  logic                        pok, psg;
  int checks = 0, failures = 0;

  row_column_processor #(.DEG(8)) dut (
    .en(en), .z(z), .y(y), .z_new(zn), .y_new(yn), .parity_ok(pok), .sign_parity(psg));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_row();
    int x [8], mg [8], f [8], tot, par, hard;
    bit sg [8];
    #1;
    tot = 0;
    par = 0;
    for (int i = 0; i < 8; i++) begin
      x[i]  = int'($signed(z[i])) - int'($signed(y[i]));
      sg[i] = en[i] && (x[i] < 0);
      mg[i] = en[i] ? ((x[i] < 0 ? -x[i] : x[i]) > 127 ? 127 : (x[i] < 0 ? -x[i] : x[i])) : 127;
      f[i]  = ref_phi(mg[i]);
      tot  += f[i];
      par  ^= int'(sg[i]);
    end
    checks++;
    if (psg !== 1'(par)) failures++;
    hard = 0;
    for (int k = 0; k < 8; k++) begin
      int e, ym, yv, zv;
      e  = tot - f[k];
      if (e > 127) e = 127;
      ym = ref_phi(e);
      yv = (par ^ int'(sg[k])) ? -ym : ym;
      zv = x[k] + yv;
      if (zv > 511) zv = 511;
      if (zv < -511) zv = -511;
      checks += 2;
      if (int'($signed(yn[k])) != yv) begin
        failures++;
        if (failures < 10) $display("k=%0d: y' got %0d want %0d", k, yn[k], yv);
      end
      if (int'($signed(zn[k])) != zv) begin
        failures++;
        if (failures < 10) $display("k=%0d: z' got %0d want %0d", k, zn[k], zv);
      end
      if (en[k] && zv < 0) hard ^= 1;
    end
    checks++;
    if (pok !== (hard == 0)) failures++;
  endtask

  initial begin
    for (int r = 0; r < 3000; r++) begin
      en = (r % 3 == 0) ? 8'h7f : 8'hff;
      for (int i = 0; i < 8; i++) begin
        z[i] = 10'($urandom_range(0, 1022) - 511);
        y[i] = 8'($urandom_range(0, 254) - 127);
        if (r % 4 == 1) begin
          z[i] = 10'($urandom_range(0, 120) - 60);
          y[i] = 8'($urandom_range(0, 40) - 20);
        end
      end
      check_row();
    end
    // consistent row: two negative LLRs, no previous messages
    en = 8'hff;
    for (int i = 0; i < 8; i++) begin
      z[i] = (i == 2 || i == 5) ? -10'sd40 : 10'sd40;
      y[i] = '0;
    end
    check_row();
    checks++;
    if (!pok) failures++;
    // inconsistent row: one negative LLR
    z[5] = 10'sd40;
    check_row();
    checks++;
    if (pok) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
