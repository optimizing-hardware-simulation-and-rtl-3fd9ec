// tb_dct_vi_unit: checks the seven weighted-sum units of one 1D-DCT stage
// (rows p = 1..7, 9-bit operands, 12-bit results). Every unit gets the
// same four operands I0..I3; the expected Z_p is floor(sum_m I_m*w(p,m)/64)
// with w computed from $cos in the reference package. Operands include the
// full-scale corners and random values.
module tb_dct_vi_unit;
  import dct_ref_pkg::*;
  localparam int BW = 9, OW = 12;
  logic [3:0][BW-1:0] i;
  logic [OW-1:0] z [1:7];
  int checks = 0, failures = 0;
  int iv[4];

  for (genvar p = 1; p < 8; p++) begin : g_dut
    dct_vi_unit #(.P(p), .BW(BW), .CW(6), .OW(OW)) dut (.i(i), .z(z[p]));
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply();
    for (int m = 0; m < 4; m++) i[m] = BW'(iv[m]);
    #1;
    for (int p = 1; p < 8; p++) begin
      int acc, exp;
      acc = 0;
      for (int m = 0; m < 4; m++) acc += iv[m] * w(p, m);
      exp = fdiv64(acc);
      checks++;
      if ($signed(z[p]) != exp) begin
        failures++;
        $display("FAIL p=%0d I=%0d %0d %0d %0d z=%0d exp=%0d", p, iv[0], iv[1], iv[2], iv[3],
                 $signed(z[p]), exp);
      end
    end
  endtask

  initial begin
    int lo, hi;
    lo = -(1 << (BW - 1));
    hi = (1 << (BW - 1)) - 1;
    for (int c = 0; c < 16; c++) begin
      for (int m = 0; m < 4; m++) iv[m] = c[m] ? lo : hi;
      apply();
    end
    for (int n = 0; n < 3000; n++) begin
      for (int m = 0; m < 4; m++) iv[m] = int'($urandom_range(0, (1 << BW) - 1)) + lo;
      apply();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
