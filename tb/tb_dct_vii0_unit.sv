// tb_dct_vii0_unit: checks the row-0 unit of one 1D-DCT stage (13-bit
// operands, 16-bit result): z must be I0 + I1 + I2 + I3 exactly, for
// full-scale corners and random operands.
module tb_dct_vii0_unit;
  localparam int BW = 13, OW = 16;
  logic [3:0][BW-1:0] i;
  logic [OW-1:0] z;
  int checks = 0, failures = 0;
  int iv[4];

  dct_vi0_unit #(.BW(BW), .OW(OW)) dut (.i(i), .z(z));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply();
    int exp;
    for (int m = 0; m < 4; m++) i[m] = BW'(iv[m]);
    #1;
    exp = iv[0] + iv[1] + iv[2] + iv[3];
    checks++;
    if ($signed(z) != exp) begin
      failures++;
      $display("FAIL I=%0d %0d %0d %0d z=%0d exp=%0d", iv[0], iv[1], iv[2], iv[3], $signed(z), exp);
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
