// tb_dct_butterfly: drives the sum/difference cells with corner and random
// signed 8-bit samples and checks s_i = x_i + x_(7-i), d_i = x_i - x_(7-i)
// as signed 9-bit results.
module tb_dct_butterfly;
  logic [7:0][7:0] x;
  logic [3:0][8:0] s, d;
  int checks = 0, failures = 0;
  int xv[8];

  dct_butterfly #(.IW(8)) dut (.x(x), .s(s), .d(d));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply();
    for (int i = 0; i < 8; i++) x[i] = 8'(xv[i]);
    #1;
    for (int i = 0; i < 4; i++) begin
      checks += 2;
      if ($signed(s[i]) != xv[i] + xv[7-i]) begin
        failures++;
        $display("FAIL s[%0d]=%0d exp %0d", i, $signed(s[i]), xv[i] + xv[7-i]);
      end
      if ($signed(d[i]) != xv[i] - xv[7-i]) begin
        failures++;
        $display("FAIL d[%0d]=%0d exp %0d", i, $signed(d[i]), xv[i] - xv[7-i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) xv[i] = (i < 4) ? -128 : 127;
    apply();
    for (int i = 0; i < 8; i++) xv[i] = (i < 4) ? 127 : -128;
    apply();
    for (int i = 0; i < 8; i++) xv[i] = -128;
    apply();
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < 8; i++) xv[i] = int'($urandom_range(0, 255)) - 128;
      apply();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
