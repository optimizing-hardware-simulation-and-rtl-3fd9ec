// tb_dct_coef_mult: checks the AND-gate partial products of the constant
// multiplier for positive, negative and sparse weights. Each partial product
// k must be zero when bit k of |COEF| is clear and +/- operand * 2^k
// otherwise, and their sum must equal operand * COEF (modulo 2^W).
module tb_dct_coef_mult;
  localparam int BW = 9, CW = 6, W = BW + CW + 3;
  localparam int NC = 5;
  localparam int CS [NC] = '{63, -53, 12, -36, 45};
  logic [BW-1:0] i;
  logic [CW-1:0][W-1:0] pp [NC];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < NC; c++) begin : g_dut
    dct_coef_mult #(.BW(BW), .CW(CW), .COEF(CS[c]), .W(W)) dut (.i(i), .pp(pp[c]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int v);
    i = BW'(v);
    #1;
    for (int c = 0; c < NC; c++) begin
      int mag, sgnv;
      logic [W-1:0] tot;
      mag  = CS[c] < 0 ? -CS[c] : CS[c];
      sgnv = CS[c] < 0 ? -v : v;
      tot  = '0;
      for (int k = 0; k < CW; k++) begin
        logic [W-1:0] exp;
        exp = mag[k] ? W'(sgnv * (1 << k)) : '0;
        checks++;
        if (pp[c][k] != exp) begin
          failures++;
          $display("FAIL coef=%0d v=%0d k=%0d pp=%h exp=%h", CS[c], v, k, pp[c][k], exp);
        end
        tot += pp[c][k];
      end
      checks++;
      if (tot != W'(v * CS[c])) begin
        failures++;
        $display("FAIL coef=%0d v=%0d sum=%h", CS[c], v, tot);
      end
    end
  endtask

  initial begin
    for (int v = -256; v < 256; v++) apply(v);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
