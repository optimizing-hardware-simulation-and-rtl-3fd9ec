// tb_dct_pp_sum: feeds the 22-CSA partial-product tree with random and
// corner vectors and checks the CLA output against the sum of all 24
// inputs modulo 2^W. Single-hot inputs make sure every one of the 24 inputs
// reaches the output.
module tb_dct_pp_sum;
  localparam int W = 18;
  logic [23:0][W-1:0] s;
  logic [W-1:0] sum;
  int checks = 0, failures = 0;

  dct_pp_sum #(.W(W)) dut (.s(s), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    logic [W-1:0] exp;
    #1;
    exp = '0;
    for (int n = 0; n < 24; n++) exp += s[n];
    checks++;
    if (sum != exp) begin
      failures++;
      $display("FAIL %s sum=%h exp=%h", what, sum, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 24; n++) begin
      s = '0;
      s[n] = W'(n + 1) << (n % 6);
      check("single");
    end
    s = '1; check("ones");
    for (int r = 0; r < 2000; r++) begin
      for (int n = 0; n < 24; n++) s[n] = W'($urandom);
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
