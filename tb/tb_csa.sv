// tb_csa: checks the carry-save adder on random and corner operands.
// For every input, sum must be the bitwise XOR, and sum + carry must equal
// a + b + c modulo 2^W.
module tb_csa;
  localparam int W = 16;
  logic [W-1:0] a, b, c, s, cy;
  int checks = 0, failures = 0;

  csa #(.W(W)) dut (.a(a), .b(b), .c(c), .sum(s), .carry(cy));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W-1:0] exp;
    #1;
    exp = a + b + c;
    checks++;
    if (W'(s + cy) != exp || s != (a ^ b ^ c)) begin
      failures++;
      $display("FAIL a=%h b=%h c=%h sum=%h carry=%h", a, b, c, s, cy);
    end
  endtask

  initial begin
    a = '1; b = '1; c = '1; check();
    a = '0; b = '0; c = '0; check();
    a = 16'h8000; b = 16'h8000; c = 16'h0001; check();
    for (int n = 0; n < 2000; n++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
