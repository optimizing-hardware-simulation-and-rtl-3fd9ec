// tb_cla: checks the carry-lookahead adder at two widths, one a multiple of
// the 4-bit group (16) and one not (13), on corner and random operands
// against the + operator.
module tb_cla;
  logic [15:0] a16, b16, s16;
  logic [12:0] a13, b13, s13;
  int checks = 0, failures = 0;

  cla #(.W(16)) dut16 (.a(a16), .b(b16), .sum(s16));
  cla #(.W(13)) dut13 (.a(a13), .b(b13), .sum(s13));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    checks += 2;
    if (s16 != 16'(a16 + b16)) begin
      failures++;
      $display("FAIL16 %h + %h = %h", a16, b16, s16);
    end
    if (s13 != 13'(a13 + b13)) begin
      failures++;
      $display("FAIL13 %h + %h = %h", a13, b13, s13);
    end
  endtask

  initial begin
    a16 = 16'hffff; b16 = 16'h0001; a13 = 13'h1fff; b13 = 13'h0001; check();
    a16 = 16'h7fff; b16 = 16'h7fff; a13 = 13'h0fff; b13 = 13'h0fff; check();
    a16 = 16'h0f0f; b16 = 16'h00f1; a13 = 13'h00ff; b13 = 13'h0001; check();
    for (int n = 0; n < 3000; n++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      a13 = 13'($urandom); b13 = 13'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
