// tb_dct_1d: checks the 8-point 1D-DCT at both stage widths used by the 2D
// transform: 8-bit inputs with 12-bit outputs and 12-bit inputs with 16-bit
// outputs. Random and full-scale vectors are applied with random gaps in
// in_valid; every output must appear exactly one clock after its input
// (out_valid follows in_valid by one clock) and equal the direct 8-term
// reference floor(sum_i x_i*w(p,i)/64).
module tb_dct_1d;
  import dct_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [7:0][7:0]  xa;
  logic [7:0][11:0] xb;
  logic va, vb;
  logic [7:0][11:0] za;
  logic [7:0][15:0] zb;
  int checks = 0, failures = 0;
  int pa[8], pb[8];     // expected results of the previous clock
  logic pv;             // previous clock had in_valid

  always #5 clk = ~clk;

  dct_1d #(.IW(8))  dut_a (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(xa), .out_valid(va), .z(za));
  dct_1d #(.IW(12)) dut_b (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(xb), .out_valid(vb), .z(zb));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xv[8], yv[8];
    in_valid = 0; xa = '0; xb = '0; pv = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // check what the previous input produced
      checks += 2;
      if (va !== pv || vb !== pv) begin
        failures++;
        $display("FAIL valid timing n=%0d va=%b vb=%b exp %b", n, va, vb, pv);
      end
      if (pv) begin
        for (int p = 0; p < 8; p++) begin
          checks += 2;
          if ($signed(za[p]) != pa[p]) begin
            failures++;
            $display("FAIL 8-bit p=%0d z=%0d exp=%0d", p, $signed(za[p]), pa[p]);
          end
          if ($signed(zb[p]) != pb[p]) begin
            failures++;
            $display("FAIL 12-bit p=%0d z=%0d exp=%0d", p, $signed(zb[p]), pb[p]);
          end
        end
      end
      // new input
      in_valid = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < 8; i++) begin
        case (n % 50)
          0: begin xv[i] = -128;               yv[i] = -2048; end
          1: begin xv[i] = 127;                yv[i] = 2047;  end
          2: begin xv[i] = i[0] ? -128 : 127;  yv[i] = i[0] ? -2048 : 2047; end
          default: begin
            xv[i] = int'($urandom_range(0, 255)) - 128;
            yv[i] = int'($urandom_range(0, 4095)) - 2048;
          end
        endcase
        xa[i] = 8'(xv[i]);
        xb[i] = 12'(yv[i]);
      end
      dct1(xv, pa);
      dct1(yv, pb);
      pv = in_valid;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
