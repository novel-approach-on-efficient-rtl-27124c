// tb_sd_const_mult: multiplies random signed-digit streams by two constants of
// the DWT (C0, |C0| < 1, and C5, |C5| < 4) and rebuilds each product from the
// output digits (weight 2^(CIB+2-t) at slot cycle t). The result must match
// C * x to within the digits dropped at the end of the slot.
module tb_sd_const_mult;
  localparam int S = 26, ND = 16, CW = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic first;
  dwt_pkg::sd_t x, z0, z5;
  localparam logic signed [CW-1:0] K0 = CW'(dwt_pkg::quant(dwt_pkg::C0_R, 16));
  localparam logic signed [CW-1:0] K5 = CW'(dwt_pkg::quant(dwt_pkg::C5_R, 18));
  int checks = 0, failures = 0;

  sd_const_mult #(.CW(CW), .CFB(16), .CIB(0)) dut0 (.clk, .rst_n, .coef(K0), .first, .x, .z(z0));
  sd_const_mult #(.CW(CW), .CFB(18), .CIB(2)) dut5 (.clk, .rst_n, .coef(K5), .first, .x, .z(z5));

  initial begin
    real xv, p0, p5, c0, c5;
    c0 = real'(K0) / 2.0 ** 16;
    c5 = real'(K5) / 2.0 ** 18;
    first = 1; x = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 200; w++) begin
      xv = 0.0; p0 = 0.0; p5 = 0.0;
      for (int t = 0; t < S; t++) begin
        @(negedge clk);
        first = (t == 0);
        case ((t < ND) ? $urandom_range(2) : 1)
          0: x = dwt_pkg::SD_NEG;
          1: x = dwt_pkg::SD_ZERO;
          default: x = dwt_pkg::SD_POS;
        endcase
        xv += real'(dwt_pkg::sd_val(x)) * 2.0 ** (-t);
        #1;
        p0 += real'(dwt_pkg::sd_val(z0)) * 2.0 ** (2 - t);
        p5 += real'(dwt_pkg::sd_val(z5)) * 2.0 ** (4 - t);
      end
      checks += 2;
      if (p0 - c0 * xv > 2.0 ** (3 - S) || c0 * xv - p0 > 2.0 ** (3 - S)) begin
        failures++; $display("FAIL C0 w=%0d exp=%f got=%f", w, c0 * xv, p0);
      end
      if (p5 - c5 * xv > 2.0 ** (5 - S) || c5 * xv - p5 > 2.0 ** (5 - S)) begin
        failures++; $display("FAIL C5 w=%0d exp=%f got=%f", w, c5 * xv, p5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
