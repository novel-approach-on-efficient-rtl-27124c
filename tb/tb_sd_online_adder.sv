// tb_sd_online_adder: adds random signed-digit streams, one word per slot of
// S cycles with slots back to back, and rebuilds each sum from the output
// digits (weight 2^(3-t) at slot cycle t for inputs of weight 2^-t). The result
// must match x + y to within the digits dropped at the end of the slot.
module tb_sd_online_adder;
  localparam int S = 24, ND = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic first;
  dwt_pkg::sd_t x, y, z;
  int checks = 0, failures = 0;

  sd_online_adder dut (.*);

  function automatic dwt_pkg::sd_t rnd_sd();
    case ($urandom_range(2))
      0: return dwt_pkg::SD_NEG;
      1: return dwt_pkg::SD_ZERO;
      default: return dwt_pkg::SD_POS;
    endcase
  endfunction

  initial begin
    real xv, yv, zv, prev_sum;
    first = 1; x = '0; y = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev_sum = 0.0;
    for (int w = 0; w < 200; w++) begin
      xv = 0.0; yv = 0.0; zv = 0.0;
      for (int t = 0; t < S; t++) begin
        @(negedge clk);
        first = (t == 0);
        x = (t < ND) ? rnd_sd() : dwt_pkg::SD_ZERO;
        y = (t < ND) ? rnd_sd() : dwt_pkg::SD_ZERO;
        if (w > 2 && $urandom_range(9) == 0 && t < 3) begin x = dwt_pkg::SD_POS; y = dwt_pkg::SD_POS; end
        xv += real'(dwt_pkg::sd_val(x)) * 2.0 ** (-t);
        yv += real'(dwt_pkg::sd_val(y)) * 2.0 ** (-t);
        #1;
        zv += real'(dwt_pkg::sd_val(z)) * 2.0 ** (3 - t);
        if (t == 0) begin
          checks++;
          if (z != dwt_pkg::SD_ZERO) begin failures++; $display("FAIL: digit in slot cycle 0"); end
        end
      end
      checks++;
      if (zv - (xv + yv) > 2.0 ** (4 - S) || (xv + yv) - zv > 2.0 ** (4 - S)) begin
        failures++;
        $display("FAIL w=%0d x+y=%f z=%f", w, xv + yv, zv);
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
