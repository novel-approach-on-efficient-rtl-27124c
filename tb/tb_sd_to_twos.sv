// tb_sd_to_twos: feeds random signed-digit words (slot of S cycles, slots back
// to back) with different output scalings and checks each registered word
// against the digit sum computed in the testbench, shifted the same way.
module tb_sd_to_twos;
  localparam int S = 30, DW = 28;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic first, last, valid;
  dwt_pkg::sd_t digit;
  logic signed [7:0] shift;
  logic signed [DW-1:0] word;
  int checks = 0, failures = 0;

  sd_to_twos #(.DATA_W(DW), .ITER_MAX(48)) dut (.*);

  initial begin
    longint acc, expv;
    int sh;
    first = 0; last = 0; digit = '0; shift = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 300; w++) begin
      sh = int'($urandom_range(12)) - 6;
      acc = 0;
      for (int t = 0; t < S; t++) begin
        @(negedge clk);
        first = (t == 0);
        last  = (t == S - 1);
        shift = 8'(sh);
        case ($urandom_range(2))
          0: digit = dwt_pkg::SD_NEG;
          1: digit = dwt_pkg::SD_ZERO;
          default: digit = dwt_pkg::SD_POS;
        endcase
        // keep the value inside the word: only the last 18 digits are random
        if (t < S - 18) digit = dwt_pkg::SD_ZERO;
        acc = acc * 2 + longint'(dwt_pkg::sd_val(digit));
      end
      expv = (sh >= 0) ? (acc <<< sh) : (acc >>> (-sh));
      @(negedge clk);
      first = 1; last = 0; digit = dwt_pkg::SD_ZERO;
      checks += 2;
      if (!valid) begin failures++; $display("FAIL: no valid pulse"); end
      if (longint'(word) != expv) begin failures++; $display("FAIL w=%0d got=%0d exp=%0d", w, word, expv); end
      @(negedge clk);
      checks++;
      if (valid) begin failures++; $display("FAIL: valid longer than one cycle"); end
      first = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
