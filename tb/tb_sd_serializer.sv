// tb_sd_serializer: serializes random two's complement words with random
// integer-digit counts and rebuilds each value from the digits,
// sum d_t * 2^(in_ib-1-t); the result must equal the word exactly.
module tb_sd_serializer;
  localparam int DW = 28, FB = 19;
  logic [DW-1:0] word;
  logic [3:0]    in_ib;
  logic [5:0]    cyc;
  dwt_pkg::sd_t  digit;
  int checks = 0, failures = 0;

  sd_serializer #(.DATA_W(DW), .FRAC(FB)) dut (.*);

  initial begin
    for (int n = 0; n < 400; n++) begin
      longint v, acc;
      int ib;
      ib = 1 + int'($urandom_range(8));
      // random value that fits in ib integer bits (sign included)
      v = longint'($urandom_range(32'hffffffff)) % (64'sd1 <<< (ib - 1 + FB));
      if ($urandom_range(1)) v = -v;
      word = DW'(v);
      in_ib = 4'(ib);
      acc = 0;
      for (int t = 0; t < ib + FB + 4; t++) begin
        cyc = 6'(t);
        #1;
        // digit t has weight 2^(ib-1-t); scale everything by 2^FB
        acc = acc * 2 + longint'(dwt_pkg::sd_val(digit));
        if (t == 0 && digit == dwt_pkg::SD_POS) begin
          checks++; failures++; $display("FAIL: positive leading digit");
        end
      end
      // acc now carries 4 extra digit positions
      checks++;
      if (acc != v * 16) begin
        failures++;
        $display("FAIL v=%0d ib=%0d got=%0d", v, ib, acc / 16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
