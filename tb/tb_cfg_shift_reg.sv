// tb_cfg_shift_reg: feeds random data through the configurable shift register
// at several lengths, changed at run time, and checks q against the value
// driven 'len' cycles earlier.
module tb_cfg_shift_reg;
  localparam int W = 2, MAXLEN = 48;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [5:0] len;
  logic [W-1:0] d, q;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  cfg_shift_reg #(.W(W), .MAXLEN(MAXLEN)) dut (.*);

  initial begin
    int lens[5] = '{25, 28, 1, 48, 33};
    d = '0; len = 6'd25;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (lens[k]) begin
      len = 6'(lens[k]);
      hist.delete();
      for (int c = 0; c < 200; c++) begin
        @(negedge clk);
        if (hist.size() >= lens[k]) begin
          checks++;
          if (q !== hist[hist.size() - lens[k]]) begin
            failures++; $display("FAIL len=%0d c=%0d", lens[k], c);
          end
        end
        d = W'($urandom);
        hist.push_back(d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
