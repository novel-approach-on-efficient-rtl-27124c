// tb_frame_mem: writes random words through both write ports, reads them back
// through both read ports against a testbench copy, and checks the one-cycle
// read latency and that read data hold while the enables are low.
module tb_frame_mem;
  localparam int DEPTH = 1024, W = 28, AW = 10;
  logic clk = 0;
  always #5 clk = ~clk;
  logic re0 = 0, re1 = 0, we0 = 0, we1 = 0;
  logic [AW-1:0] ra0 = '0, ra1 = '0, wa0 = '0, wa1 = '0;
  logic [W-1:0] rd0, rd1, wd0 = '0, wd1 = '0;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  frame_mem #(.DEPTH(DEPTH), .W(W)) dut (.*);

  initial begin
    @(posedge clk);
    for (int i = 0; i < DEPTH / 2; i++) begin
      we0 <= 1; wa0 <= AW'(2 * i);     wd0 <= W'($urandom); 
      we1 <= 1; wa1 <= AW'(2 * i + 1); wd1 <= W'($urandom);
      @(posedge clk);
      model[wa0] = wd0;
      model[wa1] = wd1;
    end
    we0 <= 0; we1 <= 0;
    for (int i = 0; i < 300; i++) begin
      logic [AW-1:0] a0, a1;
      a0 = AW'($urandom); a1 = AW'($urandom);
      re0 <= 1; ra0 <= a0; re1 <= 1; ra1 <= a1;
      @(posedge clk);
      re0 <= 0; re1 <= 0;
      @(posedge clk);  // data registered at the previous edge; hold now
      #1;
      checks += 2;
      if (rd0 !== model[a0]) begin failures++; $display("FAIL rd0 a=%0d", a0); end
      if (rd1 !== model[a1]) begin failures++; $display("FAIL rd1 a=%0d", a1); end
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
