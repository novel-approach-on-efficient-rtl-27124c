// tb_ds_dwt97_1d: drives the digit-serial 1-D engine with symmetrically extended
// random lines, one pair per word slot, at two run-time iteration counts, and
// compares every output with the floating-point lifting model within the
// precision the iteration count gives. Also checks that results leave exactly
// one word slot apart (the throughput).
module tb_ds_dwt97_1d;
  import dwt_ref_pkg::*;
  localparam int DW = dwt_pkg::DATA_W;
  localparam int FB = dwt_pkg::FB;
  localparam int L  = 16;
  localparam int NP = L / 2 + 4;
  localparam int NLINES = 4;
  localparam int IB = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [5:0] iter;
  logic [3:0] in_ib = 4'(IB);
  logic in_ready, in_valid, out_valid;
  logic signed [DW-1:0] in_even, in_odd, out_low, out_high;
  logic [15:0] in_tag, out_tag;
  int checks = 0, failures = 0;
  int cyc = 0, last_out = -1, nout = 0, run = 0;
  real tol;
  always @(posedge clk) cyc <= cyc + 1;

  ds_dwt97_1d #(.TAG_W(16)) dut (.*);

  real x[NLINES][];
  real lo[NLINES][], hi[NLINES][];

  task automatic run_lines(input int it);
    iter = 6'(it);
    // low-pass keeps it - (IB-1) - 23 fraction digits
    tol = 2.0 ** (-(it - (IB - 1) - 23) + 2);
    last_out = -1;
    for (int l = 0; l < NLINES; l++) begin
      for (int m = 0; m < NP; m++) begin
        int p;
        p = m - 2;
        in_valid <= 1;
        in_even  <= DW'(r2fx(x[l][mirror(2 * p, L)], FB));
        in_odd   <= DW'(r2fx(x[l][mirror(2 * p + 1, L)], FB));
        in_tag   <= 16'(l * 256 + m);
        @(posedge clk iff in_ready);
      end
    end
    in_valid <= 0;
    repeat (4 * it) @(posedge clk);
  endtask

  initial begin
    for (int l = 0; l < NLINES; l++) begin
      x[l] = new[L];
      for (int i = 0; i < L; i++)
        x[l][i] = (l < 2) ? real'($urandom_range(255)) / 256.0
                          : (real'($urandom_range(3800)) - 1900.0) / 1000.0;
      dwt97(x[l], lo[l], hi[l]);
    end
    in_valid = 0; in_even = '0; in_odd = '0; in_tag = '0; iter = 6'd34;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_lines(34);
    checks++;
    if (nout != NLINES * L / 2) begin failures++; $display("FAIL: %0d outputs at iter 34", nout); end
    nout = 0;
    run = 1;
    run_lines(40);
    checks++;
    if (nout != NLINES * L / 2) begin failures++; $display("FAIL: %0d outputs at iter 40", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int l, m, n;
    real el, eh;
    l = int'(out_tag) / 256;
    m = int'(out_tag) % 256;
    if (last_out >= 0) begin
      checks++;
      if (cyc - last_out != int'(iter)) begin failures++; $display("FAIL spacing %0d", cyc - last_out); end
    end
    last_out = cyc;
    if (m >= 4) begin
      n = m - 4;
      el = fx2r(longint'(out_low), FB) - lo[l][n];
      eh = fx2r(longint'(out_high), FB) - hi[l][n];
      checks += 2;
      if (rabs(el) > tol) begin failures++; $display("FAIL low run=%0d l=%0d n=%0d err=%g", run, l, n, el); end
      if (rabs(eh) > tol) begin failures++; $display("FAIL high run=%0d l=%0d n=%0d err=%g", run, l, n, eh); end
      nout++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
