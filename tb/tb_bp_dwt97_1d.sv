// tb_bp_dwt97_1d: drives the bit-parallel 1-D engine with symmetrically extended
// random lines, one pair per cycle, and compares every low/high output with the
// floating-point lifting model. Also checks the five-cycle pipeline latency and
// that lines fed back to back do not disturb each other.
module tb_bp_dwt97_1d;
  import dwt_ref_pkg::*;
  localparam int DW = dwt_pkg::DATA_W;
  localparam int FB = dwt_pkg::FB;
  localparam int L  = 16;
  localparam int NP = L / 2 + 4;       // extended pairs per line
  localparam int NLINES = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_ready, in_valid, out_valid;
  logic signed [DW-1:0] in_even, in_odd, out_low, out_high;
  logic [15:0] in_tag, out_tag;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  bp_dwt97_1d #(.TAG_W(16)) dut (.*);

  real x[NLINES][];
  real lo[NLINES][], hi[NLINES][];
  int  issue_cyc[NLINES][NP];
  int  nout = 0;

  // Error bound: C4/C5 carry 12 fraction bits (relative error near 2^-13),
  // C2 only 14; every product is truncated at 2^-19.
  function automatic real tol(real ref_v);
    return 2.0 ** -12 + (2.0 ** -12) * rabs(ref_v);
  endfunction

  initial begin
    for (int l = 0; l < NLINES; l++) begin
      x[l] = new[L];
      for (int i = 0; i < L; i++)
        x[l][i] = (l < 3) ? real'($urandom_range(255)) / 256.0
                          : (real'($urandom_range(4000)) - 2000.0) / 1000.0;
      dwt97(x[l], lo[l], hi[l]);
    end
    in_valid = 0; in_even = '0; in_odd = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int l = 0; l < NLINES; l++) begin
      for (int m = 0; m < NP; m++) begin
        int p;
        p = m - 2;
        in_valid <= 1;
        in_even  <= DW'(r2fx(x[l][mirror(2 * p, L)], FB));
        in_odd   <= DW'(r2fx(x[l][mirror(2 * p + 1, L)], FB));
        in_tag   <= 16'(l * 256 + m);
        issue_cyc[l][m] = cyc;
        @(posedge clk);
      end
      // a bubble between some lines
      if (l == 2) begin in_valid <= 0; @(posedge clk); end
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (nout != NLINES * L / 2) begin failures++; $display("FAIL: %0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int l, m, n;
    real el, eh;
    l = int'(out_tag) / 256;
    m = int'(out_tag) % 256;
    if (m >= 4) begin
      n = m - 4;
      el = fx2r(longint'(out_low), FB) - lo[l][n];
      eh = fx2r(longint'(out_high), FB) - hi[l][n];
      checks += 3;
      if (rabs(el) > tol(lo[l][n])) begin failures++; $display("FAIL low l=%0d n=%0d err=%g", l, n, el); end
      if (rabs(eh) > tol(hi[l][n])) begin failures++; $display("FAIL high l=%0d n=%0d err=%g", l, n, eh); end
      if (cyc - issue_cyc[l][m] != 7) begin failures++; $display("FAIL latency %0d", cyc - issue_cyc[l][m]); end
      nout++;
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
