// tb_dwt2d_ctrl: exercises the pass controller with behavioural memories and a
// stand-in engine that performs the "lazy" transform (low = even sample,
// high = odd sample) with the same tag contract as the real engines and a
// randomly stalling ready. Memory A starts with each word equal to its own
// address, so the testbench can check every pair the controller reads,
// including the mirrored ones at the line ends, and compare the final memory
// with a 3-level lazy decomposition computed here from index arithmetic. It also
// checks the per-pass integer-digit and iteration outputs.
module tb_dwt2d_ctrl;
  localparam int N = 32, MAXL = 3, DW = 28, AW = 10, LW = 5, TW = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, busy, done;
  logic [1:0] levels = 2'd3;
  logic [3:0] precision = 4'd8;
  logic rd_en, rd_bank, wr_en, wr_bank;
  logic [AW-1:0] rd_addr0, rd_addr1, wr_addr0, wr_addr1;
  logic [DW-1:0] rd_data0, rd_data1, wr_data0, wr_data1;
  logic eng_in_ready, eng_in_valid, eng_out_valid;
  logic [DW-1:0] eng_in_even, eng_in_odd, eng_out_low, eng_out_high;
  logic [TW-1:0] eng_in_tag, eng_out_tag;
  logic [5:0] eng_iter;
  logic [3:0] eng_in_ib;

  dwt2d_ctrl #(.N(N), .MAX_LEVELS(MAXL), .DATA_W(DW)) dut (.*);

  // behavioural memories
  logic [DW-1:0] mem [2][N * N];
  always_ff @(posedge clk) begin
    if (rd_en) begin
      rd_data0 <= mem[rd_bank][rd_addr0];
      rd_data1 <= mem[rd_bank][rd_addr1];
    end
    if (wr_en) begin
      mem[wr_bank][wr_addr0] <= wr_data0;
      mem[wr_bank][wr_addr1] <= wr_data1;
    end
  end

  // stand-in engine: result for tag m is the pair accepted two pairs earlier
  logic [DW-1:0] he [3], ho [3];
  int stalls = 0, mirrors = 0;
  always_ff @(posedge clk) begin
    eng_in_ready  <= ($urandom_range(3) != 0);
    eng_out_valid <= 1'b0;
    if (eng_in_valid && eng_in_ready) begin
      he[0] <= eng_in_even; ho[0] <= eng_in_odd;
      he[1] <= he[0]; ho[1] <= ho[0];
      he[2] <= he[1]; ho[2] <= ho[1];
      eng_out_valid <= 1'b1;
      eng_out_low   <= he[1];
      eng_out_high  <= ho[1];
      eng_out_tag   <= eng_in_tag;
    end
    if (eng_in_valid && !eng_in_ready) stalls++;
  end

  function automatic int mir(int j, int n);
    if (j < 0) j = -j;
    if (j > n - 1) j = 2 * (n - 1) - j;
    return j;
  endfunction

  // check the pairs read in the first (row) pass
  always @(posedge clk) if (busy && dut.pass == 0 && eng_in_valid && eng_in_ready) begin
    int ln, m, p;
    ln = int'(eng_in_tag[TW-1:LW]);
    m  = int'(eng_in_tag[LW-1:0]);
    p  = 2 * (m - 2);
    checks++;
    if (eng_in_even != DW'(ln * N + mir(p, N)) || eng_in_odd != DW'(ln * N + mir(p + 1, N))) begin
      failures++; $display("FAIL pair line=%0d m=%0d", ln, m);
    end
    if (p < 0 || p + 1 > N - 1) mirrors++;
  end

  // check the per-pass DS configuration (sampled away from the clock edge)
  always @(negedge clk) if (busy) begin
    int ps, ib;
    ps = int'(dut.pass);
    ib = 2 + ps;
    if (eng_in_ib != 4'(ib) || eng_iter != 6'(ib - 1 + 23 + 8)) begin
      checks++; failures++; $display("FAIL config pass %0d: ib=%0d iter=%0d", ps, eng_in_ib, eng_iter);
    end
  end

  int expct [N * N];
  initial begin
    int tmp [N * N];
    for (int a = 0; a < N * N; a++) begin mem[0][a] = DW'(a); mem[1][a] = '0; expct[a] = a; end
    // lazy transform model
    for (int lv = 0; lv < MAXL; lv++) begin
      int len;
      len = N >> lv;
      tmp = expct;
      for (int r = 0; r < len; r++)
        for (int c = 0; c < len / 2; c++) begin
          tmp[r * N + c] = expct[r * N + 2 * c];
          tmp[r * N + len / 2 + c] = expct[r * N + 2 * c + 1];
        end
      expct = tmp;
      for (int c = 0; c < len; c++)
        for (int r = 0; r < len / 2; r++) begin
          tmp[r * N + c] = expct[(2 * r) * N + c];
          tmp[(len / 2 + r) * N + c] = expct[(2 * r + 1) * N + c];
        end
      expct = tmp;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    @(posedge clk iff done);
    repeat (2) @(posedge clk);
    for (int a = 0; a < N * N; a++) begin
      checks++;
      if (mem[0][a] != DW'(expct[a])) begin
        failures++;
        if (failures < 10) $display("FAIL A[%0d]=%0d expected %0d", a, mem[0][a], expct[a]);
      end
    end
    checks++;
    if (stalls == 0 || mirrors == 0) begin failures++; $display("FAIL: no stall or no mirror seen"); end
    $display("stalls=%0d mirrored pairs=%0d", stalls, mirrors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
