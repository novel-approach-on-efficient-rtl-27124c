// tb_dwt2d_proc: runs a small image (N = 32) through the 2-D processor built
// with each engine: the bit-parallel one for 3 levels and the digit-serial one
// for 2 levels at precision 12. Every coefficient is read back and compared with
// the floating-point multi-level model. The BP run is also checked against the
// expected cycle count: L/2 + 4 cycles per line, two passes per level, plus the
// pipeline drain of each pass.
module tb_dwt2d_proc;
  import dwt_ref_pkg::*;
  localparam int N  = 32;
  localparam int AW = 10;
  localparam int LV = 3;
  localparam int DW = dwt_pkg::data_w_for(LV);
  localparam int FB = dwt_pkg::FB;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic           load_en;
  logic [AW-1:0]  load_addr, rd_addr;
  logic [7:0]     load_pixel;
  logic           bp_start, ds_start;
  logic [1:0]     levels;
  logic [3:0]     precision;
  logic           bp_busy, bp_done, ds_busy, ds_done;
  logic [DW-1:0]  bp_rd, ds_rd;

  dwt2d_proc #(.N(N), .MAX_LEVELS(LV), .USE_DS(1'b0)) u_bp (
    .clk, .rst_n, .load_en, .load_addr, .load_pixel, .start(bp_start), .levels, .precision,
    .busy(bp_busy), .done(bp_done), .rd_addr, .rd_data(bp_rd));
  dwt2d_proc #(.N(N), .MAX_LEVELS(LV), .USE_DS(1'b1)) u_ds (
    .clk, .rst_n, .load_en, .load_addr, .load_pixel, .start(ds_start), .levels, .precision,
    .busy(ds_busy), .done(ds_done), .rd_addr, .rd_data(ds_rd));

  real img[], ref_bp[], ref_ds[];
  int  t0, t_bp, t_ds, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic compare(input string nm, input real r[], input int lv, input real tol);
    for (int a = 0; a < N * N; a++) begin
      real v, e;
      rd_addr <= AW'(a);
      @(posedge clk);
      @(posedge clk);
      #1;
      v = (nm == "BP") ? fx2r(longint'($signed(bp_rd)), FB) : fx2r(longint'($signed(ds_rd)), FB);
      e = v - r[a];
      checks++;
      if (rabs(e) > tol) begin
        failures++;
        if (failures < 10) $display("FAIL %s levels=%0d addr=%0d got=%f exp=%f", nm, lv, a, v, r[a]);
      end
    end
  endtask

  initial begin
    img = new[N * N];
    for (int a = 0; a < N * N; a++) img[a] = real'($urandom_range(255)) / 256.0;
    ref_bp = new[N * N](img);
    ref_ds = new[N * N](img);
    dwt2d(ref_bp, N, 3);
    dwt2d(ref_ds, N, 2);
    load_en = 0; load_addr = '0; load_pixel = '0; bp_start = 0; ds_start = 0; levels = 2'd3;
    precision = 4'd12; rd_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < N * N; a++) begin
      load_en <= 1; load_addr <= AW'(a); load_pixel <= 8'(int'(img[a] * 256.0));
      @(posedge clk);
    end
    load_en <= 0;
    // BP: 3 levels
    levels <= 2'd3; bp_start <= 1; @(posedge clk); bp_start <= 0; t0 = cyc;
    @(posedge clk iff bp_done); t_bp = cyc - t0;
    // DS: 2 levels (started after BP so the ports can be shared)
    levels <= 2'd2; ds_start <= 1; @(posedge clk); ds_start <= 0; t0 = cyc;
    @(posedge clk iff ds_done); t_ds = cyc - t0;
    compare("BP", ref_bp, 3, 2.0 ** -9);
    compare("DS", ref_ds, 2, 2.0 ** -8);
    begin
      int expect_bp;
      expect_bp = 0;
      for (int lv = 0; lv < 3; lv++) expect_bp += 2 * ((N >> lv) * ((N >> lv) / 2 + 4) + 8);
      checks++;
      if (t_bp < expect_bp - 6 || t_bp > expect_bp + 6) begin
        failures++; $display("FAIL BP cycles %0d expected about %0d", t_bp, expect_bp);
      end
      $display("BP cycles %0d (model %0d), DS cycles %0d", t_bp, expect_bp, t_ds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
