// tb_dwt2d_full: both processors of dwt2d_top at their default size, a
// 512 x 512 image of 8-bit pixels and a four-level transform, the digit-serial
// one at precision 8. Every coefficient is read back through the top's ports and
// compared with the floating-point model; the bit-parallel cycle count is
// checked against L/2 + 4 cycles per line plus a short drain per pass. Counts how often
// each mechanism of the design occurs and fails if one never does: symmetric
// extension at the left and right line ends, row/column direction switches,
// level changes, memory ping-pong, the DS engine holding off the controller
// (ready low), and a run-time change of the DS iteration count.
module tb_dwt2d_full;
  import dwt_ref_pkg::*;
  localparam int N  = 512;
  localparam int LV = 4;
  localparam int AW = $clog2(N * N);
  localparam int DW = dwt_pkg::DATA_W;
  localparam int FB = dwt_pkg::FB;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic          load_en = 0;
  logic [AW-1:0] load_addr = '0, rd_addr = '0;
  logic [7:0]    load_pixel = '0;
  logic          bp_start = 0, ds_start = 0;
  logic [2:0]    levels = 3'(LV);
  logic [3:0]    ds_precision = 4'd8;
  logic          bp_busy, bp_done, ds_busy, ds_done;
  logic [DW-1:0] bp_rd_data, ds_rd_data;

  dwt2d_top dut (
    .clk, .rst_n,
    .bp_load_en(load_en), .bp_load_addr(load_addr), .bp_load_pixel(load_pixel),
    .bp_start, .bp_levels(levels), .bp_busy, .bp_done, .bp_rd_addr(rd_addr), .bp_rd_data,
    .ds_load_en(load_en), .ds_load_addr(load_addr), .ds_load_pixel(load_pixel),
    .ds_start, .ds_levels(levels), .ds_precision, .ds_busy, .ds_done,
    .ds_rd_addr(rd_addr), .ds_rd_data);

  // mechanism counters
  int n_mirror_l = 0, n_mirror_r = 0, n_dir_switch = 0, n_level_change = 0;
  int n_pingpong = 0, n_ds_hold = 0, n_iter_change = 0;
  logic [3:0] bp_pass_q, ds_pass_q;
  logic [5:0] iter_q;
  always @(posedge clk) begin
    if (dut.u_bp.busy && dut.u_bp.u_ctrl.rd_en) begin
      if (dut.u_bp.u_ctrl.pos_even < 0) n_mirror_l++;
      if (dut.u_bp.u_ctrl.pos_even + 1 > $signed({1'b0, dut.u_bp.u_ctrl.len}) - 1) n_mirror_r++;
    end
    if (dut.u_bp.busy && dut.u_bp.u_ctrl.pass != bp_pass_q) begin
      if (dut.u_bp.u_ctrl.pass[0] != bp_pass_q[0]) n_dir_switch++;
      if (dut.u_bp.u_ctrl.pass[3:1] != bp_pass_q[3:1]) n_level_change++;
      if (dut.u_bp.u_ctrl.rd_bank != bp_pass_q[0]) n_pingpong++;
    end
    bp_pass_q <= dut.u_bp.u_ctrl.pass;
    if (dut.u_ds.busy && dut.u_ds.e_in_valid && !dut.u_ds.e_in_ready) n_ds_hold++;
    if (dut.u_ds.busy && dut.u_ds.e_iter != iter_q) n_iter_change++;
    iter_q <= dut.u_ds.e_iter;
  end

  real img[], ref_c[];
  real maxerr;
  localparam real TOL_BP = 2.0 ** -8;
  localparam real TOL_DS = 2.0 ** -5;

  task automatic readback(input bit ds, input real tol);
    maxerr = 0.0;
    for (int a = 0; a < N * N; a++) begin
      real v, e;
      rd_addr <= AW'(a);
      @(posedge clk); @(posedge clk); #1;
      v = fx2r(longint'($signed(ds ? ds_rd_data : bp_rd_data)), FB);
      e = rabs(v - ref_c[a]);
      if (e > maxerr) maxerr = e;
      checks++;
      if (e > tol) begin
        failures++;
        if (failures < 10) $display("FAIL %s addr=%0d got=%f exp=%f", ds ? "DS" : "BP", a, v, ref_c[a]);
      end
    end
  endtask

  initial begin
    int t0, t_bp, t_ds, expect_bp;
    img = new[N * N];
    for (int a = 0; a < N * N; a++) img[a] = real'($urandom_range(255)) / 256.0;
    ref_c = new[N * N](img);
    dwt2d(ref_c, N, LV);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < N * N; a++) begin
      load_en <= 1; load_addr <= AW'(a); load_pixel <= 8'(int'(img[a] * 256.0));
      @(posedge clk);
    end
    load_en <= 0;

    bp_start <= 1; @(posedge clk); bp_start <= 0; t0 = cyc;
    @(posedge clk iff bp_done); t_bp = cyc - t0;
    readback(0, TOL_BP);
    $display("BP: %0d cycles, max error %g", t_bp, maxerr);
    expect_bp = 0;
    for (int lv = 0; lv < LV; lv++) expect_bp += 2 * ((N >> lv) * ((N >> lv) / 2 + 4) + 8);
    checks++;
    if (t_bp < expect_bp - 6 || t_bp > expect_bp + 6) begin
      failures++; $display("FAIL BP cycles %0d, expected about %0d", t_bp, expect_bp);
    end

    ds_precision <= 4'd8;
    ds_start <= 1; @(posedge clk); ds_start <= 0; t0 = cyc;
    @(posedge clk iff ds_done); t_ds = cyc - t0;
    readback(1, TOL_DS);
    $display("DS precision 8: %0d cycles, max error %g", t_ds, maxerr);

    $display("mirror left=%0d right=%0d dir switches=%0d level changes=%0d ping-pong=%0d ds holds=%0d iter changes=%0d",
             n_mirror_l, n_mirror_r, n_dir_switch, n_level_change, n_pingpong, n_ds_hold, n_iter_change);
    checks += 7;
    if (n_mirror_l == 0) failures++;
    if (n_mirror_r == 0) failures++;
    if (n_dir_switch == 0) failures++;
    if (n_level_change == 0) failures++;
    if (n_pingpong == 0) failures++;
    if (n_ds_hold == 0) failures++;
    if (n_iter_change == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
