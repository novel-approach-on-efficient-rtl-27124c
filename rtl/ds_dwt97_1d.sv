// ds_dwt97_1d: digit-serial 1-D 9/7 DWT, flipping structure, on-line arithmetic.
//
// Words are processed as radix-2 signed digits, most significant digit first, one
// digit per cycle. A word slot lasts 'iter' cycles (the iteration count, set at
// run time); one sample pair enters and one (low, high) pair leaves per slot.
// in_ready is high in the last cycle of each slot: the pair offered then is held
// for the next slot and serialized (sd_serializer, sending in_ib integer digits).
//
// Every digit stream keeps the slot boundaries; what changes from stream to
// stream is the weight of its first digit, 2^H. An on-line adder raises H by 3,
// a constant multiplier by CIB + 2 (see sd_online_adder, sd_const_mult), a
// power-of-two scaling lowers it for free, and operands are brought to the same
// H by sd_align delays. The z^-1 neighbour terms are one-slot delays
// (cfg_shift_reg with length iter). With h = in_ib - 1 the nine stages are
//   1: M0 = C0*o[k-1] (h+2)          A0 = e[k-1] + e[k] (h+3)
//   2: d1[k-1] = M0 + A0 (h+6)
//   3: M1 = C1*e[k-1] (h+2)          A1 = (d1[k-2] + d1[k-1])/16 (h+5)
//   4: s1[k-1] = M1 + A1 (h+8)
//   5: M2 = C2*d1[k-2] (h+8)         A2 = (s1[k-2] + s1[k-1])/2 (h+10)
//   6: d2[k-2] = M2 + A2 (h+13)
//   7: M3 = C3*s1[k-2] (h+10)        A3 = (d2[k-3] + d2[k-2])/2 (h+15)
//   8: s2[k-2] = M3 + A3 (h+18)
//   9: low[k-2] = C5*s2 (h+22)       high[k-2] = C4*d2 (h+17)
// and sd_to_twos turns the two output streams back into words with FB fraction
// bits at the end of the slot. The pair leaving with the tag of input pair k is
// (low, high)[k-2], as in the bit-parallel engine. Each stage drops what falls
// past the end of the slot, so the low-pass output keeps iter - h - 23
// fraction digits: precision is set by the iteration count (dwt_pkg::ds_iter).
// The slot bookkeeping and the digit-level alignment are this design's own
// construction around the document's stage list.
module ds_dwt97_1d #(
  parameter int DATA_W   = dwt_pkg::DATA_W,
  parameter int TAG_W    = 8,
  parameter int ITER_MAX = dwt_pkg::ITER_MAX
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [5:0]               iter,
  input  logic [3:0]               in_ib,
  output logic                     in_ready,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_even,
  input  logic signed [DATA_W-1:0] in_odd,
  input  logic [TAG_W-1:0]         in_tag,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_low,
  output logic signed [DATA_W-1:0] out_high,
  output logic [TAG_W-1:0]         out_tag
);
  import dwt_pkg::sd_t;
  localparam int CW = 24;
  localparam logic signed [CW-1:0] K0 = CW'(dwt_pkg::quant(dwt_pkg::C0_R, dwt_pkg::DS_C0_FB));
  localparam logic signed [CW-1:0] K1 = CW'(dwt_pkg::quant(dwt_pkg::C1_R, dwt_pkg::DS_C1_FB));
  localparam logic signed [CW-1:0] K2 = CW'(dwt_pkg::quant(dwt_pkg::C2_R, dwt_pkg::DS_C2_FB));
  localparam logic signed [CW-1:0] K3 = CW'(dwt_pkg::quant(dwt_pkg::C3_R, dwt_pkg::DS_C3_FB));
  localparam logic signed [CW-1:0] K4 = CW'(dwt_pkg::quant(dwt_pkg::C4_R, dwt_pkg::DS_C4_FB));
  localparam logic signed [CW-1:0] K5 = CW'(dwt_pkg::quant(dwt_pkg::C5_R, dwt_pkg::DS_C5_FB));
  localparam int LENW = $clog2(ITER_MAX + 1);

  // Slot counter.
  logic [5:0] cyc;
  logic       first, last;
  assign first    = (cyc == '0);
  assign last     = (cyc >= iter - 6'd1);
  assign in_ready = last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cyc <= '0;
    else        cyc <= last ? '0 : cyc + 6'd1;
  end

  // Input hold registers (one word slot).
  logic [DATA_W-1:0] hold_e, hold_o;
  logic [TAG_W-1:0]  hold_tag;
  logic              hold_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_e <= '0; hold_o <= '0; hold_tag <= '0; hold_valid <= 1'b0;
    end else if (last) begin
      hold_e     <= in_valid ? in_even : '0;
      hold_o     <= in_valid ? in_odd  : '0;
      hold_tag   <= in_tag;
      hold_valid <= in_valid;
    end
  end

  sd_t e, o, e_d, o_d;
  sd_serializer #(.DATA_W(DATA_W), .FRAC(dwt_pkg::FB)) u_ser_e (.word(hold_e), .in_ib, .cyc, .digit(e));
  sd_serializer #(.DATA_W(DATA_W), .FRAC(dwt_pkg::FB)) u_ser_o (.word(hold_o), .in_ib, .cyc, .digit(o));
  cfg_shift_reg #(.W(2), .MAXLEN(ITER_MAX)) u_z_e (.clk, .rst_n, .len(LENW'(iter)), .d(e), .q(e_d));
  cfg_shift_reg #(.W(2), .MAXLEN(ITER_MAX)) u_z_o (.clk, .rst_n, .len(LENW'(iter)), .d(o), .q(o_d));

  // Stages 1-2: d1
  sd_t m0, a0, m0a, d1, d1_d;
  sd_const_mult #(.CW(CW), .CFB(dwt_pkg::DS_C0_FB), .CIB(0)) u_m0 (.clk, .rst_n, .coef(K0), .first, .x(o_d), .z(m0));
  sd_online_adder u_a0 (.clk, .rst_n, .first, .x(e_d), .y(e), .z(a0));
  sd_align #(.K(1)) u_al0 (.clk, .rst_n, .cyc, .d(m0), .q(m0a));
  sd_online_adder u_d1 (.clk, .rst_n, .first, .x(m0a), .y(a0), .z(d1));
  cfg_shift_reg #(.W(2), .MAXLEN(ITER_MAX)) u_z_d1 (.clk, .rst_n, .len(LENW'(iter)), .d(d1), .q(d1_d));

  // Stages 3-4: s1
  sd_t m1, a1, m1a, s1, s1_d;
  sd_const_mult #(.CW(CW), .CFB(dwt_pkg::DS_C1_FB), .CIB(0)) u_m1 (.clk, .rst_n, .coef(K1), .first, .x(e_d), .z(m1));
  sd_online_adder u_a1 (.clk, .rst_n, .first, .x(d1_d), .y(d1), .z(a1));
  sd_align #(.K(3)) u_al1 (.clk, .rst_n, .cyc, .d(m1), .q(m1a));
  sd_online_adder u_s1 (.clk, .rst_n, .first, .x(m1a), .y(a1), .z(s1));
  cfg_shift_reg #(.W(2), .MAXLEN(ITER_MAX)) u_z_s1 (.clk, .rst_n, .len(LENW'(iter)), .d(s1), .q(s1_d));

  // Stages 5-6: d2
  sd_t m2, a2, m2a, d2, d2_d;
  sd_const_mult #(.CW(CW), .CFB(dwt_pkg::DS_C2_FB), .CIB(0)) u_m2 (.clk, .rst_n, .coef(K2), .first, .x(d1_d), .z(m2));
  sd_online_adder u_a2 (.clk, .rst_n, .first, .x(s1_d), .y(s1), .z(a2));
  sd_align #(.K(2)) u_al2 (.clk, .rst_n, .cyc, .d(m2), .q(m2a));
  sd_online_adder u_d2 (.clk, .rst_n, .first, .x(m2a), .y(a2), .z(d2));
  cfg_shift_reg #(.W(2), .MAXLEN(ITER_MAX)) u_z_d2 (.clk, .rst_n, .len(LENW'(iter)), .d(d2), .q(d2_d));

  // Stages 7-8: s2
  sd_t m3, a3, m3a, s2;
  sd_const_mult #(.CW(CW), .CFB(dwt_pkg::DS_C3_FB), .CIB(0)) u_m3 (.clk, .rst_n, .coef(K3), .first, .x(s1_d), .z(m3));
  sd_online_adder u_a3 (.clk, .rst_n, .first, .x(d2_d), .y(d2), .z(a3));
  sd_align #(.K(5)) u_al3 (.clk, .rst_n, .cyc, .d(m3), .q(m3a));
  sd_online_adder u_s2 (.clk, .rst_n, .first, .x(m3a), .y(a3), .z(s2));

  // Stage 9: output scaling
  sd_t lo_sd, hi_sd;
  sd_const_mult #(.CW(CW), .CFB(dwt_pkg::DS_C5_FB), .CIB(2)) u_m5 (.clk, .rst_n, .coef(K5), .first, .x(s2), .z(lo_sd));
  sd_const_mult #(.CW(CW), .CFB(dwt_pkg::DS_C4_FB), .CIB(2)) u_m4 (.clk, .rst_n, .coef(K4), .first, .x(d2), .z(hi_sd));

  // Back to two's complement words.
  logic signed [7:0] sh_lo, sh_hi;
  assign sh_lo = 8'(dwt_pkg::FB + int'(in_ib) - 1 + dwt_pkg::DS_H_LOW  - int'(iter) + 1);
  assign sh_hi = 8'(dwt_pkg::FB + int'(in_ib) - 1 + dwt_pkg::DS_H_HIGH - int'(iter) + 1);
  logic lo_v, hi_v;
  sd_to_twos #(.DATA_W(DATA_W), .ITER_MAX(ITER_MAX)) u_p_lo (.clk, .rst_n, .first, .last, .digit(lo_sd), .shift(sh_lo), .word(out_low), .valid(lo_v));
  sd_to_twos #(.DATA_W(DATA_W), .ITER_MAX(ITER_MAX)) u_p_hi (.clk, .rst_n, .first, .last, .digit(hi_sd), .shift(sh_hi), .word(out_high), .valid(hi_v));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
    end else begin
      out_valid <= last && hold_valid;
      if (last) out_tag <= hold_tag;
    end
  end

  // Both converters close their words in the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n) lo_v == hi_v);
endmodule
