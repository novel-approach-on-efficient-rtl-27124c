// bp_dwt97_1d: bit-parallel 1-D 9/7 discrete wavelet transform, flipping structure.
//
// One sample pair (x[2k], x[2k+1]) enters per cycle; the pipeline advances every
// cycle, so consecutive pairs of a line must arrive on consecutive cycles. The
// five stages evaluate the flipped lifting steps (constants from dwt_pkg):
//   stage 1: d1[k-1] = C0*x[2k-1] + x[2k-2] + x[2k]
//   stage 2: s1[k-1] = C1*x[2k-2] + (d1[k-2] + d1[k-1]) * 2^-4
//   stage 3: d2[k-2] = C2*d1[k-2] + (s1[k-2] + s1[k-1]) * 2^-1
//   stage 4: s2[k-2] = C3*s1[k-2] + (d2[k-3] + d2[k-2]) * 2^-1
//   stage 5: low[k-2] = C5*s2[k-2],  high[k-2] = C4*d2[k-2]
// so every stage has one constant multiplier and an adder on its path, which is
// the point of the flipping structure. The pair that leaves together with the tag
// of input pair k is (low, high)[k-2]. The caller feeds
// the symmetrically extended line so that the first outputs of a line can be
// discarded (see dwt2d_ctrl). Inputs are registered first, so a result appears
// on the outputs six clock edges after its last input pair was sampled.
//
// Word formats: inputs and outputs are two's complement with FB fraction bits;
// internally GUARD extra integer bits hold the larger flipped intermediates.
// Constants use the per-constant fraction widths of the precision analysis
// (C0..C5: 15, 18, 14, 19, 12, 12 bits); products are truncated to FB bits.
// The single internal width, sized for the deepest level, is a choice of this
// design: one engine serves every level and direction.
module bp_dwt97_1d #(
  parameter int DATA_W = dwt_pkg::DATA_W,
  parameter int GUARD  = 3,
  parameter int TAG_W  = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
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
  localparam int IW = DATA_W + GUARD;
  localparam int CW = 24;
  typedef logic signed [IW-1:0] iw_t;

  localparam logic signed [CW-1:0] K0 = CW'(dwt_pkg::quant(dwt_pkg::C0_R, dwt_pkg::C0_FB));
  localparam logic signed [CW-1:0] K1 = CW'(dwt_pkg::quant(dwt_pkg::C1_R, dwt_pkg::C1_FB));
  localparam logic signed [CW-1:0] K2 = CW'(dwt_pkg::quant(dwt_pkg::C2_R, dwt_pkg::C2_FB));
  localparam logic signed [CW-1:0] K3 = CW'(dwt_pkg::quant(dwt_pkg::C3_R, dwt_pkg::C3_FB));
  localparam logic signed [CW-1:0] K4 = CW'(dwt_pkg::quant(dwt_pkg::C4_R, dwt_pkg::C4_FB));
  localparam logic signed [CW-1:0] K5 = CW'(dwt_pkg::quant(dwt_pkg::C5_R, dwt_pkg::C5_FB));

  // a * k, where k has kfb fraction bits; result keeps the data's fraction bits.
  function automatic iw_t cmul(iw_t a, logic signed [CW-1:0] k, int kfb);
    logic signed [IW+CW-1:0] p;
    p = IW'(a) * (IW+CW)'(k);
    p = p >>> kfb;
    return p[IW-1:0];
  endfunction

  assign in_ready = 1'b1;

  // Stage 0: registered inputs.
  iw_t e0, o0, e0_p, o0_p;
  // Stage 1..5 results and their previous-word copies.
  iw_t d1, d1_p, e1;
  iw_t s1, s1_p, d1_2;
  iw_t d2, d2_p, s1_3;
  iw_t s2, d2_4;
  iw_t low5, high5;
  logic [5:0]       vld;
  logic [TAG_W-1:0] tag [6];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {e0, o0, e0_p, o0_p} <= '0;
      {d1, d1_p, e1, s1, s1_p, d1_2} <= '0;
      {d2, d2_p, s1_3, s2, d2_4, low5, high5} <= '0;
      vld <= '0;
      for (int i = 0; i < 6; i++) tag[i] <= '0;
    end else begin
      // stage 0
      e0   <= iw_t'(in_even);
      o0   <= iw_t'(in_odd);
      e0_p <= e0;
      o0_p <= o0;
      // stage 1: d1[k-1]
      d1   <= cmul(o0_p, K0, dwt_pkg::C0_FB) + e0_p + e0;
      e1   <= e0_p;
      d1_p <= d1;
      // stage 2: s1[k-1]
      s1   <= cmul(e1, K1, dwt_pkg::C1_FB) + ((d1_p + d1) >>> 4);
      d1_2 <= d1_p;
      s1_p <= s1;
      // stage 3: d2[k-2]
      d2   <= cmul(d1_2, K2, dwt_pkg::C2_FB) + ((s1_p + s1) >>> 1);
      s1_3 <= s1_p;
      d2_p <= d2;
      // stage 4: s2[k-2]
      s2   <= cmul(s1_3, K3, dwt_pkg::C3_FB) + ((d2_p + d2) >>> 1);
      d2_4 <= d2;
      // stage 5: output scaling
      low5  <= cmul(s2, K5, dwt_pkg::C5_FB);
      high5 <= cmul(d2_4, K4, dwt_pkg::C4_FB);
      vld <= {vld[4:0], in_valid};
      tag[0] <= in_tag;
      for (int i = 1; i < 6; i++) tag[i] <= tag[i-1];
    end
  end

  assign out_valid = vld[5];
  assign out_low   = low5[DATA_W-1:0];
  assign out_high  = high5[DATA_W-1:0];
  assign out_tag   = tag[5];
endmodule
