// dwt2d_proc: multi-level 2-D 9/7 DWT processor for an N x N image.
//
// Blocks: two frame memories (A holds the image and, at the end, the transform;
// B holds the row-filtered data between the two passes of a level), the pass
// controller (dwt2d_ctrl) and one 1-D engine. USE_DS = 0 selects the bit-parallel
// flipping-structure engine (one sample pair per cycle); USE_DS = 1 selects the
// digit-serial engine, whose precision is chosen per transform through the
// 'precision' input and whose word length (iterations) changes per level and
// direction at run time.
//
// Use: while idle, write pixels with load_en/load_addr/load_pixel (address
// row*N + col, 8-bit unsigned, stored as pixel/256 with FB fraction bits). Pulse
// start with 'levels' (1..MAX_LEVELS) and, for the DS engine, 'precision'
// (fraction digits of the outputs). busy stays high until the one-cycle done
// pulse. Then read coefficients with rd_addr: rd_data follows one cycle later,
// two's complement with FB fraction bits, in Mallat layout (the LL band of the
// last level in the top-left corner, each level's HL, LH and HH bands to its
// right, below and diagonal).
//
// Timing (BP): each line of length L takes L/2 + 4 cycles, so a level on an
// L x L band takes about 2 * L * (L/2 + 4) cycles. The DS engine needs one word
// slot (iterations, 25..54 cycles) per sample pair instead of one cycle.
module dwt2d_proc #(
  parameter int N          = dwt_pkg::N_DEF,
  parameter int MAX_LEVELS = dwt_pkg::LEVELS_DEF,
  parameter bit USE_DS     = 1'b0,
  parameter int DATA_W     = dwt_pkg::data_w_for(MAX_LEVELS),
  parameter int ITER_MAX   = dwt_pkg::iter_max_for(MAX_LEVELS),
  parameter int FRAC       = dwt_pkg::FB,
  parameter int AW         = $clog2(N * N),
  parameter int LVW        = $clog2(MAX_LEVELS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load_en,
  input  logic [AW-1:0]     load_addr,
  input  logic [7:0]        load_pixel,
  input  logic              start,
  input  logic [LVW-1:0]    levels,
  input  logic [3:0]        precision,
  output logic              busy,
  output logic              done,
  input  logic [AW-1:0]     rd_addr,
  output logic [DATA_W-1:0] rd_data
);
  localparam int LW    = $clog2(N);
  localparam int TAG_W = 2 * LW;

  logic              c_rd_en, c_rd_bank, c_wr_en, c_wr_bank;
  logic [AW-1:0]     c_ra0, c_ra1, c_wa0, c_wa1;
  logic [DATA_W-1:0] c_wd0, c_wd1;
  logic [DATA_W-1:0] a_rd0, a_rd1, b_rd0, b_rd1;
  logic              e_in_ready, e_in_valid, e_out_valid;
  logic [DATA_W-1:0] e_in_even, e_in_odd, e_out_low, e_out_high;
  logic [TAG_W-1:0]  e_in_tag, e_out_tag;
  logic [5:0]        e_iter;
  logic [3:0]        e_in_ib;
  logic [DATA_W-1:0] load_word;

  assign load_word = DATA_W'({load_pixel, FRAC'(0)} >> 8);

  dwt2d_ctrl #(.N(N), .MAX_LEVELS(MAX_LEVELS), .DATA_W(DATA_W), .ITER_MAX(ITER_MAX)) u_ctrl (
    .clk, .rst_n, .start, .levels, .precision, .busy, .done,
    .rd_en(c_rd_en), .rd_bank(c_rd_bank), .rd_addr0(c_ra0), .rd_addr1(c_ra1),
    .rd_data0(c_rd_bank ? b_rd0 : a_rd0), .rd_data1(c_rd_bank ? b_rd1 : a_rd1),
    .wr_en(c_wr_en), .wr_bank(c_wr_bank), .wr_addr0(c_wa0), .wr_addr1(c_wa1),
    .wr_data0(c_wd0), .wr_data1(c_wd1),
    .eng_in_ready(e_in_ready), .eng_in_valid(e_in_valid), .eng_in_even(e_in_even),
    .eng_in_odd(e_in_odd), .eng_in_tag(e_in_tag), .eng_out_valid(e_out_valid),
    .eng_out_low(e_out_low), .eng_out_high(e_out_high), .eng_out_tag(e_out_tag),
    .eng_iter(e_iter), .eng_in_ib(e_in_ib)
  );

  // Memory A: image load and result read while idle, row-pass source and
  // column-pass destination while busy.
  frame_mem #(.DEPTH(N * N), .W(DATA_W)) u_mem_a (
    .clk,
    .re0(busy ? (c_rd_en && !c_rd_bank) : 1'b1), .ra0(busy ? c_ra0 : rd_addr), .rd0(a_rd0),
    .re1(c_rd_en && !c_rd_bank), .ra1(c_ra1), .rd1(a_rd1),
    .we0(busy ? (c_wr_en && !c_wr_bank) : load_en), .wa0(busy ? c_wa0 : load_addr),
    .wd0(busy ? c_wd0 : load_word),
    .we1(c_wr_en && !c_wr_bank), .wa1(c_wa1), .wd1(c_wd1)
  );

  frame_mem #(.DEPTH(N * N), .W(DATA_W)) u_mem_b (
    .clk,
    .re0(c_rd_en && c_rd_bank), .ra0(c_ra0), .rd0(b_rd0),
    .re1(c_rd_en && c_rd_bank), .ra1(c_ra1), .rd1(b_rd1),
    .we0(c_wr_en && c_wr_bank), .wa0(c_wa0), .wd0(c_wd0),
    .we1(c_wr_en && c_wr_bank), .wa1(c_wa1), .wd1(c_wd1)
  );

  assign rd_data = a_rd0;

  if (USE_DS) begin : g_ds
    ds_dwt97_1d #(.DATA_W(DATA_W), .TAG_W(TAG_W), .ITER_MAX(ITER_MAX)) u_eng (
      .clk, .rst_n, .iter(e_iter), .in_ib(e_in_ib),
      .in_ready(e_in_ready), .in_valid(e_in_valid), .in_even(e_in_even), .in_odd(e_in_odd),
      .in_tag(e_in_tag), .out_valid(e_out_valid), .out_low(e_out_low),
      .out_high(e_out_high), .out_tag(e_out_tag)
    );
  end else begin : g_bp
    bp_dwt97_1d #(.DATA_W(DATA_W), .TAG_W(TAG_W)) u_eng (
      .clk, .rst_n,
      .in_ready(e_in_ready), .in_valid(e_in_valid), .in_even(e_in_even), .in_odd(e_in_odd),
      .in_tag(e_in_tag), .out_valid(e_out_valid), .out_low(e_out_low),
      .out_high(e_out_high), .out_tag(e_out_tag)
    );
  end
endmodule
