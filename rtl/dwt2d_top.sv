// dwt2d_top: the two 2-D 9/7 DWT processors side by side.
//
// bp_*: the bit-parallel processor, built for speed: one sample pair per cycle
//       through a five-stage flipping-structure pipeline, fixed-point words with
//       19 fraction bits.
// ds_*: the digit-serial processor, built for area: the same transform computed
//       with radix-2 signed-digit on-line arithmetic, one digit per cycle; its
//       precision (ds_precision, fraction digits) and number of levels are chosen
//       per transform at run time, and the word length (iterations) follows the
//       level and direction automatically.
// Both take an N x N image of 8-bit pixels through their load port while idle,
// transform 'levels' levels (1..MAX_LEVELS) after a start pulse, pulse done, and
// then return the coefficients in Mallat layout through their read port (one
// cycle read latency, two's complement with 19 fraction bits). The two share
// only clock and reset. See dwt2d_proc for the ports and timing.
// The stored word width and the DS word-length limit follow MAX_LEVELS
// (2*MAX_LEVELS + 1 integer bits, 2*MAX_LEVELS + 40 iterations). The default,
// seven levels, is the deepest run-time configuration (a 512 x 512 image, 34-bit
// words, up to 54 iterations); any smaller number of levels is chosen at start.
module dwt2d_top #(
  parameter int N          = dwt_pkg::N_DEF,
  parameter int MAX_LEVELS = dwt_pkg::LEVELS_DEF,
  parameter int DATA_W     = dwt_pkg::data_w_for(MAX_LEVELS),
  parameter int ITER_MAX   = dwt_pkg::iter_max_for(MAX_LEVELS),
  parameter int AW         = $clog2(N * N),
  parameter int LVW        = $clog2(MAX_LEVELS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // bit-parallel processor
  input  logic              bp_load_en,
  input  logic [AW-1:0]     bp_load_addr,
  input  logic [7:0]        bp_load_pixel,
  input  logic              bp_start,
  input  logic [LVW-1:0]    bp_levels,
  output logic              bp_busy,
  output logic              bp_done,
  input  logic [AW-1:0]     bp_rd_addr,
  output logic [DATA_W-1:0] bp_rd_data,
  // digit-serial processor
  input  logic              ds_load_en,
  input  logic [AW-1:0]     ds_load_addr,
  input  logic [7:0]        ds_load_pixel,
  input  logic              ds_start,
  input  logic [LVW-1:0]    ds_levels,
  input  logic [3:0]        ds_precision,
  output logic              ds_busy,
  output logic              ds_done,
  input  logic [AW-1:0]     ds_rd_addr,
  output logic [DATA_W-1:0] ds_rd_data
);
  dwt2d_proc #(.N(N), .MAX_LEVELS(MAX_LEVELS), .USE_DS(1'b0), .DATA_W(DATA_W), .ITER_MAX(ITER_MAX)) u_bp (
    .clk, .rst_n, .load_en(bp_load_en), .load_addr(bp_load_addr), .load_pixel(bp_load_pixel),
    .start(bp_start), .levels(bp_levels), .precision(4'd0), .busy(bp_busy), .done(bp_done),
    .rd_addr(bp_rd_addr), .rd_data(bp_rd_data)
  );

  dwt2d_proc #(.N(N), .MAX_LEVELS(MAX_LEVELS), .USE_DS(1'b1), .DATA_W(DATA_W), .ITER_MAX(ITER_MAX)) u_ds (
    .clk, .rst_n, .load_en(ds_load_en), .load_addr(ds_load_addr), .load_pixel(ds_load_pixel),
    .start(ds_start), .levels(ds_levels), .precision(ds_precision), .busy(ds_busy), .done(ds_done),
    .rd_addr(ds_rd_addr), .rd_data(ds_rd_data)
  );
endmodule
