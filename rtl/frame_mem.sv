// frame_mem: image-sized sample memory of the 2-D DWT processor.
//
// DEPTH words of W bits, written as a plain array. Two read ports deliver the
// even/odd sample pair of one line position per cycle; two write ports store the
// low-pass and high-pass result of one position per cycle. Reads are synchronous:
// rd0/rd1 show the word addressed in the cycle re0/re1 was high, and hold it
// while the enable is low. Two writes in one cycle go to different addresses by
// construction of the controller; if they did collide, port 1 wins.
// The port count is this design's choice; the transform itself only needs one
// pair in and one pair out per cycle.
module frame_mem #(
  parameter int DEPTH = 512 * 512,
  parameter int W     = dwt_pkg::DATA_W,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          re0,
  input  logic [AW-1:0] ra0,
  output logic [W-1:0]  rd0,
  input  logic          re1,
  input  logic [AW-1:0] ra1,
  output logic [W-1:0]  rd1,
  input  logic          we0,
  input  logic [AW-1:0] wa0,
  input  logic [W-1:0]  wd0,
  input  logic          we1,
  input  logic [AW-1:0] wa1,
  input  logic [W-1:0]  wd1
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we0) mem[wa0] <= wd0;
    if (we1) mem[wa1] <= wd1;
    if (re0) rd0 <= mem[ra0];
    if (re1) rd1 <= mem[ra1];
  end
endmodule
