// sd_to_twos: signed-digit stream back to a two's complement word
// (serial-to-parallel conversion).
//
// Over one word slot the digits are accumulated MSD first, A = 2*A + d
// (restarting at 'first'). In the slot's last cycle ('last') the value
// A * 2^shift is registered on 'word' (arithmetic right shift for a negative
// shift), with 'valid' high for one cycle. 'shift' is chosen by the caller so
// that the word has the output format's fraction bits:
//   shift = FRAC + H - (iterations - 1), where 2^H is the weight of the slot's
// first digit. Bits shifted out are dropped (truncation).
module sd_to_twos #(
  parameter int DATA_W   = dwt_pkg::DATA_W,
  parameter int ITER_MAX = dwt_pkg::ITER_MAX
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     first,
  input  logic                     last,
  input  dwt_pkg::sd_t             digit,
  input  logic signed [7:0]        shift,
  output logic signed [DATA_W-1:0] word,
  output logic                     valid
);
  localparam int AW = ITER_MAX + 2;
  localparam int XW = AW + DATA_W;
  logic signed [AW-1:0] acc, acc_n;
  logic signed [XW-1:0] ext;

  always_comb begin
    acc_n = (first ? '0 : (acc <<< 1)) + AW'(dwt_pkg::sd_val(digit));
    ext   = XW'(acc_n);
    if (shift >= 0) ext = ext <<< shift;
    else            ext = ext >>> (-shift);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      word  <= '0;
      valid <= 1'b0;
    end else begin
      acc   <= acc_n;
      valid <= last;
      if (last) word <= ext[DATA_W-1:0];
    end
  end
endmodule
