// sd_serializer: two's complement word to radix-2 signed digits, most
// significant digit first.
//
// The word holds a value with FRAC fraction bits. Only its lowest in_ib integer
// bits (sign included) are sent; the bits above them must be sign extension. In
// cycle cyc of a word slot the output is digit cyc of the word: digit 0 is minus
// the sign bit (weight 2^(in_ib-1)), digit t > 0 is the bit of weight
// 2^(in_ib-1-t), and digits below the least significant bit are 0. A two's
// complement word is already a valid signed-digit number, so the conversion needs
// no arithmetic. Combinational; the word must be held for the whole slot.
// Digit coding (dwt_pkg): 2'b10 = -1, 2'b00 = 0, 2'b01 = +1.
module sd_serializer #(
  parameter int DATA_W = dwt_pkg::DATA_W,
  parameter int FRAC   = 19
) (
  input  logic [DATA_W-1:0] word,
  input  logic [3:0]        in_ib,
  input  logic [5:0]        cyc,
  output dwt_pkg::sd_t      digit
);
  int bitpos;
  always_comb begin
    bitpos = FRAC + int'(in_ib) - 1 - int'(cyc);
    digit  = dwt_pkg::SD_ZERO;
    if (bitpos >= 0 && bitpos < DATA_W && word[bitpos]) begin
      digit = (cyc == '0) ? dwt_pkg::SD_NEG : dwt_pkg::SD_POS;
    end
  end
endmodule
