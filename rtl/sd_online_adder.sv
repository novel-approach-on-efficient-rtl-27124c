// sd_online_adder: radix-2 on-line signed-digit adder (most significant digit
// first), on-line delay 2.
//
// Digit recurrence: W = 2*R + (x + y)/4, z = round(W) in {-1, 0, +1},
// R = W - z, with W restarting from (x + y)/4 in the first cycle of a word slot
// ('first'). |R| <= 1/2 keeps |W| < 3/2, so one digit per cycle always suffices
// and no carry travels further than the 5-bit residual. If input digit t has
// weight 2^(H-t), digit z produced in that cycle has weight 2^(H+2-t); z is
// registered, so in the output stream digit t has weight 2^(H+3-t). The output
// is forced to 0 in the first cycle of each slot (that register still holds the
// previous word's last digit, which is dropped: truncation).
// Residual held in two's complement; this is the simplest form of the
// recurrence, not a particular published cell structure.
module sd_online_adder (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         first,
  input  dwt_pkg::sd_t x,
  input  dwt_pkg::sd_t y,
  output dwt_pkg::sd_t z
);
  // W and R in quarters.
  logic signed [4:0] r_q, w, s;
  dwt_pkg::sd_t      sel, q;

  always_comb begin
    s = 5'(dwt_pkg::sd_val(x) + dwt_pkg::sd_val(y));
    w = first ? s : (r_q <<< 1) + s;
    if (w >= 5'sd2)       sel = dwt_pkg::SD_POS;
    else if (w < -5'sd2)  sel = dwt_pkg::SD_NEG;
    else                  sel = dwt_pkg::SD_ZERO;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q <= '0;
      q   <= dwt_pkg::SD_ZERO;
    end else begin
      r_q <= w - 5'(4 * dwt_pkg::sd_val(sel));
      q   <= sel;
    end
  end

  assign z = first ? dwt_pkg::SD_ZERO : q;
endmodule
