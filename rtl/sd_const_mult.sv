// sd_const_mult: on-line multiplication of a signed-digit stream (MSD first) by
// a constant held in parallel two's complement form.
//
// The constant has CFB fraction bits and |coef| < 2^CIB. Recurrence, with the
// residual in two's complement:  W = 2*R + x*coef*2^-(CIB+1),
// z = round(W) in {-1, 0, +1}, R = W - z; W restarts from the new summand in
// the first cycle of a word slot. |coef*2^-(CIB+1)| < 1/2 keeps |W| < 3/2. The
// on-line delay is CIB+1: input digit t of weight 2^(H-t) yields digit z of
// weight 2^(H+CIB+1-t), registered, so the output stream has weight
// 2^(H+CIB+2-t) at cycle t. The output is 0 in the first cycle of a slot.
module sd_const_mult #(
  parameter int CW  = 24,
  parameter int CFB = 19,
  parameter int CIB = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [CW-1:0] coef,
  input  logic                 first,
  input  dwt_pkg::sd_t         x,
  output dwt_pkg::sd_t         z
);
  localparam int F  = CFB + CIB + 1;     // fraction bits of W
  localparam int RW = F + 3;
  localparam logic signed [RW-1:0] HALF = RW'(1) <<< (F - 1);
  localparam logic signed [RW-1:0] ONE  = RW'(1) <<< F;

  logic signed [RW-1:0] r, w, s;
  dwt_pkg::sd_t         sel, q;

  always_comb begin
    case (x)
      dwt_pkg::SD_POS: s = RW'(coef);
      dwt_pkg::SD_NEG: s = -RW'(coef);
      default:         s = '0;
    endcase
    w = first ? s : (r <<< 1) + s;
    if (w >= HALF)       sel = dwt_pkg::SD_POS;
    else if (w < -HALF)  sel = dwt_pkg::SD_NEG;
    else                 sel = dwt_pkg::SD_ZERO;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0;
      q <= dwt_pkg::SD_ZERO;
    end else begin
      case (sel)
        dwt_pkg::SD_POS: r <= w - ONE;
        dwt_pkg::SD_NEG: r <= w + ONE;
        default:         r <= w;
      endcase
      q <= sel;
    end
  end

  assign z = first ? dwt_pkg::SD_ZERO : q;
endmodule
