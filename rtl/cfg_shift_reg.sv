// cfg_shift_reg: shift register whose length is chosen at run time.
//
// q is d delayed by 'len' clock cycles (1 <= len <= MAXLEN; 0 acts as 1). In the
// digit-serial DWT one word occupies 'iterations' cycles, so with len set to the
// iteration count this register is the one-word (z^-1) delay of a digit stream,
// and it follows the word length when the precision or level changes. Built as
// MAXLEN stages with a length-selected output tap. Contents are cleared by reset.
module cfg_shift_reg #(
  parameter int W      = 2,
  parameter int MAXLEN = dwt_pkg::ITER_MAX,
  parameter int LENW   = $clog2(MAXLEN + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [LENW-1:0] len,
  input  logic [W-1:0]    d,
  output logic [W-1:0]    q
);
  logic [W-1:0] sr [MAXLEN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAXLEN; i++) sr[i] <= '0;
    end else begin
      sr[0] <= d;
      for (int i = 1; i < MAXLEN; i++) sr[i] <= sr[i-1];
    end
  end

  always_comb begin
    if (len == '0)                  q = sr[0];
    else if (len > LENW'(MAXLEN))   q = sr[MAXLEN-1];
    else                            q = sr[len - 1'b1];
  end
endmodule
