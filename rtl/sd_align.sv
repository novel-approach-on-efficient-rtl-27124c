// sd_align: delays a signed-digit stream by K cycles inside its word slot.
//
// Delaying a stream by K cycles raises the weight of each digit position by 2^K,
// which is how operands with different leading-digit weights are lined up before
// an on-line addition. Digits that would cross into the next word slot are
// dropped: the output is 0 while the slot cycle is below K.
module sd_align #(
  parameter int K = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [5:0]   cyc,
  input  dwt_pkg::sd_t d,
  output dwt_pkg::sd_t q
);
  dwt_pkg::sd_t sr [K];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) sr[i] <= dwt_pkg::SD_ZERO;
    end else begin
      sr[0] <= d;
      for (int i = 1; i < K; i++) sr[i] <= sr[i-1];
    end
  end

  assign q = (cyc < 6'(K)) ? dwt_pkg::SD_ZERO : sr[K-1];
endmodule
