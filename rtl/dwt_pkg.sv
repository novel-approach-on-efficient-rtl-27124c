// dwt_pkg: constants, types and helper functions shared by the 9/7 DWT processors.
//
// The lifting constants alpha..zeta are those of the Daubechies-Sweldens 9/7
// factorisation. The flipping structure divides every lifting step by its
// coefficient so that only one multiplier sits on each path; the six flipped
// constants C0..C5 below carry an extra power of two each (C1 = 1/(16*alpha*beta),
// C2 = 1/(32*beta*gamma), C3 = 1/(4*gamma*delta)), which keeps them inside
// (-1, 1). The matching neighbour-sum scalings are 2^-4, 2^-1 and 2^-1, and the
// output scalings are C4 (high pass) and C5 (low pass).
//
// Digits of the digit-serial (DS) datapath are radix-2 signed digits coded in
// two bits: 2'b10 = -1, 2'b00 = 0, 2'b01 = +1 (2'b11 is never produced and reads as 0).
package dwt_pkg;

  // Lifting coefficients (reference values, used by testbenches and comments).
  localparam real ALPHA = -1.586134342;
  localparam real BETA  = -0.05298011854;
  localparam real GAMMA = 0.8829110762;
  localparam real DELTA = 0.4435068522;
  localparam real ZETA  = 1.149604398;

  // Flipped constants.
  localparam real C0_R = -0.6304636206;  // 1/alpha
  localparam real C1_R = 0.7437502472;   // 1/(16 alpha beta)
  localparam real C2_R = -0.6680671710;  // 1/(32 beta gamma)
  localparam real C3_R = 0.6384438531;   // 1/(4 gamma delta)
  localparam real C4_R = 2.065244244;    // 32 alpha beta gamma / zeta   (high pass)
  localparam real C5_R = 2.421021152;    // 64 alpha beta gamma delta zeta (low pass)

  // Fraction bits of each constant in the bit-parallel datapath.
  localparam int C0_FB = 15;
  localparam int C1_FB = 18;
  localparam int C2_FB = 14;
  localparam int C3_FB = 19;
  localparam int C4_FB = 12;
  localparam int C5_FB = 12;

  // Fraction bits of each constant in the digit-serial datapath: the digit
  // counts allocated to C0..C5 (17, 16, 18, 19, 19, 21) less their integer
  // digits (1 for C0..C3, 3 for C4 and C5).
  localparam int DS_C0_FB = 16;
  localparam int DS_C1_FB = 15;
  localparam int DS_C2_FB = 17;
  localparam int DS_C3_FB = 18;
  localparam int DS_C4_FB = 16;
  localparam int DS_C5_FB = 18;

  // Stored sample format: two's complement, FB fraction bits, DATA_IB integer
  // bits including the sign: one sign bit, one guard bit and one bit of growth
  // per 1-D pass, 2*levels + 1 in all (data_w_for).
  // Default image size and largest number of levels.
  localparam int N_DEF      = 512;
  localparam int LEVELS_DEF = 7;

  localparam int FB      = 19;
  localparam int DATA_IB = 2 * LEVELS_DEF + 1;
  localparam int DATA_W  = DATA_IB + FB;

  // DS datapath: maximum iterations (digits) per word and the number of
  // leading digits the DS pipeline adds to its low-pass and high-pass outputs.
  // ITER_MAX covers precision 14 at the deepest pass (iter_max_for).
  localparam int ITER_MAX = 2 * LEVELS_DEF + 40;
  localparam int DS_H_LOW  = 22;
  localparam int DS_H_HIGH = 17;

  typedef logic [1:0] sd_t;
  localparam sd_t SD_NEG  = 2'b10;
  localparam sd_t SD_ZERO = 2'b00;
  localparam sd_t SD_POS  = 2'b01;

  // Quantise a real constant to a two's complement integer with fb fraction bits.
  function automatic longint quant(real v, int fb);
    return longint'(v * (2.0 ** fb));
  endfunction

  function automatic int sd_val(sd_t d);
    case (d)
      SD_POS:  return 1;
      SD_NEG:  return -1;
      default: return 0;
    endcase
  endfunction

  // Integer digits of the stored input words of pass p (p = 2*level + dir):
  // one sign digit, one guard digit and one more per 1-D pass.
  function automatic int pass_ib(int p);
    return 2 + p;
  endfunction

  // DS iterations needed for pass p to keep 'prec' fraction digits of the
  // low-pass output, limited to 'cap'.
  function automatic int ds_iter(int p, int prec, int cap);
    int it;
    it = pass_ib(p) - 1 + DS_H_LOW + 1 + prec;
    if (it > cap) it = cap;
    return it;
  endfunction

  // Stored word width and DS word-length limit for a given number of levels.
  function automatic int data_w_for(int levels);
    return 2 * levels + 1 + FB;
  endfunction
  function automatic int iter_max_for(int levels);
    return 2 * levels + 40;
  endfunction

endpackage
