// dwt_pkg: types and constants shared by the flipping 9/7 DWT datapath.
//
// The flipping structure computes the CDF 9/7 wavelet with four arithmetic
// units whose multipliers use the reciprocals of the lifting constants
// (1/alpha, 1/(alpha*beta), 1/(beta*gamma), 1/(gamma*delta)) and two output
// scalings (alpha*beta*gamma/K for the high band, alpha*beta*gamma*delta*K for
// the low band). The numeric values of alpha..K are the standard 9/7 lifting
// constants; they are not part of the structure's description and are this
// design's input.
//
// Coefficient format (this design's choice): each constant c is held as a
// signed N-bit mantissa M with a per-constant exponent S, c ~= M * 2^(S-N).
// The N x N fixed-width multiplier returns ~ (x*M) / 2^N, and the caller
// shifts that left by S (or arithmetically right by -S). S is picked so
// that 2^(N-2) <= |M| < 2^(N-1), which keeps the full mantissa precision.
package dwt_pkg;

  // Standard CDF 9/7 lifting constants.
  localparam real ALPHA = -1.586134342059924;
  localparam real BETA  = -0.052980118572961;
  localparam real GAMMA =  0.882911075530934;
  localparam real DELTA =  0.443506852043971;
  localparam real KAPPA =  1.149604398860241;

  // Flipped multiplier constants (Eq. 1a-1d) and output scalings (Eq. 1e-1f).
  localparam real C_R1 = 1.0 / ALPHA;
  localparam real C_R2 = 1.0 / (ALPHA * BETA);
  localparam real C_R3 = 1.0 / (BETA * GAMMA);
  localparam real C_R4 = 1.0 / (GAMMA * DELTA);
  localparam real C_VH = ALPHA * BETA * GAMMA / KAPPA;
  localparam real C_VL = ALPHA * BETA * GAMMA * DELTA * KAPPA;

  // Exponents S of the six constants (see header).
  localparam int S_R1 = 1;   // |1/alpha|          = 0.63
  localparam int S_R2 = 5;   // |1/(alpha*beta)|   = 11.90
  localparam int S_R3 = 6;   // |1/(beta*gamma)|   = 21.38
  localparam int S_R4 = 3;   // |1/(gamma*delta)|  = 2.55
  localparam int S_VH = -2;  // alpha*beta*gamma/K = 0.0645
  localparam int S_VL = -3;  // alpha*beta*gamma*delta*K = 0.0378

  // Mantissa of constant c for exponent s and an n-bit multiplier, rounded
  // to nearest.
  function automatic int coef_mant(real c, int s, int n);
    real scaled;
    scaled = c * (2.0 ** (n - s));
    return (scaled >= 0.0) ? int'($floor(scaled + 0.5)) : -int'($floor(-scaled + 0.5));
  endfunction

  // Modified PEB bias constants (Eq. 5): A' and B' are the integer part and
  // the rounded fraction of 3n/32 + 0.5.
  function automatic int peb_a(int n);
    return (3 * n + 16) / 32;
  endfunction

  function automatic int peb_b(int n);
    return (((3 * n + 16) % 32) >= 16) ? 1 : 0;
  endfunction

  // One radix-4 modified Booth digit, d in {-2,-1,0,1,2}:
  // one = |d| is 1, two = |d| is 2, neg = d is negative.
  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } booth_digit_t;

endpackage
