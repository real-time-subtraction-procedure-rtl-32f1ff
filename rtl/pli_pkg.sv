// Shared types and constants of the power-line interference (PLI) remover.
//
// Samples travel through the process network as signed fixed-point words of
// DATA_W bits with FRAC_W fraction bits. The word width follows the C
// specification of the algorithm, where every sample is an "int" (32 bits).
// The fraction width is half the word, which is what the dynamic-threshold
// arithmetic implies: a product of two samples is 2*DATA_W bits wide and the
// result is taken from bit FRAC_W up, so a product keeps the same scaling as
// its operands. The two threshold coefficients are this design's reading of
// the constant names d500 (1/500, the decay rate of the envelope trackers) and
// d01 (0.1, the fraction of the peak-to-peak amplitude used as threshold).
package pli_pkg;

  localparam int DATA_W = 32;
  localparam int FRAC_W = DATA_W / 2;
  localparam int PROD_W = 2 * DATA_W;

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [PROD_W-1:0] prod_t;

  // 1/500 and 0.1 in the Q(FRAC_W) format, rounded to nearest.
  localparam sample_t D500 = sample_t'(((64'sd1 <<< FRAC_W) + 250) / 500);
  localparam sample_t D01  = sample_t'(((64'sd1 <<< FRAC_W) + 5) / 10);

  // Product of two Q(FRAC_W) words rescaled to Q(FRAC_W); arithmetic shift,
  // so the result is truncated towards minus infinity.
  function automatic sample_t qmul(sample_t a, sample_t b);
    prod_t p;
    p = prod_t'(a) * prod_t'(b);
    return sample_t'(p >>> FRAC_W);
  endfunction

  function automatic sample_t sabs(sample_t a);
    return (a < 0) ? -a : a;
  endfunction

endpackage
