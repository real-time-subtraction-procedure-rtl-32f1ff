// Dynamic threshold M of the linearity criterion.
//
// For every new ECG sample x (en high for one cycle) the block updates four
// tracked values, all in the Q(FRAC_W) format of pli_pkg:
//   mmax  upper envelope: jumps to x when x is above it, otherwise decays
//         towards x by |mmax - x| * D500;
//   mmin  lower envelope: jumps to x when x is below it, otherwise rises
//         towards x by |x - mmin| * D500;
//   mpp   peak-to-peak amplitude, mmax - mmin;
//   mmu   slow floor of mpp: drops to mpp when mpp is below it, otherwise
//         rises by |mpp| * D500;
// and the threshold m = mmu * D01. All start at zero after reset. The update
// rules, the reset values and the rescaling of each product follow the
// published threshold process. Two points are this design's reading: the
// lower envelope moves by |x - mmin| (the mirror of the upper one), and every
// value is updated from the ones just computed for the same sample, where the
// published process lets some intermediate products lag by a sample. The
// outputs are registered and valid from the cycle after en.
module dyn_threshold
  import pli_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  sample_t x,
  output sample_t m,
  output sample_t mmax,
  output sample_t mmin,
  output sample_t mpp,
  output sample_t mmu
);

  sample_t mmax_n, mmin_n, mpp_n, mmu_n, m_n;

  always_comb begin
    mmax_n = (x > mmax) ? x : mmax - qmul(sabs(mmax - x), D500);
    mmin_n = (x < mmin) ? x : mmin + qmul(sabs(x - mmin), D500);
    mpp_n  = mmax_n - mmin_n;
    mmu_n  = (mmu > mpp_n) ? mpp_n : mmu + qmul(sabs(mpp_n), D500);
    m_n    = qmul(mmu_n, D01);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mmax <= '0;
      mmin <= '0;
      mpp  <= '0;
      mmu  <= '0;
      m    <= '0;
    end else if (en) begin
      mmax <= mmax_n;
      mmin <= mmin_n;
      mpp  <= mpp_n;
      mmu  <= mmu_n;
      m    <= m_n;
    end
  end

endmodule
