// Linearity-criterion node (ND_4 of the process network): decides for each
// ECG sample whether it lies on a linear segment of the signal.
//
// The node keeps the previous 2N samples. When the sample X_j arrives it judges
// the sample one mains period back, X_c with c = j - N, by the comb-filtered
// second difference D_c = X_(c-N) - 2*X_c + X_(c+N). N is the number of
// samples per mains period, so a periodic interference cancels in D_c and
// only the curvature of the ECG itself is left. The sample is on a linear
// segment when |D_c| < M, where M is the dynamic threshold, updated with the
// newest sample X_j. The criterion cr (1 = linear) goes to every output link.
// That D uses samples X_(c-N)..X_(c+N) and that linearity means |D| < M
// follow the method's description; the exact form of D, the delay of N
// samples and cr = 1 meaning "linear" are this design's reading. Samples
// before the first one count as zero. One sample takes at least 3 cycles.
module nd_linearity_criterion
  import pli_pkg::*;
#(
  parameter int N     = 5,
  parameter int N_OUT = 2,
  parameter int WIDTH = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  input  sample_t          x_data,
  input  logic             x_empty,
  output logic             x_pop,
  output logic             cr_data,
  output logic [N_OUT-1:0] cr_push,
  input  logic [N_OUT-1:0] cr_full,
  output sample_t          d_abs,
  output sample_t          m
);

  localparam int DEPTH = 2 * N;
  localparam logic signed [DATA_W+1:0] DMAX = (DATA_W+2)'((64'sd1 <<< (DATA_W-1)) - 1);

  sample_t xb [DEPTH];   // xb[k] = X_(j-1-k) while X_j waits at the input
  logic    exec_en;
  logic signed [DATA_W+1:0] d_n;

  kpn_node_ctrl #(.N_IN(1), .N_OUT(N_OUT), .WIDTH(WIDTH)) u_ctrl (
    .clk, .rst_n,
    .in_avail (!x_empty),
    .in_pop   (x_pop),
    .exec_en,
    .out_space(~cr_full),
    .out_push (cr_push),
    .writing  (),
    .iter     (),
    .iter_last()
  );

  dyn_threshold u_thr (
    .clk, .rst_n,
    .en  (exec_en),
    .x   (x_data),
    .m   (m),
    .mmax(), .mmin(), .mpp(), .mmu()
  );

  // With the new sample in front, X_(c+N) = x_data, X_c = xb[N-1] and
  // X_(c-N) = xb[2N-1].
  always_comb begin
    d_n = (DATA_W+2)'(xb[2*N-1]) - ((DATA_W+2)'(xb[N-1]) <<< 1) + (DATA_W+2)'(x_data);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) xb[k] <= '0;
      d_abs <= '0;
    end else if (exec_en) begin
      xb[0] <= x_data;
      for (int k = 1; k < DEPTH; k++) xb[k] <= xb[k-1];
      // |D| saturated to the sample range
      if (d_n > DMAX || d_n < -DMAX) d_abs <= sample_t'(DMAX);
      else
        d_abs <= sabs(sample_t'(d_n));
    end
  end

  assign cr_data = (d_abs < m);

endmodule
