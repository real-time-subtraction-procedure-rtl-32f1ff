// Linear-segment node (ND_7 of the process network, the interference
// extracting "K-filter"): computes the interference B_c on the assumption
// that the sample X_c lies on a linear segment.
//
// On a linear segment the ECG is locally a straight line, so the mean of the
// N samples of one mains period centred on X_c equals the ECG at c, while
// the interference averages out over a full period. The interference is then
// what is left: B_c = X_c - (X_(c-h) + ... + X_(c+h)) / N, h = (N-1)/2.
// The node works on the same sample as the linearity criterion, c = j - N,
// when X_j arrives; it keeps the previous N + h samples. N must be odd. The
// division truncates towards zero. Samples before the first count as zero.
// The moving-average form of the filter is this design's choice: the method
// names a digital filter for linear segments without giving it.
// One sample takes at least 3 cycles.
module nd_linear
  import pli_pkg::*;
#(
  parameter int N     = 5,
  parameter int WIDTH = 1024
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t x_data,
  input  logic    x_empty,
  output logic    x_pop,
  output sample_t b_data,
  output logic    b_push,
  input  logic    b_full
);

  localparam int H     = (N - 1) / 2;
  localparam int DEPTH = N + H;
  localparam int SW    = DATA_W + $clog2(N) + 1;

  sample_t xb [DEPTH];   // xb[k] = X_(j-1-k) while X_j waits at the input
  logic    exec_en;
  logic signed [SW-1:0] sum_n, mean_n;

  kpn_node_ctrl #(.N_IN(1), .N_OUT(1), .WIDTH(WIDTH)) u_ctrl (
    .clk, .rst_n,
    .in_avail (!x_empty),
    .in_pop   (x_pop),
    .exec_en,
    .out_space(!b_full),
    .out_push (b_push),
    .writing  (),
    .iter     (),
    .iter_last()
  );

  // Window X_(c-h)..X_(c+h) with c = j - N is xb[N-1-h]..xb[N-1+h].
  always_comb begin
    sum_n = '0;
    for (int k = N - 1 - H; k <= N - 1 + H; k++) sum_n += SW'(xb[k]);
    mean_n = sum_n / SW'(N);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) xb[k] <= '0;
      b_data <= '0;
    end else if (exec_en) begin
      xb[0] <= x_data;
      for (int k = 1; k < DEPTH; k++) xb[k] <= xb[k-1];
      b_data <= sample_t'(SW'(xb[N-1]) - mean_n);
    end
  end

  initial begin
    assert (N % 2 == 1) else $error("nd_linear: N must be odd");
  end

endmodule
