// Subtraction node (ND_9 of the process network): removes the interference
// from the ECG, Y_c = X_c - ecg_pli, and so produces the filtered signal.
//
// The interference of iteration j belongs to the sample X_c, c = j - N, that
// the criterion and the filters judged when X_j arrived, so the node delays
// the ECG by N samples to line the two up. Samples before the first count as
// zero. The subtraction follows the method; the delay matches this design's
// choice of filters. One sample takes at least 3 cycles.
module nd_subtract
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
  input  sample_t p_data,
  input  logic    p_empty,
  output logic    p_pop,
  output sample_t y_data,
  output logic    y_push,
  input  logic    y_full
);

  sample_t    xb [N];   // xb[k] = X_(j-1-k) while X_j waits at the input
  logic       exec_en;
  logic [1:0] pops;

  kpn_node_ctrl #(.N_IN(2), .N_OUT(1), .WIDTH(WIDTH)) u_ctrl (
    .clk, .rst_n,
    .in_avail ({!x_empty, !p_empty}),
    .in_pop   (pops),
    .exec_en,
    .out_space(!y_full),
    .out_push (y_push),
    .writing  (),
    .iter     (),
    .iter_last()
  );

  assign {x_pop, p_pop} = pops;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) xb[k] <= '0;
      y_data <= '0;
    end else if (exec_en) begin
      xb[0] <= x_data;
      for (int k = 1; k < N; k++) xb[k] <= xb[k-1];
      y_data <= xb[N-1] - p_data;
    end
  end

endmodule
