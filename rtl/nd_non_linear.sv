// Non-linear-segment node (ND_6 of the process network, the interference
// restoring "B-filter" with its temporal buffer): gives the interference for
// a sample that is not on a linear segment.
//
// There the ECG itself hides the interference, so the node restores it from
// the past: the interference is periodic with N samples per mains period, so
// B*_c = B_(c-N), the value the design used one period earlier. The node
// receives, for every iteration j, the interference of the previous iteration
// (ecg_pli[j-1]) over the feedback link from the switch node, keeps the last
// N of them (N >= 2) in its temporal buffer and returns the one from N iterations ago.
// The first feedback token is the zero that the link holds after reset, and
// the buffer starts at zero. That the restored value comes from the buffered
// output interference follows the method; the plain one-period copy is this
// design's choice of restoring filter. One sample takes at least 3 cycles.
module nd_non_linear
  import pli_pkg::*;
#(
  parameter int N     = 5,
  parameter int WIDTH = 1024
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t p_data,
  input  logic    p_empty,
  output logic    p_pop,
  output sample_t bs_data,
  output logic    bs_push,
  input  logic    bs_full
);

  sample_t tbuf [N-1];   // tbuf[k] = ecg_pli[j-2-k] while ecg_pli[j-1] waits
  logic    exec_en;

  kpn_node_ctrl #(.N_IN(1), .N_OUT(1), .WIDTH(WIDTH)) u_ctrl (
    .clk, .rst_n,
    .in_avail (!p_empty),
    .in_pop   (p_pop),
    .exec_en,
    .out_space(!bs_full),
    .out_push (bs_push),
    .writing  (),
    .iter     (),
    .iter_last()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N - 1; k++) tbuf[k] <= '0;
      bs_data <= '0;
    end else if (exec_en) begin
      tbuf[0] <= p_data;
      for (int k = 1; k < N - 1; k++) tbuf[k] <= tbuf[k-1];
      bs_data <= tbuf[N-2];   // ecg_pli[j-N]
    end
  end

  initial begin
    assert (N >= 2) else $error("nd_non_linear: N must be at least 2");
  end

endmodule
