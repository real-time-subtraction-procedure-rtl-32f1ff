// Stream-out node (ND_10, ND_11 and ND_12 of the process network): reads the
// tokens of one link and passes them to the outside, one per loop iteration,
// together with the iteration number.
//
// The outside sees a valid/ready stream: out_valid rises when a token is
// ready and stays high, with out_data and out_iter steady, until out_ready is
// high; the token is taken in that cycle. DW is the token width: sample words
// for the filtered ECG and the interference, one bit for the linearity
// criterion. One token takes at least 3 cycles. The outside handshake and
// the iteration output are this design's choices.
module nd_stream_out #(
  parameter int DW    = 32,
  parameter int WIDTH = 1024
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] in_data,
  input  logic          in_empty,
  output logic          in_pop,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [DW-1:0] out_data,
  output logic [$clog2(WIDTH+1)-1:0] out_iter
);

  logic exec_en;

  kpn_node_ctrl #(.N_IN(1), .N_OUT(1), .WIDTH(WIDTH)) u_ctrl (
    .clk, .rst_n,
    .in_avail (!in_empty),
    .in_pop   (in_pop),
    .exec_en,
    .out_space(out_ready),
    .out_push (),
    .writing  (out_valid),
    .iter     (out_iter),
    .iter_last()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       out_data <= '0;
    else if (exec_en) out_data <= in_data;
  end

  // Once offered, a token stays offered and unchanged until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
