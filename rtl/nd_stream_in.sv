// Stream-in node (ND_3 of the process network): takes the contaminated ECG
// samples X_j from outside, one per loop iteration, and hands each sample to
// every node that uses it.
//
// External input is a valid/ready stream: the source holds in_valid and
// in_data until in_ready is high for one cycle, which is when the sample is
// taken. The node then writes the sample into its N_OUT output links at once,
// waiting until all of them have space. out_iter is the iteration (1..WIDTH)
// of the token being written. One sample takes at least 3 cycles.
// That this node feeds several links with the same token follows the
// network; the handshake on the outside is this design's choice.
module nd_stream_in
  import pli_pkg::*;
#(
  parameter int N_OUT = 3,
  parameter int WIDTH = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  sample_t          in_data,
  output sample_t          out_data,
  output logic [N_OUT-1:0] out_push,
  input  logic [N_OUT-1:0] out_full,
  output logic [$clog2(WIDTH+1)-1:0] out_iter
);

  logic exec_en;

  kpn_node_ctrl #(.N_IN(1), .N_OUT(N_OUT), .WIDTH(WIDTH)) u_ctrl (
    .clk, .rst_n,
    .in_avail (in_valid),
    .in_pop   (in_ready),
    .exec_en,
    .out_space(~out_full),
    .out_push,
    .writing  (),
    .iter     (out_iter),
    .iter_last()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       out_data <= '0;
    else if (exec_en) out_data <= in_data;
  end

endmodule
