// Switch node (ND_8 of the process network): chooses, sample by sample, the
// interference estimate that matches the kind of segment.
//
// For iteration j it reads the linearity criterion cr, the linear-segment
// estimate B and the restored estimate B*, and writes ecg_pli[j] = B when
// cr = 1 (linear segment) and B* otherwise into all of its N_OUT output
// links: the subtractor, the interference output and the feedback link to the
// restoring node. The tap_* outputs show the tokens of each firing for one
// cycle (tap_valid) and carry the signals that the frequency deviation
// tracker of the algorithm reads. The selection rule follows the method; the
// tap is this design's way of offering those signals. One sample takes at
// least 3 cycles.
module nd_cr_switch
  import pli_pkg::*;
#(
  parameter int N_OUT = 3,
  parameter int WIDTH = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cr_data,
  input  logic             cr_empty,
  output logic             cr_pop,
  input  sample_t          b_data,
  input  logic             b_empty,
  output logic             b_pop,
  input  sample_t          bs_data,
  input  logic             bs_empty,
  output logic             bs_pop,
  output sample_t          p_data,
  output logic [N_OUT-1:0] p_push,
  input  logic [N_OUT-1:0] p_full,
  output logic             tap_valid,
  output logic             tap_cr,
  output sample_t          tap_lin
);

  logic       exec_en;
  logic [2:0] pops;

  kpn_node_ctrl #(.N_IN(3), .N_OUT(N_OUT), .WIDTH(WIDTH)) u_ctrl (
    .clk, .rst_n,
    .in_avail ({!cr_empty, !b_empty, !bs_empty}),
    .in_pop   (pops),
    .exec_en,
    .out_space(~p_full),
    .out_push (p_push),
    .writing  (),
    .iter     (),
    .iter_last()
  );

  assign {cr_pop, b_pop, bs_pop} = pops;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_data  <= '0;
      tap_cr  <= 1'b0;
      tap_lin <= '0;
    end else if (exec_en) begin
      p_data  <= cr_data ? b_data : bs_data;
      tap_cr  <= cr_data;
      tap_lin <= b_data;
    end
  end

  assign tap_valid = p_push[0];

endmodule
