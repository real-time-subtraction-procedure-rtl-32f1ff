// Real-time power-line interference (PLI) remover for the ECG, built as a
// process network of independent hardware nodes joined by FIFO links.
//
// The subtraction procedure judges each sample X_c: on a linear segment of
// the ECG it measures the interference directly (linear node), elsewhere it
// restores it from the value one mains period earlier (non-linear node); the
// linearity criterion picks one (switch node) and the subtractor removes it.
// Nodes and links, as in the network of the algorithm:
//   ND_3  stream in ............ links to ND_4, ND_7, ND_9
//   ND_4  linearity criterion .. links to ND_8, ND_12
//   ND_6  non-linear (restore) . link to ND_8
//   ND_7  linear (extract) ..... link to ND_8
//   ND_8  switch ............... links to ND_9, ND_11, and back to ND_6
//   ND_9  subtract ............. link to ND_10
//   ND_10 / ND_11 / ND_12 ...... stream out filtered ECG / PLI / criterion
// The feedback link ND_8 -> ND_6 holds one zero token after reset, the
// interference of iteration 0. The frequency-deviation node ND_5 of the
// network and its links are not part of this design: with a sampling rate
// that is an exact multiple of the mains frequency the filters here need no
// frequency correction. The signals that node reads are brought out on the
// dt_* ports (valid for one cycle on dt_valid, once per sample). Links of the
// network that only fed ND_5's results, or an input this design's filters do
// not use (ND_3 -> ND_6, ND_8 -> ND_7), are left out.
//
// Interface: samples enter on a valid/ready stream (data_in_*) and leave on
// three valid/ready streams (data_out_*, pli_out_*, cr_out_*), each tagged
// with its iteration number 1..WIDTH. The output of iteration j belongs to
// input sample j - N: the first N outputs describe the zero samples before
// the stream. N is the number of samples per mains period (fs / f_mains),
// odd. Every node needs at least 3 cycles per sample; the feedback loop
// through ND_6 and ND_8 limits the rate to one sample per 6 cycles when no
// output stalls.
module pli_remover_top
  import pli_pkg::*;
#(
  parameter int N          = 5,
  parameter int WIDTH      = 1024,
  parameter int LINK_DEPTH = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  // ECG in (ND_3)
  input  logic    data_in_valid,
  output logic    data_in_ready,
  input  sample_t data_in,
  // filtered ECG out (ND_10)
  output logic    data_out_valid,
  input  logic    data_out_ready,
  output sample_t data_out,
  output logic [$clog2(WIDTH+1)-1:0] data_out_iter,
  // interference out (ND_11)
  output logic    pli_out_valid,
  input  logic    pli_out_ready,
  output sample_t pli_out,
  output logic [$clog2(WIDTH+1)-1:0] pli_out_iter,
  // linearity criterion out (ND_12), 1 = linear segment
  output logic    cr_out_valid,
  input  logic    cr_out_ready,
  output logic    cr_out,
  output logic [$clog2(WIDTH+1)-1:0] cr_out_iter,
  // inputs of the frequency-deviation tracker, which is not built here
  output logic    dt_valid,
  output logic    dt_cr,
  output sample_t dt_pli,
  output sample_t dt_lin
);

  // ---------------------------------------------------------------- ND_3
  sample_t    x_tok;
  logic [2:0] x_push, x_full;            // to ND_4, ND_7, ND_9

  nd_stream_in #(.N_OUT(3), .WIDTH(WIDTH)) u_nd3 (
    .clk, .rst_n,
    .in_valid(data_in_valid), .in_ready(data_in_ready), .in_data(data_in),
    .out_data(x_tok), .out_push(x_push), .out_full(x_full),
    .out_iter()
  );

  sample_t x4_d, x7_d, x9_d;
  logic    x4_e, x7_e, x9_e, x4_pop, x7_pop, x9_pop;

  kpn_fifo #(.DW(DATA_W), .DEPTH(LINK_DEPTH)) u_l3_4 (
    .clk, .rst_n, .wr_en(x_push[0]), .wr_data(x_tok), .full(x_full[0]),
    .rd_en(x4_pop), .rd_data(x4_d), .empty(x4_e));
  kpn_fifo #(.DW(DATA_W), .DEPTH(LINK_DEPTH)) u_l3_7 (
    .clk, .rst_n, .wr_en(x_push[1]), .wr_data(x_tok), .full(x_full[1]),
    .rd_en(x7_pop), .rd_data(x7_d), .empty(x7_e));
  kpn_fifo #(.DW(DATA_W), .DEPTH(LINK_DEPTH)) u_l3_9 (
    .clk, .rst_n, .wr_en(x_push[2]), .wr_data(x_tok), .full(x_full[2]),
    .rd_en(x9_pop), .rd_data(x9_d), .empty(x9_e));

  // ---------------------------------------------------------------- ND_4
  logic       cr_tok;
  logic [1:0] cr_push, cr_full;          // to ND_8, ND_12

  nd_linearity_criterion #(.N(N), .N_OUT(2), .WIDTH(WIDTH)) u_nd4 (
    .clk, .rst_n,
    .x_data(x4_d), .x_empty(x4_e), .x_pop(x4_pop),
    .cr_data(cr_tok), .cr_push(cr_push), .cr_full(cr_full),
    .d_abs(), .m()
  );

  logic cr8_d, cr12_d, cr8_e, cr12_e, cr8_pop, cr12_pop;

  kpn_fifo #(.DW(1), .DEPTH(LINK_DEPTH)) u_l4_8 (
    .clk, .rst_n, .wr_en(cr_push[0]), .wr_data(cr_tok), .full(cr_full[0]),
    .rd_en(cr8_pop), .rd_data(cr8_d), .empty(cr8_e));
  kpn_fifo #(.DW(1), .DEPTH(LINK_DEPTH)) u_l4_12 (
    .clk, .rst_n, .wr_en(cr_push[1]), .wr_data(cr_tok), .full(cr_full[1]),
    .rd_en(cr12_pop), .rd_data(cr12_d), .empty(cr12_e));

  // ---------------------------------------------------------------- ND_7
  sample_t b_tok, b8_d;
  logic    b_push, b_full, b8_e, b8_pop;

  nd_linear #(.N(N), .WIDTH(WIDTH)) u_nd7 (
    .clk, .rst_n,
    .x_data(x7_d), .x_empty(x7_e), .x_pop(x7_pop),
    .b_data(b_tok), .b_push(b_push), .b_full(b_full)
  );

  kpn_fifo #(.DW(DATA_W), .DEPTH(LINK_DEPTH)) u_l7_8 (
    .clk, .rst_n, .wr_en(b_push), .wr_data(b_tok), .full(b_full),
    .rd_en(b8_pop), .rd_data(b8_d), .empty(b8_e));

  // ---------------------------------------------------------------- ND_6
  sample_t bs_tok, bs8_d, p6_d;
  logic    bs_push, bs_full, bs8_e, bs8_pop, p6_e, p6_pop;

  nd_non_linear #(.N(N), .WIDTH(WIDTH)) u_nd6 (
    .clk, .rst_n,
    .p_data(p6_d), .p_empty(p6_e), .p_pop(p6_pop),
    .bs_data(bs_tok), .bs_push(bs_push), .bs_full(bs_full)
  );

  kpn_fifo #(.DW(DATA_W), .DEPTH(LINK_DEPTH)) u_l6_8 (
    .clk, .rst_n, .wr_en(bs_push), .wr_data(bs_tok), .full(bs_full),
    .rd_en(bs8_pop), .rd_data(bs8_d), .empty(bs8_e));

  // ---------------------------------------------------------------- ND_8
  sample_t    p_tok;
  logic [2:0] p_push, p_full;            // to ND_9, ND_11, ND_6

  nd_cr_switch #(.N_OUT(3), .WIDTH(WIDTH)) u_nd8 (
    .clk, .rst_n,
    .cr_data(cr8_d), .cr_empty(cr8_e), .cr_pop(cr8_pop),
    .b_data(b8_d), .b_empty(b8_e), .b_pop(b8_pop),
    .bs_data(bs8_d), .bs_empty(bs8_e), .bs_pop(bs8_pop),
    .p_data(p_tok), .p_push(p_push), .p_full(p_full),
    .tap_valid(dt_valid), .tap_cr(dt_cr), .tap_lin(dt_lin)
  );

  assign dt_pli = p_tok;

  sample_t p9_d, p11_d;
  logic    p9_e, p11_e, p9_pop, p11_pop;

  kpn_fifo #(.DW(DATA_W), .DEPTH(LINK_DEPTH)) u_l8_9 (
    .clk, .rst_n, .wr_en(p_push[0]), .wr_data(p_tok), .full(p_full[0]),
    .rd_en(p9_pop), .rd_data(p9_d), .empty(p9_e));
  kpn_fifo #(.DW(DATA_W), .DEPTH(LINK_DEPTH)) u_l8_11 (
    .clk, .rst_n, .wr_en(p_push[1]), .wr_data(p_tok), .full(p_full[1]),
    .rd_en(p11_pop), .rd_data(p11_d), .empty(p11_e));
  // feedback: ecg_pli[j-1] for iteration j, starting with ecg_pli[0] = 0
  kpn_fifo #(.DW(DATA_W), .DEPTH(LINK_DEPTH), .INIT_TOKENS(1)) u_l8_6 (
    .clk, .rst_n, .wr_en(p_push[2]), .wr_data(p_tok), .full(p_full[2]),
    .rd_en(p6_pop), .rd_data(p6_d), .empty(p6_e));

  // ---------------------------------------------------------------- ND_9
  sample_t y_tok, y10_d;
  logic    y_push, y_full, y10_e, y10_pop;

  nd_subtract #(.N(N), .WIDTH(WIDTH)) u_nd9 (
    .clk, .rst_n,
    .x_data(x9_d), .x_empty(x9_e), .x_pop(x9_pop),
    .p_data(p9_d), .p_empty(p9_e), .p_pop(p9_pop),
    .y_data(y_tok), .y_push(y_push), .y_full(y_full)
  );

  kpn_fifo #(.DW(DATA_W), .DEPTH(LINK_DEPTH)) u_l9_10 (
    .clk, .rst_n, .wr_en(y_push), .wr_data(y_tok), .full(y_full),
    .rd_en(y10_pop), .rd_data(y10_d), .empty(y10_e));

  // ------------------------------------------------- ND_10, ND_11, ND_12
  nd_stream_out #(.DW(DATA_W), .WIDTH(WIDTH)) u_nd10 (
    .clk, .rst_n,
    .in_data(y10_d), .in_empty(y10_e), .in_pop(y10_pop),
    .out_valid(data_out_valid), .out_ready(data_out_ready),
    .out_data(data_out), .out_iter(data_out_iter)
  );

  nd_stream_out #(.DW(DATA_W), .WIDTH(WIDTH)) u_nd11 (
    .clk, .rst_n,
    .in_data(p11_d), .in_empty(p11_e), .in_pop(p11_pop),
    .out_valid(pli_out_valid), .out_ready(pli_out_ready),
    .out_data(pli_out), .out_iter(pli_out_iter)
  );

  nd_stream_out #(.DW(1), .WIDTH(WIDTH)) u_nd12 (
    .clk, .rst_n,
    .in_data(cr12_d), .in_empty(cr12_e), .in_pop(cr12_pop),
    .out_valid(cr_out_valid), .out_ready(cr_out_ready),
    .out_data(cr_out), .out_iter(cr_out_iter)
  );

endmodule
