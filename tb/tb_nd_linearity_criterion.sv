// Test of the linearity-criterion node: a synthetic ECG with interference
// arrives in the input link at random and the two output links are full at
// random. For every sample the criterion, |D| and the threshold are compared
// with the reference model; both links must be written together. Checks that
// both linear and non-linear verdicts occur.
module tb_nd_linearity_criterion;
  import tb_ref_pkg::*;

  localparam int N = 5, LEN = 1200;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic signed [31:0] x_data, d_abs, m;
  logic x_empty, x_pop, cr_data;
  logic [1:0] cr_push, cr_full;

  nd_linearity_criterion #(.N(N), .N_OUT(2), .WIDTH(64)) dut (.*);

  longint xq[$], clean[$], y_r[$], p_r[$], d_r[$], m_r[$];
  bit cr_r[$];
  logic signed [31:0] q[$];
  int checks = 0, failures = 0, n_fed = 0, n_out = 0, n_lin = 0, n_nl = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  assign x_empty = (q.size() == 0);
  assign x_data  = x_empty ? 32'sd0 : q[0];
  logic popped = 1'b0;
  always @(posedge clk) popped <= x_pop;
  always @(negedge clk) begin
    if (popped) void'(q.pop_front());
    if (rst_n && n_fed < LEN && $urandom % 2 == 0) begin q.push_back(32'(xq[n_fed])); n_fed++; end
    cr_full <= 2'($urandom % 4 == 0 ? $urandom : 0);
  end

  always @(posedge clk) if (rst_n && cr_push != '0) begin
    check(cr_push == 2'b11 && cr_full == 2'b00, "both links written, none full");
    check(cr_data == cr_r[n_out], $sformatf("cr[%0d] got %0d want %0d", n_out, cr_data, cr_r[n_out]));
    check(d_abs == 32'(d_r[n_out]), $sformatf("|D|[%0d] got %0d want %0d", n_out, d_abs, d_r[n_out]));
    check(m == 32'(m_r[n_out]), $sformatf("M[%0d]", n_out));
    if (cr_data) n_lin++; else n_nl++;
    n_out++;
  end

  initial begin
    make_ecg(LEN, N, 200, 0.1, xq, clean);
    run_ref(xq, N, y_r, p_r, cr_r, d_r, m_r);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (n_out == LEN);
    check(n_lin > 0 && n_nl > 0, "linear and non-linear verdicts");
    $display("linear %0d non-linear %0d", n_lin, n_nl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
