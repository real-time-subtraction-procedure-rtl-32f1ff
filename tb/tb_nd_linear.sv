// Test of the linear-segment node: a synthetic ECG with interference, plus
// random samples of both signs, arrives at random while the output link is
// full at random. Every estimate B is compared with the moving-average
// reference, including the zero history before the first sample.
module tb_nd_linear;
  import tb_ref_pkg::*;

  localparam int N = 5, LEN = 800;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic signed [31:0] x_data, b_data;
  logic x_empty, x_pop, b_push, b_full;

  nd_linear #(.N(N), .WIDTH(64)) dut (.*);

  longint xq[$], clean[$];
  logic signed [31:0] q[$];
  int checks = 0, failures = 0, n_fed = 0, n_out = 0, n_neg = 0;

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
    b_full <= ($urandom % 4 == 0);
  end

  always @(posedge clk) if (rst_n && b_push) begin
    check(!b_full, "no write into a full link");
    check(b_data == 32'(lin_at(xq, N, n_out)),
          $sformatf("B[%0d] got %0d want %0d", n_out, b_data, lin_at(xq, N, n_out)));
    if (b_data < 0) n_neg++;
    n_out++;
  end

  initial begin
    make_ecg(LEN / 2, N, 200, 0.1, xq, clean);
    for (int i = 0; i < LEN / 2; i++) xq.push_back(longint'($signed($urandom % 200001)) - 100000);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (n_out == LEN);
    check(n_neg > 0, "negative estimates seen");
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
