// Test of the non-linear-segment node: random feedback tokens (the
// interference of the previous iteration) arrive at random while the output
// link is full at random. Output k must be the feedback token of k+1-N, or
// zero while the temporal buffer still holds its reset value.
module tb_nd_non_linear;

  localparam int N = 5, LEN = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic signed [31:0] p_data, bs_data;
  logic p_empty, p_pop, bs_push, bs_full;

  nd_non_linear #(.N(N), .WIDTH(64)) dut (.*);

  logic signed [31:0] pin[$], q[$], expv;
  int checks = 0, failures = 0, n_fed = 0, n_out = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  assign p_empty = (q.size() == 0);
  assign p_data  = p_empty ? 32'sd0 : q[0];
  logic popped = 1'b0;
  always @(posedge clk) popped <= p_pop;
  always @(negedge clk) begin
    if (popped) void'(q.pop_front());
    if (rst_n && n_fed < LEN && $urandom % 2 == 0) begin
      logic signed [31:0] v;
      v = 32'($urandom);
      pin.push_back(v); q.push_back(v); n_fed++;
    end
    bs_full <= ($urandom % 4 == 0);
  end

  always @(posedge clk) if (rst_n && bs_push) begin
    check(!bs_full, "no write into a full link");
    expv = (n_out + 1 - N >= 0) ? pin[n_out + 1 - N] : 32'sd0;
    check(bs_data == expv, $sformatf("B*[%0d] got %0d want %0d", n_out, bs_data, expv));
    n_out++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (n_out == LEN);
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
