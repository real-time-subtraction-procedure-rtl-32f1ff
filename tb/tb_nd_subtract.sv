// Test of the subtraction node: ECG samples and interference tokens arrive in
// their links independently and at random; the output link is full at
// random. Output j must be X_(j-N) - pli_j, with zero ECG before the first
// sample.
module tb_nd_subtract;

  localparam int N = 5, LEN = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic signed [31:0] x_data, p_data, y_data;
  logic x_empty, x_pop, p_empty, p_pop, y_push, y_full;

  nd_subtract #(.N(N), .WIDTH(64)) dut (.*);

  logic signed [31:0] x_all[$], p_all[$], xq[$], pq[$], expv;
  int checks = 0, failures = 0, n_x = 0, n_p = 0, n_out = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  assign x_empty = (xq.size() == 0);
  assign x_data  = x_empty ? 32'sd0 : xq[0];
  assign p_empty = (pq.size() == 0);
  assign p_data  = p_empty ? 32'sd0 : pq[0];

  logic [1:0] popped = '0;
  always @(posedge clk) popped <= {x_pop, p_pop};
  always @(negedge clk) begin
    if (popped[1]) void'(xq.pop_front());
    if (popped[0]) void'(pq.pop_front());
    if (rst_n) begin
      if (n_x < LEN && $urandom % 3 == 0) begin xq.push_back(x_all[n_x]); n_x++; end
      if (n_p < LEN && $urandom % 3 == 0) begin pq.push_back(p_all[n_p]); n_p++; end
    end
    y_full <= ($urandom % 4 == 0);
  end

  always @(posedge clk) if (rst_n && y_push) begin
    check(!y_full, "no write into a full link");
    expv = ((n_out >= N) ? x_all[n_out - N] : 32'sd0) - p_all[n_out];
    check(y_data == expv, $sformatf("y[%0d] got %0d want %0d", n_out, y_data, expv));
    n_out++;
  end

  initial begin
    for (int i = 0; i < LEN; i++) begin
      x_all.push_back(32'($signed($urandom % 2000001) - 1000000));
      p_all.push_back(32'($signed($urandom % 20001) - 10000));
    end
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
