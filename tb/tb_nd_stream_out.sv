// Test of the stream-out node: tokens arrive in its input link at random and
// the outside accepts them at random. Every token must leave once, in order,
// with its iteration number, and stay steady while it waits for ready.
module tb_nd_stream_out;

  localparam int WIDTH = 6;
  localparam int CW = $clog2(WIDTH + 1);
  localparam int LEN = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] in_data, out_data;
  logic in_empty, in_pop, out_valid, out_ready;
  logic [CW-1:0] out_iter;

  nd_stream_out #(.DW(16), .WIDTH(WIDTH)) dut (.*);

  logic [15:0] q[$], sent[$];
  int checks = 0, failures = 0, n_out = 0, n_wait = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // input link model
  assign in_empty = (q.size() == 0);
  assign in_data  = in_empty ? 16'h0 : q[0];
  logic popped = 1'b0;
  always @(posedge clk) popped <= in_pop;
  always @(negedge clk) begin
    if (popped) void'(q.pop_front());
    if (rst_n && sent.size() < LEN && $urandom % 4 == 0) begin
      logic [15:0] v;
      v = 16'($urandom);
      q.push_back(v);
      sent.push_back(v);
    end
    out_ready <= ($urandom % 3 != 0);
  end

  logic [15:0] last_data;
  logic        last_waiting = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (last_waiting) check(out_valid && out_data == last_data, "token held while not ready");
    last_waiting <= out_valid && !out_ready;
    last_data    <= out_data;
    if (out_valid && !out_ready) n_wait++;
    if (out_valid && out_ready) begin
      check(out_data == sent[n_out], $sformatf("token %0d", n_out));
      check(int'(out_iter) == (n_out % WIDTH) + 1, "iteration");
      n_out++;
    end
  end

  initial begin
    out_ready = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (n_out == LEN);
    check(n_wait > 0, "outside stalled the node");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
