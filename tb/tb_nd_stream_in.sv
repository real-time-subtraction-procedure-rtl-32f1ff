// Test of the stream-in node: random valid gaps on the input and random full
// output links. Every sample must be written once, in order, into all three
// links in the same cycle, only when none is full, with its iteration number.
module tb_nd_stream_in;

  localparam int WIDTH = 7;
  localparam int CW = $clog2(WIDTH + 1);
  localparam int LEN = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready;
  logic signed [31:0] in_data, out_data;
  logic [2:0] out_push, out_full;
  logic [CW-1:0] out_iter;

  nd_stream_in #(.N_OUT(3), .WIDTH(WIDTH)) dut (.*);

  logic signed [31:0] samples [LEN];
  int checks = 0, failures = 0, n_in = 0, n_out = 0, n_blocked = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < LEN; i++) samples[i] = 32'($urandom);
    in_valid = 1'b0; in_data = '0;
    wait (rst_n);
    while (n_in < LEN) begin
      @(negedge clk);
      if (!in_valid && $urandom % 3 != 0) begin in_valid = 1'b1; in_data = samples[n_in]; end
      @(posedge clk);
      if (in_valid && in_ready) begin n_in++; #1 in_valid = 1'b0; end
    end
  end

  always @(negedge clk) out_full <= 3'($urandom % 4 == 0 ? $urandom : 0);

  always @(posedge clk) if (rst_n) begin
    if (out_push != '0) begin
      check(out_push == 3'b111, "all links written together");
      check(out_full == 3'b000, "no write into a full link");
      check(out_data == samples[n_out], $sformatf("sample %0d", n_out));
      check(int'(out_iter) == (n_out % WIDTH) + 1, "iteration");
      n_out++;
    end else if (out_full != '0) n_blocked++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (n_out == LEN);
    check(n_blocked > 0, "a full link held the node");
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
