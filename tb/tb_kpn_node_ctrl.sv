// Test of the read / execute / write node shell with two inputs and two
// outputs. Tokens become available and output space opens at random; the
// test checks that execute happens only once all inputs hold a token, pops
// every input exactly then, pushes all outputs together only when all have
// space, takes 3 cycles per firing when nothing waits, and counts iterations
// 1..WIDTH with a wrap.
module tb_kpn_node_ctrl;

  localparam int WIDTH = 5;
  localparam int CW = $clog2(WIDTH + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] in_avail, in_pop, out_space, out_push;
  logic       exec_en, writing, iter_last;
  logic [CW-1:0] iter;

  kpn_node_ctrl #(.N_IN(2), .N_OUT(2), .WIDTH(WIDTH)) dut (.*);

  int checks = 0, failures = 0;
  int fires = 0, execs = 0, exp_iter = 1, state = 0;   // 0 read, 1 exec, 2 write
  bit free_run;
  longint t_first, t_last;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // a token, once available, stays until it is popped
  logic [1:0] popped;
  always @(posedge clk) popped <= in_pop;
  always @(negedge clk) begin
    in_avail  <= free_run ? 2'b11 : ((in_avail & ~popped) | 2'($urandom % 4 == 0 ? $urandom : 0));
    out_space <= free_run ? 2'b11 : 2'($urandom);
  end

  // independent phase model
  always @(posedge clk) if (rst_n) begin
    check(exec_en == (state == 1), "exec only after all inputs");
    check(in_pop == {2{state == 1}}, "pop all inputs in execute");
    check(writing == (state == 2), "write phase");
    check(out_push == {2{state == 2 && out_space == 2'b11}}, "push all outputs when all have space");
    check(int'(iter) == exp_iter, "iteration counter");
    check(iter_last == (exp_iter == WIDTH), "last iteration flag");
    case (state)
      0: if (in_avail == 2'b11) state = 1;
      1: begin state = 2; execs++; end
      2: if (out_space == 2'b11) begin
           state = 0; fires++;
           exp_iter = (exp_iter == WIDTH) ? 1 : exp_iter + 1;
           if (free_run) t_last = $time;
         end
    endcase
  end

  initial begin
    free_run = 1'b0;
    in_avail = '0; out_space = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (fires >= 40);
    @(negedge clk);
    free_run = 1'b1;
    wait (fires >= 45);
    t_first = $time;
    wait (fires >= 55);
    #1;
    check((t_last - t_first) == 10 * 3 * 10, $sformatf("3 cycles per firing, got %0d", (t_last - t_first) / 10));
    check(execs >= 55, "executions counted");
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
