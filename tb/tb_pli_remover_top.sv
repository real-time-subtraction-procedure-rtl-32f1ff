// End-to-end test of the PLI remover at its default parameters.
//
// Streams a synthetic ECG with a 50 Hz interference (5 samples per mains
// period, as at 250 samples/s) through the design and compares every token
// of the three output streams, and their iteration tags, with the reference
// model in tb_ref_pkg. Valid and ready are randomised so that the input runs
// dry and the outputs stall; the test counts how often each mechanism of the
// design occurred (linear and non-linear segments, a full link, an output
// stall, an empty input, the iteration counter wrapping) and fails on any
// that never did. It also checks that the filtered output is much closer to
// the clean ECG than the input was.
module tb_pli_remover_top;
  import tb_ref_pkg::*;

  localparam int N     = 5;
  localparam int WIDTH = 1024;
  localparam int LEN   = 1300;
  localparam int CW    = $clog2(WIDTH + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     data_in_valid, data_in_ready;
  logic signed [31:0]       data_in;
  logic                     data_out_valid, data_out_ready;
  logic signed [31:0]       data_out;
  logic [CW-1:0]            data_out_iter;
  logic                     pli_out_valid, pli_out_ready;
  logic signed [31:0]       pli_out;
  logic [CW-1:0]            pli_out_iter;
  logic                     cr_out_valid, cr_out_ready, cr_out;
  logic [CW-1:0]            cr_out_iter;
  logic                     dt_valid, dt_cr;
  logic signed [31:0]       dt_pli, dt_lin;

  pli_remover_top dut (.*);

  longint x[$], clean[$], y_r[$], p_r[$], d_r[$], m_r[$];
  bit     cr_r[$];

  int checks = 0, failures = 0;
  int n_in = 0, n_y = 0, n_p = 0, n_c = 0, n_dt = 0;
  int ev_lin = 0, ev_nonlin = 0, ev_link_full = 0, ev_out_stall = 0;
  int ev_in_starve = 0, ev_wrap = 0;
  real err_in = 0.0, err_out = 0.0;
  bit  fast_phase;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int exp_iter(int k);
    return (k % WIDTH) + 1;
  endfunction

  // input driver: random gaps in the first half, back to back in a fast phase
  initial begin
    data_in_valid = 1'b0;
    data_in = '0;
    wait (rst_n);
    while (n_in < LEN) begin
      @(negedge clk);
      if (!data_in_valid && (fast_phase || ($urandom % 4 != 0))) begin
        data_in_valid = 1'b1;
        data_in = 32'(x[n_in]);
      end
      @(posedge clk);
      if (data_in_valid && data_in_ready) begin
        n_in++;
        #1 data_in_valid = 1'b0;
      end
    end
  end

  // output readiness: random stalls, except in the fast phase
  always @(negedge clk) begin
    data_out_ready <= fast_phase || ($urandom % 3 != 0);
    pli_out_ready  <= fast_phase || ($urandom % 3 != 0);
    cr_out_ready   <= fast_phase || ($urandom % 5 != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (data_out_valid && data_out_ready) begin
      check(data_out == 32'(y_r[n_y]), $sformatf("y[%0d] got %0d want %0d", n_y, data_out, y_r[n_y]));
      check(int'(data_out_iter) == exp_iter(n_y), "y iter");
      if (n_y >= 4 * N) begin
        err_in  += real'(x[n_y - N] - clean[n_y - N]) ** 2;
        err_out += real'(longint'(data_out) - clean[n_y - N]) ** 2;
      end
      if (int'(data_out_iter) == WIDTH) ev_wrap++;
      n_y++;
    end
    if (pli_out_valid && pli_out_ready) begin
      check(pli_out == 32'(p_r[n_p]), $sformatf("pli[%0d] got %0d want %0d", n_p, pli_out, p_r[n_p]));
      check(int'(pli_out_iter) == exp_iter(n_p), "pli iter");
      n_p++;
    end
    if (cr_out_valid && cr_out_ready) begin
      check(cr_out == cr_r[n_c], $sformatf("cr[%0d] got %0d want %0d", n_c, cr_out, cr_r[n_c]));
      check(int'(cr_out_iter) == exp_iter(n_c), "cr iter");
      if (cr_out) ev_lin++; else ev_nonlin++;
      n_c++;
    end
    if (dt_valid) begin
      check(dt_cr == cr_r[n_dt] && dt_pli == 32'(p_r[n_dt]), "deviation-tracker tap");
      n_dt++;
    end
    if (dut.x_full != '0 || dut.p_full != '0 || dut.cr_full != '0) ev_link_full++;
    if ((data_out_valid && !data_out_ready) || (pli_out_valid && !pli_out_ready)) ev_out_stall++;
    if (!data_in_valid && dut.u_nd3.u_ctrl.phase == dut.u_nd3.u_ctrl.S_READ) ev_in_starve++;
  end

  longint t_start, t_end;

  initial begin
    fast_phase = 1'b0;
    make_ecg(LEN, N, 200, 0.1, x, clean);
    run_ref(x, N, y_r, p_r, cr_r, d_r, m_r);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (n_y >= LEN / 2);
    fast_phase = 1'b1;
    // throughput with no stalls: cycles per sample over 100 samples
    wait (n_y >= LEN / 2 + 20);
    t_start = $time;
    wait (n_y >= LEN / 2 + 120);
    t_end = $time;
    $display("cycles per sample without stalls: %0d", (t_end - t_start) / 10 / 100);
    check((t_end - t_start) / 10 <= 100 * 8, "throughput of at most 8 cycles per sample");
    wait (n_y == LEN && n_p == LEN && n_c == LEN);
    repeat (5) @(posedge clk);
    check(n_dt == LEN, "one tap strobe per sample");
    $display("interference energy: input %0.3g, output %0.3g", err_in, err_out);
    check(err_out < 0.25 * err_in, "output much closer to the clean ECG than the input");
    $display("events: linear=%0d nonlinear=%0d link_full=%0d out_stall=%0d in_starve=%0d wrap=%0d",
             ev_lin, ev_nonlin, ev_link_full, ev_out_stall, ev_in_starve, ev_wrap);
    check(ev_lin > 0, "linear segments seen");
    check(ev_nonlin > 0, "non-linear segments seen");
    check(ev_link_full > 0, "a link ran full");
    check(ev_out_stall > 0, "an output stalled");
    check(ev_in_starve > 0, "a node waited for input");
    check(ev_wrap > 0, "iteration counter wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: y=%0d pli=%0d cr=%0d", n_y, n_p, n_c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
