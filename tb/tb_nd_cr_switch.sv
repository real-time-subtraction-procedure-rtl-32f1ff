// Test of the switch node: criterion, linear and restored estimates arrive in
// three links independently and at random; the three output links are full
// at random. Each output must be B when the criterion is 1 and B* otherwise,
// written to all three links together, with the tap showing the same tokens.
module tb_nd_cr_switch;

  localparam int LEN = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic cr_data, cr_empty, cr_pop, b_empty, b_pop, bs_empty, bs_pop;
  logic signed [31:0] b_data, bs_data, p_data, tap_lin;
  logic [2:0] p_push, p_full;
  logic tap_valid, tap_cr;

  nd_cr_switch #(.N_OUT(3), .WIDTH(64)) dut (.*);

  logic cr_all[$], cq[$];
  logic signed [31:0] b_all[$], bs_all[$], bq[$], bsq[$], expv;
  int checks = 0, failures = 0, n_c = 0, n_b = 0, n_bs = 0, n_out = 0, n_lin = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  assign cr_empty = (cq.size() == 0);
  assign cr_data  = cr_empty ? 1'b0 : cq[0];
  assign b_empty  = (bq.size() == 0);
  assign b_data   = b_empty ? 32'sd0 : bq[0];
  assign bs_empty = (bsq.size() == 0);
  assign bs_data  = bs_empty ? 32'sd0 : bsq[0];

  logic [2:0] popped = '0;
  always @(posedge clk) popped <= {cr_pop, b_pop, bs_pop};
  always @(negedge clk) begin
    if (popped[2]) void'(cq.pop_front());
    if (popped[1]) void'(bq.pop_front());
    if (popped[0]) void'(bsq.pop_front());
    if (rst_n) begin
      if (n_c < LEN && $urandom % 3 == 0) begin cq.push_back(cr_all[n_c]); n_c++; end
      if (n_b < LEN && $urandom % 3 == 0) begin bq.push_back(b_all[n_b]); n_b++; end
      if (n_bs < LEN && $urandom % 3 == 0) begin bsq.push_back(bs_all[n_bs]); n_bs++; end
    end
    p_full <= 3'($urandom % 4 == 0 ? $urandom : 0);
  end

  always @(posedge clk) if (rst_n && p_push != '0) begin
    check(p_push == 3'b111 && p_full == 3'b000, "all links written together, none full");
    expv = cr_all[n_out] ? b_all[n_out] : bs_all[n_out];
    check(p_data == expv, $sformatf("pli[%0d] got %0d want %0d", n_out, p_data, expv));
    check(tap_valid && tap_cr == cr_all[n_out] && tap_lin == b_all[n_out], "tap");
    if (cr_all[n_out]) n_lin++;
    n_out++;
  end

  initial begin
    for (int i = 0; i < LEN; i++) begin
      cr_all.push_back(1'($urandom));
      b_all.push_back(32'($urandom));
      bs_all.push_back(32'($urandom));
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (n_out == LEN);
    check(n_lin > 0 && n_lin < LEN, "both selections made");
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
