// Test of the FIFO link: random pushes and pops against a queue model, on a
// plain link and on a feedback link that starts with one zero token. Checks
// data order, full and empty, and that simultaneous push and pop keep the
// count.
module tb_kpn_fifo;

  localparam int DW = 16, DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          wr_en [2], rd_en [2], full [2], empty [2];
  logic [DW-1:0] wr_data [2], rd_data [2];

  kpn_fifo #(.DW(DW), .DEPTH(DEPTH), .INIT_TOKENS(0)) u_plain (
    .clk, .rst_n, .wr_en(wr_en[0]), .wr_data(wr_data[0]), .full(full[0]),
    .rd_en(rd_en[0]), .rd_data(rd_data[0]), .empty(empty[0]));
  kpn_fifo #(.DW(DW), .DEPTH(DEPTH), .INIT_TOKENS(1)) u_init (
    .clk, .rst_n, .wr_en(wr_en[1]), .wr_data(wr_data[1]), .full(full[1]),
    .rd_en(rd_en[1]), .rd_data(rd_data[1]), .empty(empty[1]));

  logic [DW-1:0] q [2][$];
  int checks = 0, failures = 0, n_full = 0, n_both = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int f = 0; f < 2; f++) begin wr_en[f] = 0; rd_en[f] = 0; wr_data[f] = '0; end
    q[0] = {};
    q[1] = {16'h0};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int f = 0; f < 2; f++) begin
        // state checks against the model
        check(empty[f] == (q[f].size() == 0), $sformatf("empty f%0d", f));
        check(full[f] == (q[f].size() == DEPTH), $sformatf("full f%0d", f));
        if (q[f].size() > 0) check(rd_data[f] == q[f][0], $sformatf("data f%0d", f));
        if (full[f]) n_full++;
        // bias towards filling in the first half, draining in the second
        wr_en[f] = !full[f] && ($urandom % 100 < ((cyc / 500) % 2 != 0 ? 30 : 70));
        rd_en[f] = !empty[f] && ($urandom % 100 < ((cyc / 500) % 2 != 0 ? 70 : 30));
        wr_data[f] = DW'($urandom);
        if (wr_en[f] && rd_en[f]) n_both++;
      end
      @(posedge clk);
      for (int f = 0; f < 2; f++) begin
        if (rd_en[f]) void'(q[f].pop_front());
        if (wr_en[f]) q[f].push_back(wr_data[f]);
      end
    end
    check(n_full > 0 && n_both > 0, "full and simultaneous push/pop seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
