// Test of the dynamic threshold: a synthetic ECG with interference is fed one
// sample at a time, with idle cycles in between, and all five tracked values
// are compared after every update with the reference model. Also checks that
// nothing changes while en is low, and that the threshold settles to a
// plausible fraction of the peak-to-peak amplitude.
module tb_dyn_threshold;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic en;
  logic signed [31:0] x, m, mmax, mmin, mpp, mmu;

  dyn_threshold dut (.*);

  longint xs_q[$], clean[$];
  thr_t t;
  int checks = 0, failures = 0, n_jump_max = 0, n_decay_max = 0, n_mmu_drop = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    en = 1'b0; x = '0;
    make_ecg(3000, 5, 200, 0.1, xs_q, clean);
    t = thr_reset();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < xs_q.size(); j++) begin
      @(negedge clk);
      x = 32'(xs_q[j]);
      en = 1'b1;
      if (xs_q[j] > t.mmax) n_jump_max++; else n_decay_max++;
      if (t.mmu > thr_step(t, xs_q[j]).mpp) n_mmu_drop++;
      t = thr_step(t, xs_q[j]);
      @(negedge clk);
      en = 1'b0;
      check(mmax == 32'(t.mmax) && mmin == 32'(t.mmin) && mpp == 32'(t.mpp) &&
            mmu == 32'(t.mmu) && m == 32'(t.m),
            $sformatf("sample %0d: m %0d/%0d mmax %0d/%0d mmin %0d/%0d mmu %0d/%0d",
                      j, m, t.m, mmax, t.mmax, mmin, t.mmin, mmu, t.mmu));
      x = 32'($urandom);   // ignored while en is low
      repeat ($urandom % 3) @(negedge clk);
      check(m == 32'(t.m) && mmax == 32'(t.mmax), "hold while en is low");
    end
    $display("final m=%0d mpp=%0d (Q16)", m, mpp);
    check(m > 0 && m < mpp / 5, "threshold settles between 0 and mpp/5");
    check(n_jump_max > 0 && n_decay_max > 0 && n_mmu_drop > 0, "every update branch taken");
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
