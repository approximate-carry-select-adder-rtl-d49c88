// tb_amlm: end-to-end test of the approximate multiplier at its default size
// (16 x 16 operands, 8-bit segments, multiplierless core).
//
// Applies directed operand pairs (the published ones included) and random
// pairs of mixed magnitude, compares p and sel with the arithmetic reference,
// and counts how often each output term (i, j, k) and each adder segment case
// inside the core occurred; a mechanism that never occurred is a failure.
// Products of operands below 2^8 whose running sums stay below 2^8 must be
// exact. The mean relative error |exact - approx| / exact over the random
// pairs is printed for information.
module tb_amlm;
  import amlm_pkg::*;
  import amlm_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_sel [3] = '{0, 0, 0};
  real err_sum = 0.0;
  int  err_n = 0;

  logic [15:0] a, b;
  logic [31:0] p;
  seg_sel_e    sel;

  amlm dut (.a(a), .b(b), .p(p), .sel(sel));

  task automatic check(input logic [15:0] va, input logic [15:0] vb);
    longint unsigned e;
    int n;
    a = va; b = vb;
    #1;
    e = ref_amlm(64'(va), 64'(vb), 16, 8, 1'b0);
    n = int'(va > 16'd255) + int'(vb > 16'd255);
    checks++;
    if (64'(p) != e || int'(sel) != n) begin
      failures++;
      if (failures < 10) $display("%0d * %0d -> %0d sel %0d, expected %0d sel %0d",
                                  va, vb, p, sel, e, n);
    end
    n_sel[n]++;
    if (va != 0 && vb != 0) begin
      real t;
      t = real'(longint'(va) * longint'(vb));
      err_sum += ((t > real'(p)) ? t - real'(p) : real'(p) - t) / t;
      err_n++;
    end
  endtask

  function automatic logic [15:0] rnd_opnd();
    return ($urandom_range(1) != 0) ? 16'($urandom_range(255)) : 16'($urandom);
  endfunction

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'd21828, 16'd3216);
    check(16'd249, 16'd674);
    check(16'd6, 16'd10);
    checks++; if (p != 32'd60) failures++;
    check(16'd15, 16'd15);
    checks++; if (p != 32'd225) failures++;
    check(16'hFFFF, 16'hFFFF);
    check(16'd0, 16'd40000);
    checks++; if (p != 32'd0) failures++;
    for (int i = 0; i < 100000; i++) check(rnd_opnd(), rnd_opnd());
    for (int n = 0; n < 3; n++) begin
      checks++;
      if (n_sel[n] == 0) failures++;
      checks++;
      if (acsa_case_cnt[n] == 0) failures++;
    end
    $display("output terms i/j/k: %0d %0d %0d", n_sel[0], n_sel[1], n_sel[2]);
    $display("core adder segment cases 00/01/10: %0d %0d %0d",
             acsa_case_cnt[0], acsa_case_cnt[1], acsa_case_cnt[2]);
    $display("mean relative error over %0d products: %f", err_n, err_sum / err_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
