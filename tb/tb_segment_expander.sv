// tb_segment_expander: checks placement of the segment product.
//
// Drives random products with all four select combinations into the 8-of-16
// expander and a 10-of-16 one, and compares with z * 2^((Y-X) * selects).
// Includes the published examples 1020 -> 66846720 (both upper) and
// 498 -> 127488 (one upper).
module tb_segment_expander;
  import amlm_pkg::*;

  int checks = 0, failures = 0;
  int n_case [3] = '{0, 0, 0};

  logic        hi_a, hi_b;
  logic [15:0] z8;
  logic [19:0] z10;
  logic [31:0] p8, p10;
  seg_sel_e    sel8, sel10;

  segment_expander #(.Y(16), .X(8))  dut8  (.hi_a(hi_a), .hi_b(hi_b), .z(z8),  .p(p8),  .sel(sel8));
  segment_expander #(.Y(16), .X(10)) dut10 (.hi_a(hi_a), .hi_b(hi_b), .z(z10), .p(p10), .sel(sel10));

  task automatic check(input logic [15:0] z, input logic [19:0] zz, input bit ha, input bit hb);
    int n;
    longint unsigned e8, e10;
    z8 = z; z10 = zz; hi_a = ha; hi_b = hb;
    #1;
    n = int'(ha) + int'(hb);
    e8  = longint'(z)  * (64'd1 << (8 * n));
    e10 = longint'(zz) * (64'd1 << (6 * n));
    checks++;
    if (64'(p8) != e8 || int'(sel8) != n) begin
      failures++;
      if (failures < 10) $display("X=8 z=%0d ha=%0b hb=%0b p=%0d exp=%0d", z, ha, hb, p8, e8);
    end
    checks++;
    if (64'(p10) != e10 || int'(sel10) != n) begin
      failures++;
      if (failures < 10) $display("X=10 z=%0d ha=%0b hb=%0b p=%0d exp=%0d", zz, ha, hb, p10, e10);
    end
    n_case[n]++;
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'd1020, 20'd1020, 1, 1);
    checks++; if (p8 != 32'd66846720) failures++;
    check(16'd498, 20'd498, 0, 1);
    checks++; if (p8 != 32'd127488) failures++;
    for (int i = 0; i < 20000; i++)
      check(16'($urandom), 20'($urandom), 1'($urandom), 1'($urandom));
    for (int n = 0; n < 3; n++) begin
      checks++;
      if (n_case[n] == 0) failures++;
    end
    $display("cases i/j/k: %0d %0d %0d", n_case[0], n_case[1], n_case[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
