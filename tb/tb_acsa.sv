// tb_acsa: checks the approximate carry select adder (16-bit addends,
// 8-bit segments) against the arithmetic reference on directed and random
// addends, with operand magnitudes chosen so that all three segment cases
// (both lower, one upper, both upper) occur; each must occur at least once.
// Also checks that the adder is exact while both addends are below 2^8.
module tb_acsa;
  import amlm_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [15:0] a, b;
  logic [16:0] s;

  acsa #(.Y(16), .X(8)) dut (.a(a), .b(b), .s(s));

  task automatic check(input logic [15:0] va, input logic [15:0] vb);
    longint unsigned e;
    a = va; b = vb;
    #1;
    e = ref_acsa(64'(va), 64'(vb), 16, 8);
    checks++;
    if (64'(s) != e) begin
      failures++;
      if (failures < 10) $display("%0d + %0d -> %0d, expected %0d", va, vb, s, e);
    end
  endtask

  function automatic logic [15:0] rnd_opnd();
    // half of the operands small, half full range
    return ($urandom_range(1) != 0) ? 16'($urandom_range(255)) : 16'($urandom);
  endfunction

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // published input pairs: 125 + 137 (both lower), 234 + 256 (one upper)
    check(16'd125, 16'd137);
    checks++; if (s != 17'd262) failures++;
    check(16'd234, 16'd256);
    checks++; if (s != 17'(235 * 16)) failures++;
    check(16'hFFFF, 16'hFFFF);
    checks++; if (s != 17'(510 * 256)) failures++;
    for (int i = 0; i < 50000; i++) check(rnd_opnd(), rnd_opnd());
    for (int i = 0; i < 2000; i++) begin
      a = 16'($urandom_range(255)); b = 16'($urandom_range(255));
      #1;
      checks++;
      if (int'(s) != int'(a) + int'(b)) failures++;
    end
    for (int n = 0; n < 3; n++) begin
      checks++;
      if (acsa_case_cnt[n] == 0) failures++;
    end
    $display("segment cases 00/01/10: %0d %0d %0d",
             acsa_case_cnt[0], acsa_case_cnt[1], acsa_case_cnt[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
