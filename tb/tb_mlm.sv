// tb_mlm: exhaustive check of the 8 x 8 multiplierless multiplier against the
// arithmetic reference (shift-and-add with the segmented adder model). Also
// checks that the product is exact while every running sum stays below 2^8
// (multiplicand and multiplier small) and that all three adder segment cases
// occurred during the sweep.
module tb_mlm;
  import amlm_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_exact = 0;

  logic [7:0]  a, b;
  logic [15:0] p;

  mlm #(.N(8)) dut (.a(a), .b(b), .p(p));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        longint unsigned e;
        a = 8'(i); b = 8'(j);
        #1;
        e = ref_mlm(64'(i), 64'(j), 8);
        checks++;
        if (64'(p) != e) begin
          failures++;
          if (failures < 10) $display("%0d * %0d -> %0d, expected %0d", i, j, p, e);
        end
        if (i * j < 256) begin
          checks++;
          if (int'(p) != i * j) failures++;
          n_exact++;
        end
      end
    for (int n = 0; n < 3; n++) begin
      checks++;
      if (acsa_case_cnt[n] == 0) failures++;
    end
    $display("exact-range products checked: %0d", n_exact);
    $display("adder segment cases 00/01/10: %0d %0d %0d",
             acsa_case_cnt[0], acsa_case_cnt[1], acsa_case_cnt[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
