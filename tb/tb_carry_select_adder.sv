// tb_carry_select_adder: exhaustive check of the 8-bit carry select adder,
// plus random checks of a 10-bit one whose top block is narrower than the
// others. Counts how often the carry between the two blocks was 1, so that
// both halves of the selection are exercised.
module tb_carry_select_adder;
  int checks = 0, failures = 0;
  int n_carry = 0;

  logic [7:0] a, b;
  logic [8:0] s;
  logic [9:0] a10, b10;
  logic [10:0] s10;

  carry_select_adder #(.W(8), .BLK(4))  dut   (.a(a), .b(b), .sum(s));
  carry_select_adder #(.W(10), .BLK(4)) dut10 (.a(a10), .b(b10), .sum(s10));

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
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (int'(s) != i + j) begin
          failures++;
          if (failures < 10) $display("%0d + %0d = %0d", i, j, s);
        end
        if ((i % 16) + (j % 16) >= 16) n_carry++;
      end
    for (int k = 0; k < 20000; k++) begin
      a10 = 10'($urandom); b10 = 10'($urandom);
      #1;
      checks++;
      if (int'(s10) != int'(a10) + int'(b10)) failures++;
    end
    checks++;
    if (n_carry == 0) failures++;
    $display("block carry taken %0d times", n_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
