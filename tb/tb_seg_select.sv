// tb_seg_select: exhaustive check of the operand segment selector.
//
// Every 16-bit operand is applied to the 8-of-16 selector and to a 10-of-16
// selector; segment and select are compared with the arithmetic reference.
// Counts how often each of the upper and lower segments was taken.
module tb_seg_select;
  import amlm_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_hi = 0, n_lo = 0;

  logic [15:0] opnd;
  logic [7:0]  seg8;
  logic [9:0]  seg10;
  logic        hi8, hi10;

  seg_select #(.Y(16), .X(8))  dut8  (.opnd(opnd), .seg(seg8),  .hi(hi8));
  seg_select #(.Y(16), .X(10)) dut10 (.opnd(opnd), .seg(seg10), .hi(hi10));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      opnd = 16'(v);
      #1;
      checks++;
      if (hi8 != ref_hi(64'(v), 8) || 64'(seg8) != ref_seg(64'(v), 16, 8)) begin
        failures++;
        if (failures < 10) $display("X=8 opnd=%0d seg=%0d hi=%0b", v, seg8, hi8);
      end
      checks++;
      if (hi10 != ref_hi(64'(v), 10) || 64'(seg10) != ref_seg(64'(v), 16, 10)) begin
        failures++;
        if (failures < 10) $display("X=10 opnd=%0d seg=%0d hi=%0b", v, seg10, hi10);
      end
      if (hi8) n_hi++; else n_lo++;
    end
    // examples from the published simulation: 21828 -> 85 (upper), 249 -> 249
    opnd = 16'd21828; #1; checks++; if (seg8 != 8'd85 || !hi8) failures++;
    opnd = 16'd249;   #1; checks++; if (seg8 != 8'd249 || hi8) failures++;
    opnd = 16'd674;   #1; checks++; if (seg8 != 8'd2 || !hi8) failures++;
    checks++;
    if (n_hi == 0 || n_lo == 0) failures++;
    $display("upper segment taken %0d times, lower %0d times", n_hi, n_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
