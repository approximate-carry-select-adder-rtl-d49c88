// tb_amlm_configs: the static segment multiplier in its other configurations.
//
//  - accurate segment multiplier, 8-bit segments (plain static segment
//    method): checked against the published results 21828 x 3216 = 66846720
//    and 249 x 674 = 127488 and against the reference on random pairs;
//  - accurate segment multiplier, 10-bit segments of 16-bit operands;
//  - multiplierless core with 10-bit segments.
// Each output term must occur in each configuration. Mean relative errors of
// the configurations are printed for comparison.
module tb_amlm_configs;
  import amlm_pkg::*;
  import amlm_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_sel [3][3];
  real err [3];

  logic [15:0] a, b;
  logic [31:0] p [3];
  seg_sel_e    sel [3];

  amlm #(.Y(16), .X(8),  .CORE(CORE_EXACT))    dut_e8  (.a(a), .b(b), .p(p[0]), .sel(sel[0]));
  amlm #(.Y(16), .X(10), .CORE(CORE_EXACT))    dut_e10 (.a(a), .b(b), .p(p[1]), .sel(sel[1]));
  amlm #(.Y(16), .X(10), .CORE(CORE_ACSA_MLM)) dut_m10 (.a(a), .b(b), .p(p[2]), .sel(sel[2]));

  localparam int XS [3] = '{8, 10, 10};
  localparam bit EX [3] = '{1'b1, 1'b1, 1'b0};

  task automatic check(input logic [15:0] va, input logic [15:0] vb);
    a = va; b = vb;
    #1;
    for (int c = 0; c < 3; c++) begin
      longint unsigned e;
      int n;
      e = ref_amlm(64'(va), 64'(vb), 16, XS[c], EX[c]);
      n = int'(ref_hi(64'(va), XS[c])) + int'(ref_hi(64'(vb), XS[c]));
      checks++;
      if (64'(p[c]) != e || int'(sel[c]) != n) begin
        failures++;
        if (failures < 10) $display("cfg %0d: %0d * %0d -> %0d, expected %0d", c, va, vb, p[c], e);
      end
      n_sel[c][n]++;
      if (va != 0 && vb != 0) begin
        real t;
        t = real'(longint'(va) * longint'(vb));
        err[c] += ((t > real'(p[c])) ? t - real'(p[c]) : real'(p[c]) - t) / t;
      end
    end
  endtask

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nr;
    nr = 0;
    for (int c = 0; c < 3; c++) begin
      err[c] = 0.0;
      for (int n = 0; n < 3; n++) n_sel[c][n] = 0;
    end
    check(16'd21828, 16'd3216);
    checks++; if (p[0] != 32'd66846720) failures++;
    check(16'd249, 16'd674);
    checks++; if (p[0] != 32'd127488) failures++;
    for (int i = 0; i < 30000; i++) begin
      logic [15:0] va, vb;
      va = ($urandom_range(1) != 0) ? 16'($urandom_range(1023)) : 16'($urandom);
      vb = ($urandom_range(1) != 0) ? 16'($urandom_range(1023)) : 16'($urandom);
      if (va != 0 && vb != 0) nr++;
      check(va, vb);
    end
    for (int c = 0; c < 3; c++)
      for (int n = 0; n < 3; n++) begin
        checks++;
        if (n_sel[c][n] == 0) failures++;
      end
    $display("mean relative error: exact/8 %f  exact/10 %f  mlm/10 %f",
             err[0] / nr, err[1] / nr, err[2] / nr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
