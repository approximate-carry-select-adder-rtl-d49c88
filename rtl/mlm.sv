// mlm: multiplierless N x N multiplier summed by approximate adders.
//
// Shift-and-add multiplication without a multiplier array. For every bit k of
// the multiplier b, a two-input mux passes the shifted multiplicand a << k
// (2N bits wide) when b[k] = 1 and zero otherwise. The N partial products are
// then added by approximate carry select adders (acsa with Y = 2N, X = N):
// a chain of N-1 two-input adders accumulates them in bit order, and each
// adder's (2N+1)-bit result is cut to the 2N-bit product width. While the
// running sum and the next term both stay below 2^N the adders are exact.
// The partial-product muxes and their summation by approximate carry select
// adders are published; the order of summation (a chain) and the truncation
// to 2N bits are this design's choices.
//
// Interface: combinational, no clock.
module mlm #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  logic [2*N-1:0] pp  [N];   // selected partial products
  logic [2*N-1:0] acc [N];   // running sums, acc[0] = pp[0]
  logic [2*N:0]   sum [N];   // raw adder outputs, sum[0] unused

  always_comb begin
    for (int unsigned k = 0; k < N; k++)
      pp[k] = b[k] ? ((2*N)'(a) << k) : '0;
  end

  assign acc[0] = pp[0];
  assign sum[0] = '0;

  for (genvar k = 1; k < N; k++) begin : g_add
    acsa #(.Y(2*N), .X(N)) u_acsa (.a(acc[k-1]), .b(pp[k]), .s(sum[k]));
    assign acc[k] = sum[k][2*N-1:0];
  end

  assign p = acc[N-1];

endmodule
