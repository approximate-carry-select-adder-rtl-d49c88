// exact_mult: accurate N x N unsigned multiplier.
//
// Used as the segment multiplier of the static segment method when the
// accurate configuration is chosen. Only its function is published; it is
// written as a plain product and left to synthesis to map.
//
// Interface: combinational, no clock.
module exact_mult #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  assign p = (2*N)'(a) * (2*N)'(b);

endmodule
