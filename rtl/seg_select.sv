// seg_select: static segment selection for one operand.
//
// An operand of Y bits is represented by one X-bit segment. The bits above
// position X-1 are OR-reduced; if any of them is 1 the upper segment
// opnd[Y-1:Y-X] is passed on, otherwise the lower segment opnd[X-1:0].
// The OR output is also returned as hi, the segment select that later decides
// where the segment result is placed. The OR range opnd[Y-1:X] and the two
// mux inputs follow the labels of the published architecture; for Y = 2X the
// OR spans exactly the upper segment, for X > Y/2 (e.g. 10 of 16) it spans
// only the bits the lower segment cannot hold.
//
// Interface: combinational, no clock. Requires Y/2 <= X < Y.
module seg_select #(
  parameter int unsigned Y = 16,
  parameter int unsigned X = 8
) (
  input  logic [Y-1:0] opnd,
  output logic [X-1:0] seg,
  output logic         hi
);

  initial begin
    assert (2 * X >= Y && X < Y) else $error("seg_select: need Y/2 <= X < Y");
  end

  always_comb begin
    hi  = |opnd[Y-1:X];
    seg = hi ? opnd[Y-1:Y-X] : opnd[X-1:0];
  end

endmodule
