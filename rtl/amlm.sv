// amlm: approximate static-segment multiplier built on a multiplierless core.
//
// An unsigned Y x Y multiplication is replaced by one X x X multiplication of
// two operand segments. For each operand, seg_select OR-reduces its upper bits
// and passes either its upper X-bit segment (some upper bit set) or its lower
// X-bit segment. The two segments go to the segment multiplier, by default the
// multiplierless shift-and-add multiplier whose partial products are summed by
// approximate carry select adders (mlm). The 2X-bit segment product Z is then
// placed by segment_expander at bit 0, Y-X or 2(Y-X) of the 2Y-bit result,
// according to how many operands used their upper segment (sel = {c,s}).
// With CORE = CORE_EXACT the segment multiplier is an accurate one, which
// gives the plain static segment method. Structure, segment ranges and the
// three output terms are the published ones; unsigned operands and the CORE
// switch as a parameter are this design's choices.
//
// Interface: purely combinational, no clock or reset; p is valid one
// propagation delay after a and b. sel reports the term chosen.
module amlm
  import amlm_pkg::*;
#(
  parameter int unsigned Y    = 16,
  parameter int unsigned X    = 8,
  parameter core_e       CORE = CORE_ACSA_MLM
) (
  input  logic [Y-1:0]   a,
  input  logic [Y-1:0]   b,
  output logic [2*Y-1:0] p,
  output seg_sel_e       sel
);

  logic [X-1:0]   seg_a, seg_b;
  logic           hi_a, hi_b;
  logic [2*X-1:0] z;

  seg_select #(.Y(Y), .X(X)) u_sel_a (.opnd(a), .seg(seg_a), .hi(hi_a));
  seg_select #(.Y(Y), .X(X)) u_sel_b (.opnd(b), .seg(seg_b), .hi(hi_b));

  if (CORE == CORE_EXACT) begin : g_exact
    exact_mult #(.N(X)) u_mul (.a(seg_a), .b(seg_b), .p(z));
  end else begin : g_mlm
    mlm #(.N(X)) u_mul (.a(seg_a), .b(seg_b), .p(z));
  end

  segment_expander #(.Y(Y), .X(X)) u_exp (
    .hi_a(hi_a), .hi_b(hi_b), .z(z), .p(p), .sel(sel)
  );

endmodule
