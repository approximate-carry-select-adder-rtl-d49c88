// acsa: approximate carry select adder (static segment adder).
//
// Each Y-bit addend is reduced to one X-bit segment exactly as in the
// multiplier front end (seg_select: upper segment when the addend's upper bits
// are non-zero, else the lower one). The two segments are added by an exact
// X-bit carry select adder into the (X+1)-bit sum Z, and the sum of the two
// segment selects {c,s} places Z in the (Y+1)-bit result:
//   {c,s} = 00 : Z                (both addends small: the result is exact)
//   {c,s} = 01 : Z << (Y-X)/2
//   {c,s} = 10 : Z << (Y-X)       (both large: low bits of both dropped)
// The structure (OR gates, muxes, adder of the selects, carry select adder,
// three-way output mux) is the published one. The three shift amounts and the
// Y+1 output width follow the published waveform of this adder (a one-high
// case printed as 43 -> 688, i.e. a shift of 4 for Y = 16, X = 8). The
// one-high term adds a scaled-down upper segment to an unscaled lower one and
// is therefore a coarse approximation; it is kept as published. The inner
// carry select adder is exact: the published waveform shows segment sums that
// differ from exact ones, but no rule for them is given.
//
// Interface: combinational, no clock. Requires Y/2 <= X < Y.
module acsa
  import amlm_pkg::*;
#(
  parameter int unsigned Y = 16,
  parameter int unsigned X = 8
) (
  input  logic [Y-1:0] a,
  input  logic [Y-1:0] b,
  output logic [Y:0]   s
);

  localparam int unsigned SH = Y - X;

  logic [X-1:0] seg_a, seg_b;
  logic         hi_a, hi_b;
  logic [X:0]   z;
  seg_sel_e     sel;

  seg_select #(.Y(Y), .X(X)) u_sel_a (.opnd(a), .seg(seg_a), .hi(hi_a));
  seg_select #(.Y(Y), .X(X)) u_sel_b (.opnd(b), .seg(seg_b), .hi(hi_b));

  carry_select_adder #(.W(X)) u_csa (.a(seg_a), .b(seg_b), .sum(z));

  always_comb begin
    sel = seg_sel_e'({1'b0, hi_a} + {1'b0, hi_b});
    unique case (sel)
      SEL_LO_LO:  s = (Y+1)'(z);
      SEL_ONE_HI: s = (Y+1)'(z) << (SH / 2);
      SEL_HI_HI:  s = (Y+1)'(z) << SH;
      default:    s = '0;
    endcase
  end

endmodule
