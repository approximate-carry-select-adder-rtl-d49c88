// segment_expander: places a segment result back at operand scale.
//
// The two segment selects are added into the two-bit code {c,s} (0, 1 or 2
// operands taken from their upper segment). A segment taken from the upper
// part stands for a value 2^(Y-X) times larger, so the 2X-bit segment product
// z is output as
//   {c,s} = 00 : i = z
//   {c,s} = 01 : j = z << (Y-X)
//   {c,s} = 10 : k = z << 2(Y-X)
// in a 2Y-bit word. The three terms and their selection follow the published
// architecture; returning 0 for the unreachable code 11 is this design's
// choice. sel is brought out so that users can see which term was chosen.
//
// Interface: combinational, no clock.
module segment_expander
  import amlm_pkg::*;
#(
  parameter int unsigned Y = 16,
  parameter int unsigned X = 8
) (
  input  logic           hi_a,
  input  logic           hi_b,
  input  logic [2*X-1:0] z,
  output logic [2*Y-1:0] p,
  output seg_sel_e       sel
);

  localparam int unsigned SH = Y - X;

  logic [2*Y-1:0] term_i, term_j, term_k;

  always_comb begin
    sel    = seg_sel_e'({1'b0, hi_a} + {1'b0, hi_b});
    term_i = (2*Y)'(z);
    term_j = (2*Y)'(z) << SH;
    term_k = (2*Y)'(z) << (2 * SH);
    unique case (sel)
      SEL_LO_LO:  p = term_i;
      SEL_ONE_HI: p = term_j;
      SEL_HI_HI:  p = term_k;
      default:    p = '0;
    endcase
  end

endmodule
