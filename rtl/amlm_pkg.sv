// amlm_pkg: types shared by the static-segment multiplier and adder.
//
// seg_sel_e is the two-bit code {c,s} formed by adding the two segment
// selects of a pair of operands: how many of the two operands had a non-zero
// upper part and were therefore represented by their upper segment. The
// three reachable codes pick the placement of the segment result (at the
// bottom, in the middle or at the top of the output word). core_e chooses
// the segment multiplier behind the front end: the approximate multiplierless
// multiplier (the proposed configuration) or an accurate multiplier.
package amlm_pkg;

  typedef enum logic [1:0] {
    SEL_LO_LO = 2'b00,  // both operands use their lower segment  -> term i
    SEL_ONE_HI = 2'b01, // exactly one operand uses its upper one -> term j
    SEL_HI_HI = 2'b10   // both operands use their upper segment  -> term k
  } seg_sel_e;

  typedef enum logic {
    CORE_ACSA_MLM = 1'b0, // multiplierless shift-and-add core, ACSA summation
    CORE_EXACT    = 1'b1  // accurate multiplier
  } core_e;

endpackage
