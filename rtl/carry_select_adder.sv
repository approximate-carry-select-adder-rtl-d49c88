// carry_select_adder: exact W-bit carry select adder.
//
// The operands are cut into blocks of BLK bits. The lowest block is a plain
// ripple-carry adder. Every higher block is computed twice in parallel, once
// for carry-in 0 and once for carry-in 1, and the carry out of the block below
// picks one of the two results (sum bits and carry out), so the carry ripples
// only through one mux per block. sum[W] is the carry out.
// Only the name of this adder is published; the block size and the textbook
// structure used here are this design's choice. W need not be a multiple of
// BLK: the top block is then narrower.
//
// Interface: combinational, no clock.
module carry_select_adder #(
  parameter int unsigned W   = 8,
  parameter int unsigned BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   sum
);

  localparam int unsigned NBLK = (W + BLK - 1) / BLK;

  // carry into each block; c[NBLK] is the carry out
  logic [NBLK:0] c;

  assign c[0] = 1'b0;

  for (genvar g = 0; g < NBLK; g++) begin : g_blk
    localparam int unsigned LO = g * BLK;
    localparam int unsigned BW = (LO + BLK <= W) ? BLK : W - LO;

    logic [BW-1:0] s0, s1;
    logic          co0, co1;

    // two ripple-carry adders, for carry-in 0 and 1
    always_comb begin
      logic k0, k1;
      k0 = 1'b0;
      k1 = 1'b1;
      for (int unsigned i = 0; i < BW; i++) begin
        s0[i] = a[LO+i] ^ b[LO+i] ^ k0;
        k0    = (a[LO+i] & b[LO+i]) | (k0 & (a[LO+i] ^ b[LO+i]));
        s1[i] = a[LO+i] ^ b[LO+i] ^ k1;
        k1    = (a[LO+i] & b[LO+i]) | (k1 & (a[LO+i] ^ b[LO+i]));
      end
      co0 = k0;
      co1 = k1;
    end

    // carry selection
    assign sum[LO +: BW] = c[g] ? s1 : s0;
    assign c[g+1]        = c[g] ? co1 : co0;
  end

  assign sum[W] = c[NBLK];

endmodule
