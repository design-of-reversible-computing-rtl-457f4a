// rbca_adder: ripple-block carry adder (RBCA).
//
// Computes the reversible update (A, B) -> (A, B + A mod 2^N), like the
// V-shaped adder, but splits the word into N/BLK blocks that are added in
// parallel so that only a short carry-correction chain ripples through the
// whole word:
//   1. block phase (all blocks in parallel): each block works out the carry
//      it would produce on its own (generate) and whether it would pass an
//      incoming carry straight through (propagate);
//   2. carry-correction phase: the block carries ripple from block to block,
//      one step per block;
//   3. sum phase (all blocks in parallel): each block adds with its
//      corrected carry-in.
// With BLK near sqrt(N) both the block work and the correction chain are
// about sqrt(N) long, which is the square-root depth of the design.
// The block/carry-correction organisation is the document's; the
// generate/propagate form of the correction and the use of
// B - A = ~(~B + A) for the inverse direction (inv = 1) are this design's
// choices, and the circuit is written as ordinary logic rather than as a
// reversible gate cascade.
// Interface: a, b in; a_out (= a), s out; blk_carry shows the corrected carry
// into every block. Combinational.
module rbca_adder #(
  parameter int unsigned N   = 16,
  parameter int unsigned BLK = 4
) (
  input  logic         inv,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] a_out,
  output logic [N-1:0] s,
  output logic [N/BLK-1:0] blk_carry
);
  localparam int unsigned NB = N / BLK;

  if (N % BLK != 0) begin : g_bad_blk
    $error("rbca_adder: N must be a multiple of BLK");
  end

  logic [N-1:0]  bb;            // b, complemented for the inverse direction
  logic [N-1:0]  sum;
  logic [NB-1:0] gen, prop;
  logic [NB:0]   cin;

  assign bb = inv ? ~b : b;

  // phase 1: independent block results
  always_comb begin
    for (int j = 0; j < int'(NB); j++) begin
      logic [BLK:0] t;
      t       = {1'b0, a[j*BLK +: BLK]} + {1'b0, bb[j*BLK +: BLK]};
      gen[j]  = t[BLK];
      prop[j] = &(a[j*BLK +: BLK] ^ bb[j*BLK +: BLK]);
    end
  end

  // phase 2: carry-correction ripple across blocks
  assign cin[0] = 1'b0;
  for (genvar j = 0; j < int'(NB); j++) begin : g_corr
    assign cin[j+1] = gen[j] | (prop[j] & cin[j]);
  end

  // phase 3: block sums with corrected carry-in
  always_comb begin
    for (int j = 0; j < int'(NB); j++)
      sum[j*BLK +: BLK] = a[j*BLK +: BLK] + bb[j*BLK +: BLK] + BLK'(cin[j]);
  end

  assign a_out     = a;
  assign s         = inv ? ~sum : sum;
  assign blk_carry = cin[NB-1:0];
endmodule
