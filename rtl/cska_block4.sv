// cska_block4 - one carry skip block built from full adders and AOI skip logic.
//
// BLOCK_W full adders (four by default: FA0..FA3) form a ripple-carry chain
// from cin through C0..C3 and produce the sum bits S0..S3 and propagate bits
// P0..P3. A single AND gate combines P0..P3 into the group propagate. The
// AND-OR skip logic (cska_aoi_skip) then passes cin straight to cout when the
// group propagates and the ripple carry C3 otherwise. When the group
// propagates, C3 already equals cin, so the skip changes no value. It only
// gives the carry a short path around the ripple chain.
//
// Interface: a, b (BLOCK_W bits), cin in; s (BLOCK_W bits), grp_p, cout out.
// grp_p is brought out so that an enclosing adder or a test can see that the
// block was skipped. Purely combinational, no clock.
// The block structure (ripple chain, one AND over all propagates, AOI skip
// logic on cin and C3) follows the source design; the parameterised width
// and the grp_p output are this design's choices.
module cska_block4 #(
  parameter int unsigned BLOCK_W = 4
) (
  input  logic [BLOCK_W-1:0] a,
  input  logic [BLOCK_W-1:0] b,
  input  logic               cin,
  output logic [BLOCK_W-1:0] s,
  output logic               grp_p,
  output logic               cout
);

  // c[i] is the carry into full adder i; c[i+1] is its carry out (C_i).
  logic [BLOCK_W:0]   c;
  logic [BLOCK_W-1:0] p;

  assign c[0] = cin;

  for (genvar i = 0; i < BLOCK_W; i++) begin : g_fa
    cska_full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (s[i]),
      .p   (p[i]),
      .cout(c[i+1])
    );
  end

  // The AND gate over P0..P3.
  assign grp_p = &p;

  cska_aoi_skip u_skip (
    .grp_p(grp_p),
    .cin  (cin),
    .c_rca(c[BLOCK_W]),
    .cout (cout)
  );

endmodule
