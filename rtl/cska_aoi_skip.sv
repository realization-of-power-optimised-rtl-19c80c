// cska_aoi_skip - AND-OR skip logic of one carry skip block.
//
// Chooses the carry that leaves a block. When every bit of the block
// propagates (grp_p = 1) the block's own carry in is passed straight on,
// skipping the ripple chain; otherwise the ripple carry of the last full
// adder (c_rca, "C3") is used. Instead of a 2:1 multiplexer the choice is made
// with two AND terms, an inverter on the group propagate and an OR:
//
//   A1   = cin   &  grp_p
//   A2   = c_rca & ~grp_p
//   cout = A1 | A2
//
// Interface: grp_p, cin, c_rca in; cout out. Purely combinational.
// The two terms follow the source design's worked example (A1 from the carry
// in, A2 from C3 with the inverted propagate). The output is not inverted:
// it must equal the selected carry.
module cska_aoi_skip (
  input  logic grp_p,
  input  logic cin,
  input  logic c_rca,
  output logic cout
);

  logic grp_p_n;
  logic a1;
  logic a2;

  always_comb begin
    grp_p_n = ~grp_p;
    a1      = cin & grp_p;
    a2      = c_rca & grp_p_n;
    cout    = a1 | a2;
  end

endmodule
