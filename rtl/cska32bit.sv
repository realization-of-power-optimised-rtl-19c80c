// cska32bit - 32-bit carry skip adder made of AOI-skip blocks.
//
// The operands are cut into WIDTH/BLOCK_W groups (eight groups of four bits by
// default). Each group is a cska_block4: a four-bit ripple-carry chain whose
// carry out comes from AND-OR skip logic. A group whose bits all propagate
// hands its carry in straight to the next group. A group that does not
// propagate makes its own carry out from its ripple chain. So the longest
// carry path is a ripple through the first group, a skip across each middle
// group and a ripple through the last group.
//
// Interface: a, b (WIDTH bits), cin in; sum (WIDTH bits), cout out.
// sum/cout = a + b + cin. Purely combinational, no clock or reset. A
// deferred assertion per group states the rule that makes skipping safe: a
// group whose bits all propagate leaves its carry unchanged.
// The 32-bit width, the name and the a/b operand ports follow the source
// design. It does not give the group size of its 32-bit adder, so
// uniform four-bit groups (the block it describes in detail) are this
// design's choice.
module cska32bit #(
  parameter int unsigned WIDTH   = 32,
  parameter int unsigned BLOCK_W = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NBLK = WIDTH / BLOCK_W;

  if (BLOCK_W == 0 || WIDTH % BLOCK_W != 0) begin : g_bad_size
    $error("cska32bit: WIDTH (%0d) must be a non-zero multiple of BLOCK_W (%0d)",
           WIDTH, BLOCK_W);
  end

  // blk_c[k] is the carry into block k; blk_c[NBLK] is the adder's carry out.
  logic [NBLK:0]   blk_c;
  logic [NBLK-1:0] blk_skip;

  assign blk_c[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    cska_block4 #(
      .BLOCK_W(BLOCK_W)
    ) u_blk (
      .a    (a[k*BLOCK_W +: BLOCK_W]),
      .b    (b[k*BLOCK_W +: BLOCK_W]),
      .cin  (blk_c[k]),
      .s    (sum[k*BLOCK_W +: BLOCK_W]),
      .grp_p(blk_skip[k]),
      .cout (blk_c[k+1])
    );
  end

  assign cout = blk_c[NBLK];

  // A skipped group passes its carry in unchanged: the skip path must agree
  // with the value the ripple chain would have produced.
  for (genvar k = 0; k < NBLK; k++) begin : g_chk
    always_comb begin
      assert final (!blk_skip[k] || blk_c[k+1] == blk_c[k])
        else $error("cska32bit: group %0d skipped but changed its carry", k);
    end
  end

endmodule
