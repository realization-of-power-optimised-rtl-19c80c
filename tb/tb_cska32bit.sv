// tb_cska32bit - end-to-end self-checking test of the 32-bit carry skip adder.
//
// Runs the adder at its default size (32 bits, four-bit groups) with no
// parameter overrides. Applies directed operands that exercise the carry
// mechanisms of the design, then random operands, and compares {cout, sum}
// with a + b + cin computed in 33-bit arithmetic.
//
// Directed cases:
//   - the four-bit worked example a = 1010, b = 0110 in the lowest group;
//   - all groups propagating with cin = 1 (carry skips every group);
//   - a carry generated in group 0 that skips every later group;
//   - the longest carry path (ripple in group 0, skips, ripple in group 7);
//   - one group at a time made to propagate while a carry arrives at it;
//   - extremes (0 + 0, all ones + all ones, all ones + 1).
// For every vector the test works out, independently of the adder, which
// groups propagate and whether a 1 carry is skipped across them. It counts,
// per group, how often a carry of 1 took the skip path and how often the
// group made its carry from its own ripple chain, and fails if any group
// never did either; it also counts full-length skips and carry outs of 1.
// Ends with a TB_RESULT line; a watchdog ends a hung run.
module tb_cska32bit;

  localparam int unsigned W    = 32;
  localparam int unsigned BW   = 4;
  localparam int unsigned NBLK = W / BW;
  localparam int unsigned NRND = 20000;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int           checks    = 0;
  int           failures  = 0;
  int           n_skip1   [NBLK];   // carry of 1 passed on by the skip path
  int           n_ripple  [NBLK];   // carry produced by the group's ripple chain
  int           n_fullskip = 0;     // all groups propagate and cin = 1
  int           n_cout1    = 0;

  cska32bit dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic apply_and_check(input logic [W-1:0] ta, input logic [W-1:0] tb_,
                                 input logic tc);
    logic [W:0] exp;
    logic       carry;
    a   = ta;
    b   = tb_;
    cin = tc;
    #1;
    exp = {1'b0, ta} + {1'b0, tb_} + {{W{1'b0}}, tc};
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b: got %b_%h expected %b_%h",
               ta, tb_, tc, cout, sum, exp[W], exp[W-1:0]);
    end
    // Mechanism accounting, from the operands alone.
    carry = tc;
    for (int k = 0; k < NBLK; k++) begin
      logic [BW-1:0] ga, gb;
      logic [BW:0]   gs;
      ga = ta[k*BW +: BW];
      gb = tb_[k*BW +: BW];
      gs = {1'b0, ga} + {1'b0, gb} + {{BW{1'b0}}, carry};
      if (&(ga ^ gb)) begin
        if (carry) n_skip1[k]++;
      end else begin
        n_ripple[k]++;
      end
      carry = gs[BW];
    end
    if (&(ta ^ tb_) && tc) n_fullskip++;
    if (exp[W]) n_cout1++;
  endtask

  initial begin
    #10ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] ra, rb;
    for (int k = 0; k < NBLK; k++) begin
      n_skip1[k]  = 0;
      n_ripple[k] = 0;
    end

    // Worked four-bit example in the lowest group.
    apply_and_check(32'h0000_000A, 32'h0000_0006, 1'b0);
    // Extremes.
    apply_and_check('0, '0, 1'b0);
    apply_and_check('1, '1, 1'b1);
    apply_and_check('1, 32'h1, 1'b0);
    // Every group propagates; carry in skips all of them.
    apply_and_check(32'hAAAA_AAAA, 32'h5555_5555, 1'b1);
    apply_and_check(32'hFFFF_0000, 32'h0000_FFFF, 1'b1);
    apply_and_check(32'hAAAA_AAAA, 32'h5555_5555, 1'b0);
    // Carry generated at the top of group 0, then skipped through groups 1..7.
    apply_and_check(32'hFFFF_FFF8, 32'h0000_0008, 1'b0);
    // Longest carry path: generated at bit 0, rippled through the rest of
    // group 0, skipped across groups 1..6, rippled through group 7 to bit 31.
    apply_and_check(32'h7FFF_FFFF, 32'h0000_0001, 1'b0);
    // One group at a time propagates while a carry of 1 arrives from below.
    for (int k = 1; k < NBLK; k++) begin
      logic [W-1:0] ta, tb_;
      ta = '0;
      tb_ = '0;
      ta[k*BW +: BW]  = 4'b1010;
      tb_[k*BW +: BW] = 4'b0101;
      ta[k*BW-1]  = 1'b1;          // generate a carry into group k
      tb_[k*BW-1] = 1'b1;
      apply_and_check(ta, tb_, 1'b0);
    end

    for (int n = 0; n < NRND; n++) begin
      ra = $urandom;
      rb = $urandom;
      // Every fourth vector biases b towards ~a so that groups propagate.
      if (n % 4 == 1) rb = ~ra ^ (32'h1 << ($urandom % W));
      if (n % 4 == 2) rb = ~ra;
      apply_and_check(ra, rb, 1'($urandom));
    end

    for (int k = 0; k < NBLK; k++) begin
      $display("group %0d: carry skipped %0d times, ripple carry %0d times",
               k, n_skip1[k], n_ripple[k]);
      checks += 2;
      if (n_skip1[k] == 0)  begin failures++; $display("FAIL group %0d never skipped a carry", k); end
      if (n_ripple[k] == 0) begin failures++; $display("FAIL group %0d never rippled", k); end
    end
    $display("full-length skips %0d, carry outs of 1 %0d", n_fullskip, n_cout1);
    checks += 2;
    if (n_fullskip == 0) begin failures++; $display("FAIL no full-length skip"); end
    if (n_cout1 == 0)    begin failures++; $display("FAIL no carry out of 1"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
