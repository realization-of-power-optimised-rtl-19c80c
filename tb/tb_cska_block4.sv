// tb_cska_block4 - exhaustive self-checking test of the four-bit skip block.
//
// First applies the worked "best case" example a = 1010, b = 0110, cin = 0,
// whose propagates are P0..P3 = 0,0,1,1 so the group propagate is 0 and the
// carry out comes from the ripple chain. Then applies all 512 combinations of
// a, b and cin and compares sum, carry out and group propagate with
// a + b + cin and with &(a ^ b). Counts how often the skip path (group
// propagate 1) and the ripple path were used, and fails if either never was.
// Ends with a TB_RESULT line; a watchdog ends a hung run.
module tb_cska_block4;

  localparam int unsigned W = 4;

  logic [W-1:0] a, b, s;
  logic         cin, grp_p, cout;
  int           checks   = 0;
  int           failures = 0;
  int           n_skip   = 0;
  int           n_ripple = 0;

  cska_block4 #(.BLOCK_W(W)) dut (
    .a(a), .b(b), .cin(cin), .s(s), .grp_p(grp_p), .cout(cout)
  );

  task automatic apply_and_check(input logic [W-1:0] ta, input logic [W-1:0] tb_,
                                 input logic tc);
    logic [W:0] exp;
    logic       exp_p;
    a   = ta;
    b   = tb_;
    cin = tc;
    #1;
    exp   = {1'b0, ta} + {1'b0, tb_} + {{W{1'b0}}, tc};
    exp_p = &(ta ^ tb_);
    checks += 3;
    if (s !== exp[W-1:0]) begin
      failures++;
      $display("FAIL sum a=%b b=%b cin=%b: got %b expected %b", ta, tb_, tc, s, exp[W-1:0]);
    end
    if (cout !== exp[W]) begin
      failures++;
      $display("FAIL cout a=%b b=%b cin=%b: got %b expected %b", ta, tb_, tc, cout, exp[W]);
    end
    if (grp_p !== exp_p) begin
      failures++;
      $display("FAIL grp_p a=%b b=%b: got %b expected %b", ta, tb_, grp_p, exp_p);
    end
    if (exp_p) n_skip++;
    else       n_ripple++;
  endtask

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example: a = 1010, b = 0110, cin = 0 -> 1 0000, no skip.
    apply_and_check(4'b1010, 4'b0110, 1'b0);
    checks++;
    if (s !== 4'b0000 || cout !== 1'b1 || grp_p !== 1'b0) begin
      failures++;
      $display("FAIL worked example: s=%b cout=%b grp_p=%b", s, cout, grp_p);
    end

    for (int v = 0; v < 512; v++) begin
      apply_and_check(v[8:5], v[4:1], v[0]);
    end

    $display("skip path used %0d times, ripple path %0d times", n_skip, n_ripple);
    checks += 2;
    if (n_skip == 0)   begin failures++; $display("FAIL skip path never used");   end
    if (n_ripple == 0) begin failures++; $display("FAIL ripple path never used"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
