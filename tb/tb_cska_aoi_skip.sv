// tb_cska_aoi_skip - exhaustive self-checking test of the AND-OR skip logic.
//
// For all eight input combinations the carry out must be cin when the group
// propagate is 1 (the skip) and the ripple carry c_rca when it is 0. Ends with
// a TB_RESULT line; a watchdog ends a hung run.
module tb_cska_aoi_skip;

  logic grp_p, cin, c_rca;
  logic cout;
  int   checks   = 0;
  int   failures = 0;

  cska_aoi_skip dut (.grp_p(grp_p), .cin(cin), .c_rca(c_rca), .cout(cout));

  initial begin
    #100us;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp;
      {grp_p, cin, c_rca} = 3'(v);
      #1;
      if (grp_p) exp = cin;
      else       exp = c_rca;
      checks++;
      if (cout !== exp) begin
        failures++;
        $display("FAIL grp_p=%0b cin=%0b c_rca=%0b: cout=%0b expected %0b",
                 grp_p, cin, c_rca, cout, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
