// tb_cska_full_adder - exhaustive self-checking test of the full-adder cell.
//
// Applies all eight combinations of a, b, cin and compares s, p and cout with
// the arithmetic sum a + b + cin (s is its low bit, cout its high bit) and
// with p = a xor b. Ends with a TB_RESULT line; a watchdog ends a hung run.
module tb_cska_full_adder;

  logic a, b, cin;
  logic s, p, cout;
  int   checks   = 0;
  int   failures = 0;

  cska_full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .p(p), .cout(cout));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b cin=%0b got %0b expected %0b", what, a, b, cin, got, exp);
    end
  endtask

  initial begin
    #100us;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, cin} = 3'(v);
      total = int'(a) + int'(b) + int'(cin);
      #1;
      check("s",    s,    logic'(total % 2));
      check("cout", cout, logic'(total / 2));
      check("p",    p,    logic'(int'(a) != int'(b)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
