// cska_full_adder - one-bit full adder cell of the carry skip adder.
//
// Besides the sum and the ripple carry, the cell brings out its propagate
// signal p = a ^ b, which the carry skip block ANDs across its four cells to
// decide whether the incoming carry may skip the block.
//
//   s    = a ^ b ^ cin
//   p    = a ^ b
//   cout = a & b | cin & p
//
// Interface: single-bit a, b, cin in; s, p, cout out. Purely combinational.
// The equations are the standard full-adder ones used throughout the source
// design; building the cell from plain XOR/AND/OR gates (rather than 2:1
// multiplexers, as in the multiplexer-based reference adder) is this
// design's choice.
module cska_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic p,
  output logic cout
);

  always_comb begin
    p    = a ^ b;
    s    = p ^ cin;
    cout = (a & b) | (cin & p);
  end

endmodule
