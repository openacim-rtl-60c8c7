// cmp42_exact: exact 4-2 compressor made of two cascaded full adders.
// The first adder adds x1, x2 and x3 and gives cout (weight 2) and an
// intermediate sum k; the second adds k, x4 and cin and gives s (weight 1)
// and c (weight 2). Hence x1+x2+x3+x4+cin = s + 2*(c + cout) for every input.
// cout depends only on x1..x3, so chaining cout into the cin of the
// neighbouring column does not ripple. Purely combinational.
// The two-adder structure and the port names follow the compressor drawing
// of the approximate multiplier figure.
module cmp42_exact (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic s,
  output logic c,
  output logic cout
);
  logic k;

  full_adder u_fa1 (.a(x1), .b(x2), .ci(x3),  .sum(k), .co(cout));
  full_adder u_fa2 (.a(k),  .b(x4), .ci(cin), .sum(s), .co(c));
endmodule
