// compressor_4_2: 4:2 compressor built from two full adders, the 4- and 5-input
// cell of the Wallace tree columns.
//
// Inputs x1..x4 and cin all have weight 1; the outputs satisfy
//   x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout).
// cout depends only on x1..x3, never on cin, so chaining cout of one column into
// cin of the next does not ripple. Combinational.
module compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;

  full_adder u_fa1 (.a(x1), .b(x2), .c(x3),  .sum(s1),  .carry(cout));
  full_adder u_fa2 (.a(s1), .b(x4), .c(cin), .sum(sum), .carry(carry));
endmodule
