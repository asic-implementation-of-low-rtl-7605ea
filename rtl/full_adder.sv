// full_adder: one-bit full adder (3:2 counter), the 3-input cell of the Wallace
// tree columns. sum has the weight of the inputs, carry twice that. Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b ^ c;
  assign carry = (a & b) | (a & c) | (b & c);
endmodule
