// half_adder: one-bit half adder, the 2-input cell of the Wallace tree columns.
// sum = a ^ b, carry = a & b (carry has twice the weight of sum). Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
