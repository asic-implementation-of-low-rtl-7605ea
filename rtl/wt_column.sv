// wt_column: reduces one column of a Wallace tree stage to one sum bit and one
// carry bit, choosing the cell by how many live bits the column holds.
//
//   N = 1: the bit passes through        N = 3: full adder
//   N = 2: half adder                    N = 4 or 5: 4:2 compressor
//
// in[N-1:0] are the live bits, all of the column's weight. When CIN_USED is set,
// in[N-1] is the carry-out of the 4:2 compressor one column to the right and must
// go to the compressor's cin pin. cout is this column's horizontal carry into the
// next column; it is only nonzero for a 4:2 compressor. sum has the column's
// weight, carry and cout twice that. Combinational.
module wt_column #(
  parameter int unsigned N        = 3,
  parameter bit          CIN_USED = 1'b0
) (
  input  logic [4:0] in,
  output logic       sum,
  output logic       carry,
  output logic       cout
);
  if (N <= 1) begin : g_pass
    assign sum   = (N == 1) ? in[0] : 1'b0;
    assign carry = 1'b0;
    assign cout  = 1'b0;
  end else if (N == 2) begin : g_ha
    half_adder u_ha (.a(in[0]), .b(in[1]), .sum(sum), .carry(carry));
    assign cout = 1'b0;
  end else if (N == 3) begin : g_fa
    full_adder u_fa (.a(in[0]), .b(in[1]), .c(in[2]), .sum(sum), .carry(carry));
    assign cout = 1'b0;
  end else begin : g_c42
    // Four partial-product bits and no carry-in, three bits and a carry-in, or
    // four bits and a carry-in.
    logic x4, ci;
    if (N == 5) begin : g_five
      assign x4 = in[3];
      assign ci = in[4];
    end else if (CIN_USED) begin : g_three_cin
      assign x4 = 1'b0;
      assign ci = in[3];
    end else begin : g_four
      assign x4 = in[3];
      assign ci = 1'b0;
    end
    compressor_4_2 u_c42 (.x1(in[0]), .x2(in[1]), .x3(in[2]), .x4(x4), .cin(ci),
                          .sum(sum), .carry(carry), .cout(cout));
  end
endmodule
