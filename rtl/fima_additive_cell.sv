// fima_additive_cell: one K1-bit slice of the array's final adder.
//
// The last row of macrocells leaves, in each column, a K1-bit V and three
// carry bits x, y, z of the column's lowest weight. A full adder compresses
// x, y and z into a sum bit (weight 1) and a carry bit (weight 2); a K1-bit
// carry look-ahead adder then adds V, the two full-adder bits (as the number
// {0..0, c, s}) and the carry-in from the slice on the right:
//   s_out + 2^K1 * cout = V + x + y + z + cin.
// The total is at most (2^K1 - 1) + 3 + 1 < 2^(K1+1) for K1 >= 2, so one carry-out
// bit suffices. The structure (full adder feeding bits 0 and 1 of the same
// CLA as the other cells use) follows the array's description. Combinational.
module fima_additive_cell #(
  parameter int unsigned K1 = 2
) (
  input  logic [K1-1:0] v,
  input  logic          x,
  input  logic          y,
  input  logic          z,
  input  logic          cin,
  output logic [K1-1:0] s,
  output logic          cout
);

  if (K1 < 2) begin : g_param_check
    $error("fima_additive_cell: need K1 >= 2");
  end

  logic fa_s, fa_c;

  fima_full_adder u_fa (.x(x), .y(y), .z(z), .s(fa_s), .c(fa_c));

  fima_cla #(.W(K1)) u_cla (
    .x(v), .y(K1'({fa_c, fa_s})), .cin(cin), .s(s), .cout(cout)
  );

endmodule
