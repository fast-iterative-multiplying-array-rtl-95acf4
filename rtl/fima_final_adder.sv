// fima_final_adder: carry-propagate adder closing the carry-save array.
//
// COLS additive cells, one per K1-bit column, are chained ripple-carry
// fashion: the carry-out of column k is the carry-in of column k+1. Column k
// adds v[k] and the carry bits x[k], y[k], z[k] left by the last row of
// macrocells; sum[K1*k +: K1] is its K1-bit result. The ripple connection is
// the one the array's description draws; a multilevel look-ahead over the
// column carries is the alternative it mentions and is not built here.
// Combinational; the carry crosses COLS cells.
module fima_final_adder #(
  parameter int unsigned K1   = 2,
  parameter int unsigned COLS = 7
) (
  input  logic [COLS-1:0][K1-1:0] v,
  input  logic [COLS-1:0]         x,
  input  logic [COLS-1:0]         y,
  input  logic [COLS-1:0]         z,
  input  logic                    cin,
  output logic [COLS*K1-1:0]      sum,
  output logic                    cout
);

  logic [COLS:0] carry;  // carry[k] enters column k

  assign carry[0] = cin;

  for (genvar k = 0; k < COLS; k++) begin : g_col
    fima_additive_cell #(.K1(K1)) u_cell (
      .v(v[k]), .x(x[k]), .y(y[k]), .z(z[k]), .cin(carry[k]),
      .s(sum[K1*k +: K1]), .cout(carry[k+1])
    );
  end

  assign cout = carry[COLS];

endmodule
