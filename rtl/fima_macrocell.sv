// fima_macrocell: one cell of the multiplying array.
//
// The cell in row r, column c owns the partial products a_i*b_j with b_j
// among the row's K2 bits and i+j in the column's K1 weights. COM adds them
// and returns two numbers; then four K1-bit carry look-ahead adders combine
// them with the cell's other inputs:
//   CLA1: U_out = hi1 + hi2                        (no carry-in, no carry-out)
//   CLA2: lo1 + lo2 + x_in       -> sum2, x_out
//   CLA3: sum2 + U_in + y_in     -> sum3, y_out
//   CLA4: sum3 + V_in + z_in     -> V_out, z_out
// All of V, sum2, sum3, lo1, lo2 and U_in have the column's weight; U_out and
// x/y/z_out carry K1 columns more (the next column to the left); x/y/z_in
// have the lowest weight of the column. The cell therefore satisfies
//   block + x_in + y_in + z_in + U_in + V_in
//     = V_out + 2^K1 * (U_out + x_out + y_out + z_out).
// U_out does not depend on U_in, so U may ripple along a row without adding
// to the array delay; the cell's delay that matters is that of x, y, z and
// V, which go through one to three adders in series.
//
// The block structure, the adder order and the signal names follow the
// cell's published block diagram (where the adder for the high halves is CLA1 and the chain
// for the low halves starts at CLA2). CLA1 never produces a carry: the block
// total is below 2^(2*K1), so the high halves sum to at most 2^K1 - 1; an
// assertion states it. Combinational.
module fima_macrocell #(
  parameter int unsigned K1 = 2,
  parameter int unsigned K2 = 5
) (
  input  logic [K1+K2-2:0] a_win,  // a_(q) .. a_(q+K1+K2-2)
  input  logic [K2-1:0]    b_win,  // b_(p) .. b_(p+K2-1)
  input  logic [K1-1:0]    u_in,   // U from the cell on the right
  input  logic [K1-1:0]    v_in,   // V from the cell above
  input  logic             x_in,   // carries from the cell above-right
  input  logic             y_in,
  input  logic             z_in,
  output logic [K1-1:0]    u_out,  // to the cell on the left
  output logic [K1-1:0]    v_out,  // to the cell below
  output logic             x_out,  // to the cell below-left
  output logic             y_out,
  output logic             z_out
);

  if (!fima_pkg::shape_ok(K1, K2)) begin : g_param_check
    $error("fima_macrocell: need K1 >= 2 and 2 <= K2 <= 2^K1 + 1");
  end

  logic [K1-1:0] lo1, lo2, hi1, sum2, sum3;
  logic [K1-2:0] hi2;
  logic          cla1_cout;

  fima_com #(.K1(K1), .K2(K2)) u_com (
    .a_win(a_win), .b_win(b_win),
    .lo1(lo1), .lo2(lo2), .hi1(hi1), .hi2(hi2)
  );

  fima_cla #(.W(K1)) u_cla1 (
    .x(hi1), .y({1'b0, hi2}), .cin(1'b0), .s(u_out), .cout(cla1_cout)
  );

  fima_cla #(.W(K1)) u_cla2 (
    .x(lo1), .y(lo2), .cin(x_in), .s(sum2), .cout(x_out)
  );

  fima_cla #(.W(K1)) u_cla3 (
    .x(sum2), .y(u_in), .cin(y_in), .s(sum3), .cout(y_out)
  );

  fima_cla #(.W(K1)) u_cla4 (
    .x(sum3), .y(v_in), .cin(z_in), .s(v_out), .cout(z_out)
  );

  always_comb begin
    assert (!cla1_cout) else $error("fima_macrocell: CLA1 overflow");
  end

endmodule
