// fima_multiplier: unsigned N x M multiplier built as an iterative array of
// macrocells, p = a * b.
//
// Factor B is cut into R = ceil(M/K2) rows of K2 bits and the product into
// columns of K1 bits. The macrocell in row r, column c adds all partial
// products a_i*b_j of its row whose weight i+j falls in the column, plus what
// reaches it from neighbouring cells (see fima_macrocell). Two interconnection
// patterns are superposed:
//   * V (K1 bits) goes straight down to the cell of the same column in the
//     next row, and x, y, z (one bit each) go down and one column to the left:
//     a carry-save pattern, which carries the signals that set the speed;
//   * U (K1 bits) goes to the left neighbour in the same row: a ripple
//     pattern, harmless because U_out does not depend on U_in. The U of the
//     leftmost cell of a row enters the next row as the V of the column to
//     its left.
// Columns that a row does not cover pass V and x, y, z down unchanged. Below
// the last row, column 0 is final; columns 1 and up go through a ripple
// chain of additive cells (fima_final_adder) that adds each column's V, x, y
// and z. Defaults give the 4 x 10 array with K1 = 2, K2 = 5 drawn in the
// array's description.
//
// Row r covers columns floor(r*K2/K1) .. floor((r*K2 + K2 + N - 2)/K1): every
// column holding one of its products. When r*K2 is not a multiple of K1 this
// is one cell more than ceil((N+K2-1)/K1); the reference drawing of the 4 x 10
// array shows only four cells in its second row, which would leave the
// product a3*b9 out, so this design follows the weights rather than the
// drawing. Instead of threading A through the cells diagonally, each cell
// receives its window of A directly (a pure rewiring). The array is
// combinational: no clock, no reset, result valid after the array delay.
module fima_multiplier #(
  parameter int unsigned N  = 4,   // width of factor a
  parameter int unsigned M  = 10,  // width of factor b
  parameter int unsigned K1 = 2,   // columns (weights) per macrocell
  parameter int unsigned K2 = 5    // rows (bits of b) per macrocell
) (
  input  logic [N-1:0]   a,
  input  logic [M-1:0]   b,
  output logic [N+M-1:0] p
);

  import fima_pkg::*;

  localparam int unsigned R    = num_rows(M, K2);
  localparam int unsigned COLS = num_cols(N, M, K1, K2);  // carry-save columns
  localparam int unsigned AW   = K1 + K2 - 1;             // A window of a cell
  localparam int unsigned PAD  = K1 + K2 - 2;             // zero padding of A
  localparam int unsigned PW   = COLS * K1;               // full result width

  if (K2 < K1) begin : g_param_check
    $error("fima_multiplier: need K2 >= K1");
  end

  // Factors padded with zeros so that every cell's window is in range.
  logic [N+2*PAD-1:0] a_pad;
  logic [R*K2-1:0]    b_pad;

  assign a_pad = {{PAD{1'b0}}, a, {PAD{1'b0}}};
  assign b_pad = (R * K2)'(b);

  // Each row block holds the carry-save state leaving the row (v_o, x_o,
  // y_o, z_o, one entry per column) and reads the state leaving the row
  // above (v_i, ...; zero above the first row). Each cell keeps its own U.
  for (genvar r = 0; r < R; r++) begin : g_row
    localparam int unsigned FIRST = row_first_col(r, K1, K2);
    localparam int unsigned LAST  = row_last_col(r, N, K1, K2);

    logic [K1-1:0] v_i [COLS];
    logic          x_i [COLS], y_i [COLS], z_i [COLS];
    logic [K1-1:0] v_o [COLS];
    logic          x_o [COLS], y_o [COLS], z_o [COLS];

    for (genvar c = 0; c < COLS; c++) begin : g_col
      if (r == 0) begin : g_first_row
        assign v_i[c] = '0;
        assign x_i[c] = 1'b0;
        assign y_i[c] = 1'b0;
        assign z_i[c] = 1'b0;
      end else begin : g_next_row
        assign v_i[c] = g_row[r-1].v_o[c];
        assign x_i[c] = g_row[r-1].x_o[c];
        assign y_i[c] = g_row[r-1].y_o[c];
        assign z_i[c] = g_row[r-1].z_o[c];
      end

      if (c >= FIRST && c <= LAST) begin : g_cell
        // lowest A bit of the window: a_(K1*c - r*K2 - (K2-1))
        localparam int unsigned ALO = PAD + K1 * c - r * K2 - (K2 - 1);
        logic [K1-1:0] u_in, u_out;

        if (c == FIRST) begin : g_right_end
          assign u_in = '0;
        end else begin : g_inner
          assign u_in = g_col[c-1].g_cell.u_out;
        end

        fima_macrocell #(.K1(K1), .K2(K2)) u_cell (
          .a_win(a_pad[ALO +: AW]),
          .b_win(b_pad[r*K2 +: K2]),
          .u_in (u_in),
          .v_in (v_i[c]),
          .x_in (x_i[c]),
          .y_in (y_i[c]),
          .z_in (z_i[c]),
          .u_out(u_out),
          .v_out(v_o[c]),
          .x_out(x_o[c+1]),   // COLS exceeds every LAST by one
          .y_out(y_o[c+1]),
          .z_out(z_o[c+1])
        );
      end else if (c == LAST + 1) begin : g_u_end
        // The leftmost cell's U enters the next row as V of this column.
        assign v_o[c] = g_col[LAST].g_cell.u_out;
      end else begin : g_v_pass
        assign v_o[c] = v_i[c];
      end

      // x, y, z of column c where no cell of this row sits at column c-1:
      // they pass down, except at the first column, whose cell uses them.
      if (!(c >= FIRST + 1 && c <= LAST + 1)) begin : g_xyz
        if (c == FIRST) begin : g_consumed
          assign x_o[c] = 1'b0;
          assign y_o[c] = 1'b0;
          assign z_o[c] = 1'b0;
        end else begin : g_pass
          assign x_o[c] = x_i[c];
          assign y_o[c] = y_i[c];
          assign z_o[c] = z_i[c];
        end
      end
    end
  end

  // Final adder over columns 1 .. COLS-1; column 0 never receives carries.
  logic [COLS-2:0][K1-1:0] fv;
  logic [COLS-2:0]         fx, fy, fz;
  logic [PW-1:0]           p_full;
  logic                    final_cout;

  for (genvar c = 1; c < COLS; c++) begin : g_final_in
    assign fv[c-1] = g_row[R-1].v_o[c];
    assign fx[c-1] = g_row[R-1].x_o[c];
    assign fy[c-1] = g_row[R-1].y_o[c];
    assign fz[c-1] = g_row[R-1].z_o[c];
  end

  fima_final_adder #(.K1(K1), .COLS(COLS - 1)) u_final (
    .v(fv), .x(fx), .y(fy), .z(fz), .cin(1'b0),
    .sum(p_full[PW-1:K1]), .cout(final_cout)
  );

  assign p_full[K1-1:0] = g_row[R-1].v_o[0];
  assign p = p_full[N+M-1:0];

  // The product has N+M bits: every bit above, and the final carry, is zero.
  always_comb begin
    assert (!final_cout && (p_full >> (N + M)) == '0)
      else $error("fima_multiplier: result exceeds N+M bits");
    assert (!g_row[R-1].x_o[0] && !g_row[R-1].y_o[0] && !g_row[R-1].z_o[0])
      else $error("fima_multiplier: carry into column 0");
  end

endmodule
