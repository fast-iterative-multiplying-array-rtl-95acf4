// fima_com: the compressor (COM) of a macrocell.
//
// It adds the K2 rows of a K1-column block of partial products and returns
// the sum, at most 2*K1 bits, as two numbers whose sum is the block total.
// The block is split into an upper part of K2' = ceil(K2/2) rows (factor bits
// b[0..K2'-1]) and a lower part of K2'' = floor(K2/2) rows (b[K2'..K2-1]);
// each part is added by its own look-up table:
//   table 1: K2'+K1-1 bits of A (a_win[K2''..]) and K2' bits of B -> 2*K1 bits
//   table 2: K2''+K1-1 bits of A (a_win[0..]) and K2'' bits of B -> 2*K1-1 bits
// The outputs are each table's word split at bit K1: the low halves lo1, lo2
// (K1 bits each) and the high halves hi1 (K1 bits) and hi2 (K1-1 bits). The
// two-table split, the A/B bit ranges of each table and the output widths
// follow the array's description; for K1 = 2, K2 = 5 the two tables hold
// 2^7*4 + 2^5*3 = 608 bits, against 2^11*4 for a single table.
//
// a_win[i] is a_(q+i), the lowest A bit the block touches being a_q; b_win[j]
// is b_(p+j). Combinational.
module fima_com #(
  parameter int unsigned K1 = 2,
  parameter int unsigned K2 = 5
) (
  input  logic [K1+K2-2:0] a_win,
  input  logic [K2-1:0]    b_win,
  output logic [K1-1:0]    lo1,
  output logic [K1-1:0]    lo2,
  output logic [K1-1:0]    hi1,
  output logic [K1-2:0]    hi2
);

  localparam int unsigned K2A = (K2 + 1) / 2;  // K2', upper rows
  localparam int unsigned K2B = K2 / 2;        // K2'', lower rows

  logic [2*K1-1:0] q1;
  logic [2*K1-2:0] q2;

  fima_com_rom #(.K1(K1), .KS(K2A), .D(2 * K1)) u_rom1 (
    .a(a_win[K2B +: K2A+K1-1]),
    .b(b_win[K2A-1:0]),
    .q(q1)
  );

  fima_com_rom #(.K1(K1), .KS(K2B), .D(2 * K1 - 1)) u_rom2 (
    .a(a_win[K2B+K1-2:0]),
    .b(b_win[K2-1:K2A]),
    .q(q2)
  );

  assign lo1 = q1[K1-1:0];
  assign hi1 = q1[2*K1-1:K1];
  assign lo2 = q2[K1-1:0];
  assign hi2 = q2[2*K1-2:K1];

endmodule
