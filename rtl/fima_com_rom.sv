// fima_com_rom: read-only table adding KS rows of partial products.
//
// The address is {b[KS-1:0], a[KS+K1-2:0]}: KS bits of factor B and the
// KS+K1-1 bits of factor A that meet them inside a K1-column rectangle of
// the dot diagram. Row j contributes b[j] * a[KS-1-j +: K1]; the word stored
// is the sum of the KS rows, D bits wide. The table is a memory array filled
// at initialisation from fima_pkg::rom_word, so its contents need no data
// file; it has 2^(2*KS+K1-1) words. For K1 = 2 the two tables of a cell are
// 2^7 x 4 bits (KS = 3) and 2^5 x 3 bits (KS = 2).
//
// Using ROMs addressed by factor bits for the compressor follows the array's
// description; the address bit order is this design's own. Asynchronous
// (combinational) read.
module fima_com_rom #(
  parameter int unsigned K1 = 2,
  parameter int unsigned KS = 3,
  parameter int unsigned D  = 2 * K1
) (
  input  logic [KS+K1-2:0] a,
  input  logic [KS-1:0]    b,
  output logic [D-1:0]     q
);

  localparam int unsigned AW    = 2 * KS + K1 - 1;
  localparam int unsigned DEPTH = 1 << AW;

  // The largest sum, KS*(2^K1-1), must fit in D bits.
  if (KS * ((1 << K1) - 1) >= (1 << D)) begin : g_width_check
    $error("fima_com_rom: D too small for KS rows of K1 bits");
  end

  logic [D-1:0] mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++)
      mem[i] = D'(fima_pkg::rom_word(K1, KS, i));
  end

  assign q = mem[{b, a}];

endmodule
