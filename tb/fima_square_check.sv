// fima_square_check: test helper holding two N x N multipliers, one built
// from K1 = 2, K2 = 5 cells and one from K1 = 3, K2 = 9 cells, and comparing
// both products with a * b on every rising clock edge. The low N bits of the
// 48-bit a and b buses are the factors. checks and failures count the
// comparisons made and the mismatches seen.
module fima_square_check #(
  parameter int unsigned N = 8
) (
  input  logic        clk,
  input  logic [47:0] a,
  input  logic [47:0] b,
  output int          checks,
  output int          failures
);

  logic [2*N-1:0] p25, p39, exp;

  fima_multiplier #(.N(N), .M(N), .K1(2), .K2(5)) u25 (
    .a(a[N-1:0]), .b(b[N-1:0]), .p(p25));
  fima_multiplier #(.N(N), .M(N), .K1(3), .K2(9)) u39 (
    .a(a[N-1:0]), .b(b[N-1:0]), .p(p39));

  assign exp = (2*N)'(a[N-1:0]) * (2*N)'(b[N-1:0]);

  initial begin
    checks = 0;
    failures = 0;
  end

  always @(posedge clk) begin
    checks <= checks + 2;
    if (p25 != exp) begin
      failures <= failures + 1;
      $display("n=%0d k=(2,5): %h * %h -> %h", N, a[N-1:0], b[N-1:0], p25);
    end
    if (p39 != exp) begin
      failures <= failures + 1;
      $display("n=%0d k=(3,9): %h * %h -> %h", N, a[N-1:0], b[N-1:0], p39);
    end
  end

endmodule
