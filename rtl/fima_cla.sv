// fima_cla: W-bit carry look-ahead adder, s + 2^W*cout = x + y + cin.
//
// Every carry is formed directly from the generate (x&y) and propagate (x^y)
// signals of the bits below it and the carry-in, as a two-level sum of
// products; no carry ripples from bit to bit. The widest product term is
// cin & p[0] & ... & p[W-1], so the largest fan-in is W+1, which is the
// bound the array's cost analysis assumes for its K1-bit adders. That
// analysis also takes the carry-out to be ready about 3 gate delays after
// the operands and the sum about 6; RTL does not fix gate delays, so this is
// not checked here. The exact gate netlist of the adder is this design's own
// choice; only its width, function and fan-in bound come from the array's
// description. Purely combinational.
module fima_cla #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W-1:0] g, p;
  logic [W:0]   gc;   // gc[0] = cin, gc[j+1] = g[j]
  logic [W:0]   c;    // c[i] = carry into bit i, c[W] = carry-out
  logic         term;

  always_comb begin
    g  = x & y;
    p  = x ^ y;
    gc = {g, cin};
    c  = '0;
    c[0] = cin;
    for (int i = 0; i < W; i++) begin
      // carry into bit i+1: OR over sources j = 0..i+1 of
      // gc[j] & p[j] & ... & p[i]
      for (int j = 0; j <= i + 1; j++) begin
        term = gc[j];
        for (int k = j; k <= i; k++) term = term & p[k];
        c[i+1] = c[i+1] | term;
      end
    end
    s    = p ^ c[W-1:0];
    cout = c[W];
  end

endmodule
