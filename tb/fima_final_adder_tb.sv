// fima_final_adder_tb: random check of a 7-column, K1 = 2 final adder (the
// size the default 4 x 10 array uses). The reference is the integer sum of
// all column values, sum_k (v[k] + x[k] + y[k] + z[k]) * 4^k + cin. Also
// checks a long carry ripple: all V at 3 and one x bit at column 0 must carry
// through every column. Counts how often a carry crossed a column boundary
// and fails if that never happened.
module fima_final_adder_tb;
  localparam int K1 = 2, COLS = 7;
  int checks = 0, failures = 0, ripples = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [COLS-1:0][K1-1:0] v;
  logic [COLS-1:0] x, y, z;
  logic cin, cout;
  logic [COLS*K1-1:0] sum;

  fima_final_adder #(.K1(K1), .COLS(COLS)) dut (.*);

  task automatic check_now();
    longint exp = longint'(cin);
    for (int k = 0; k < COLS; k++)
      exp += (longint'(v[k]) + longint'(x[k]) + longint'(y[k]) + longint'(z[k]))
             << (K1 * k);
    checks++;
    if (longint'({cout, sum}) != exp) begin
      failures++;
      $display("v=%h x=%b y=%b z=%b cin=%b -> %0d expected %0d",
               v, x, y, z, cin, {cout, sum}, exp);
    end
    if (dut.carry[COLS-1:1] != '0) ripples++;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v = '1; x = COLS'(1); y = '0; z = '0; cin = 1'b0;
    @(posedge clk);
    check_now();
    checks++;
    if (!cout || sum != '0) begin
      failures++;
      $display("long ripple failed");
    end
    for (int t = 0; t < 5000; t++) begin
      v = (COLS*K1)'({$urandom, $urandom});
      x = COLS'($urandom); y = COLS'($urandom); z = COLS'($urandom);
      cin = 1'($urandom);
      @(posedge clk);
      check_now();
    end
    if (ripples == 0) begin
      failures++;
      $display("no carry ever crossed a column");
    end
    $display("ripples=%0d", ripples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
