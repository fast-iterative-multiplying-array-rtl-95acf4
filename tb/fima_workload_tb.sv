// fima_workload_tb: square n x n multipliers at n = 8, 16, 24 and 32 of the sizes in the
// array's delay study (n from 8 to 48), each built both with K1 = 2, K2 = 5
// and with K1 = 3, K2 = 9 cells (see fima_square_check). Every instance gets
// the all-ones factors (largest product, longest carries) and 3000 random
// pairs, a quarter of them with one factor thinned to few ones. The array is
// combinational; the clock paces the stimulus and a watchdog bounds the run.
module fima_workload_tb;
  localparam int NSIZES = 4;
  localparam int NS [NSIZES] = '{8, 16, 24, 32};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [47:0] a, b;
  int checks_i [NSIZES], failures_i [NSIZES];

  for (genvar s = 0; s < NSIZES; s++) begin : g_size
    fima_square_check #(.N(NS[s])) u_check (
      .clk(clk), .a(a), .b(b), .checks(checks_i[s]), .failures(failures_i[s]));
  end

  function automatic int total(int v [NSIZES]);
    int t = 0;
    foreach (v[i]) t += v[i];
    return t;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks_i),
             total(failures_i) + 1);
    $finish;
  end

  initial begin
    a = '1; b = '1;
    @(negedge clk);
    for (int t = 0; t < 3000; t++) begin
      a = 48'({$urandom, $urandom});
      b = 48'({$urandom, $urandom});
      if (t % 4 == 1) a &= 48'({$urandom, $urandom});
      if (t % 4 == 2) b &= 48'({$urandom, $urandom});
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", total(checks_i), total(failures_i));
    $finish;
  end
endmodule
