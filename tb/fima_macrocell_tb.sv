// fima_macrocell_tb: random check of the macrocell at K1 = 2, K2 = 5.
//
// For each random factor window and side inputs it checks, against a block
// total rebuilt here from single partial products:
//   * conservation: block + x_in + y_in + z_in + U_in + V_in
//                   == V_out + 4*(U_out + x_out + y_out + z_out);
//   * U_out depends on the factor bits only (it is the same with all side
//     inputs zero), so U may ripple along a row without delaying the array;
//   * x_out is unchanged when U_in, V_in, y_in and z_in change, and y_out is
//     unchanged when V_in and z_in change: the order of the adder chain.
// A watchdog ends the run with a failure if it does not finish in time.
module fima_macrocell_tb;
  localparam int K1 = 2, K2 = 5;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [K1+K2-2:0] a_win;  logic [K2-1:0] b_win;
  logic [K1-1:0] u_in, v_in, u_out, v_out;
  logic x_in, y_in, z_in, x_out, y_out, z_out;

  fima_macrocell #(.K1(K1), .K2(K2)) dut (.*);

  function automatic int block(int a, int b);
    int sum = 0;
    for (int j = 0; j < K2; j++)
      for (int i = 0; i < K1 + K2 - 1; i++) begin
        int w = i - (K2 - 1 - j);
        if (w >= 0 && w < K1 && ((a >> i) & 1) == 1 && ((b >> j) & 1) == 1)
          sum += 1 << w;
      end
    return sum;
  endfunction

  task automatic check(string tag, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: a=%b b=%b got %0d expected %0d", tag, a_win, b_win, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K1-1:0] u_ref;
    logic x_ref, y_ref;
    for (int t = 0; t < 3000; t++) begin
      a_win = (K1+K2-1)'($urandom);
      b_win = K2'($urandom);
      // side inputs all zero: reference for U
      {u_in, v_in, x_in, y_in, z_in} = '0;
      @(posedge clk);
      u_ref = u_out;
      check("U alone", int'(v_out) + 4 * (int'(u_out) + int'(x_out) + int'(y_out)
            + int'(z_out)), block(int'(a_win), int'(b_win)));
      // random x_in; then vary everything after it in the chain
      x_in = 1'($urandom);
      @(posedge clk);
      x_ref = x_out;
      y_in = 1'($urandom); u_in = K1'($urandom);
      @(posedge clk);
      check("x_out ignores U_in, y_in", int'(x_out), int'(x_ref));
      y_ref = y_out;
      v_in = K1'($urandom); z_in = 1'($urandom);
      @(posedge clk);
      check("x_out ignores V_in, z_in", int'(x_out), int'(x_ref));
      check("y_out ignores V_in, z_in", int'(y_out), int'(y_ref));
      check("U_out ignores side inputs", int'(u_out), int'(u_ref));
      check("conservation",
            int'(v_out) + 4 * (int'(u_out) + int'(x_out) + int'(y_out) + int'(z_out)),
            block(int'(a_win), int'(b_win)) + int'(x_in) + int'(y_in) + int'(z_in)
            + int'(u_in) + int'(v_in));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
