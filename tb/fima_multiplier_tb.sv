// fima_multiplier_tb: end-to-end check of the default array (4 x 10 bits,
// K1 = 2, K2 = 5; two rows of macrocells and a seven-cell final adder).
//
// Applies all 2^14 factor pairs and compares p with a * b. Every mechanism
// of the array must occur at least once, else a failure is counted:
//   u_ripple    a U word passed to the left neighbour in a row is nonzero
//   u_to_next   the U of a row's leftmost cell enters the next row as V
//   x/y_carry   an x or y carry passes from row 1 to row 2
//   z_carry     a z carry leaves row 2 (row 1 has no V input, so its z is 0)
//   last_xyz    x, y or z reach the final adder (full-adder compression)
//   final_ripple a carry crosses a column of the final adder
//   extra_cell  the leftmost cell of row 2 (weights 12..13, which holds a3*b9)
//               sees a nonzero block
// The array is combinational; the clock only paces the stimulus.
module fima_multiplier_tb;
  int checks = 0, failures = 0;
  int u_ripple = 0, u_to_next = 0, x_carry = 0, y_carry = 0, z_carry = 0;
  int last_xyz = 0, final_ripple = 0, extra_cell = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]  a;
  logic [9:0]  b;
  logic [13:0] p;

  fima_multiplier dut (.a(a), .b(b), .p(p));

  task automatic count(string name, int n);
    checks++;
    $display("%-13s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("mechanism %s never occurred", name);
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
    for (int i = 0; i < (1 << 14); i++) begin
      {a, b} = 14'(i);
      @(posedge clk);
      checks++;
      if (int'(p) != int'(a) * int'(b)) begin
        failures++;
        if (failures < 10) $display("%0d * %0d -> %0d", a, b, p);
      end
      if (dut.g_row[0].g_col[1].g_cell.u_in != 0 || dut.g_row[0].g_col[3].g_cell.u_in != 0 ||
          dut.g_row[1].g_col[4].g_cell.u_in != 0)
        u_ripple++;
      if (dut.g_row[0].v_o[4] != 0) u_to_next++;
      for (int c = 0; c < 8; c++) begin
        if (dut.g_row[1].x_i[c]) x_carry++;
        if (dut.g_row[1].y_i[c]) y_carry++;
        if (dut.g_row[1].z_o[c]) z_carry++;
        if (dut.g_row[1].x_o[c] || dut.g_row[1].y_o[c] || dut.g_row[1].z_o[c]) last_xyz++;
      end
      if (dut.u_final.carry[6:1] != 0) final_ripple++;
      if (dut.g_row[1].g_col[6].g_cell.u_cell.lo2 != 0) extra_cell++;
    end
    count("u_ripple", u_ripple);
    count("u_to_next", u_to_next);
    count("x_carry", x_carry);
    count("y_carry", y_carry);
    count("z_carry", z_carry);
    count("last_xyz", last_xyz);
    count("final_ripple", final_ripple);
    count("extra_cell", extra_cell);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
