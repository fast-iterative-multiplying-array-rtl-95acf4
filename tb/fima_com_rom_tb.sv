// fima_com_rom_tb: exhaustive check of the COM look-up tables of a K1 = 2
// cell (KS = 3 rows, 4-bit words; KS = 2 rows, 3-bit words) and a random
// check of a K1 = 3, KS = 5 table. The expected word is formed here as a sum
// of single partial products: a[i]*b[j] lands at weight i - (KS-1-j) and
// counts when that weight lies in 0..K1-1, so the rectangle is rebuilt from
// the dot diagram rather than from the row formula the tables use.
module fima_com_rom_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] a1;  logic [2:0] b1;  logic [3:0] q1;   // K1=2, KS=3
  logic [2:0] a2;  logic [1:0] b2;  logic [2:0] q2;   // K1=2, KS=2
  logic [6:0] a3;  logic [4:0] b3;  logic [5:0] q3;   // K1=3, KS=5

  fima_com_rom #(.K1(2), .KS(3), .D(4)) dut1 (.a(a1), .b(b1), .q(q1));
  fima_com_rom #(.K1(2), .KS(2), .D(3)) dut2 (.a(a2), .b(b2), .q(q2));
  fima_com_rom #(.K1(3), .KS(5), .D(6)) dut3 (.a(a3), .b(b3), .q(q3));

  function automatic int expected(int k1, int ks, int a, int b);
    int sum = 0;
    for (int j = 0; j < ks; j++)
      for (int i = 0; i < ks + k1 - 1; i++) begin
        int w = i - (ks - 1 - j);
        if (w >= 0 && w < k1 && ((a >> i) & 1) == 1 && ((b >> j) & 1) == 1)
          sum += 1 << w;
      end
    return sum;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      {b1, a1} = 7'(i);
      {b2, a2} = 5'(i);
      {b3, a3} = 12'($urandom);
      @(posedge clk);
      checks++;
      if (int'(q1) != expected(2, 3, int'(a1), int'(b1))) begin
        failures++;
        $display("KS=3 a=%b b=%b q=%0d", a1, b1, q1);
      end
      if (i < 32) begin
        checks++;
        if (int'(q2) != expected(2, 2, int'(a2), int'(b2))) begin
          failures++;
          $display("KS=2 a=%b b=%b q=%0d", a2, b2, q2);
        end
      end
      checks++;
      if (int'(q3) != expected(3, 5, int'(a3), int'(b3))) begin
        failures++;
        $display("K1=3 KS=5 a=%b b=%b q=%0d", a3, b3, q3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
