// fima_additive_cell_tb: exhaustive check of the final-adder slice at K1 = 2
// and K1 = 3: {cout, s} == V + x + y + z + cin for every input combination.
module fima_additive_cell_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] v2, s2;  logic x2, y2, z2, c2, co2;
  logic [2:0] v3, s3;  logic x3, y3, z3, c3, co3;

  fima_additive_cell #(.K1(2)) dut2 (
    .v(v2), .x(x2), .y(y2), .z(z2), .cin(c2), .s(s2), .cout(co2));
  fima_additive_cell #(.K1(3)) dut3 (
    .v(v3), .x(x3), .y(y3), .z(z3), .cin(c3), .s(s3), .cout(co3));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      {v3, x3, y3, z3, c3} = 7'(i);
      {v2, x2, y2, z2, c2} = 6'(i);
      @(posedge clk);
      checks++;
      if (int'({co3, s3}) != int'(v3) + int'(x3) + int'(y3) + int'(z3) + int'(c3)) begin
        failures++;
        $display("K1=3 input %b -> %0d", 7'(i), {co3, s3});
      end
      if (i < 64) begin
        checks++;
        if (int'({co2, s2}) != int'(v2) + int'(x2) + int'(y2) + int'(z2) + int'(c2)) begin
          failures++;
          $display("K1=2 input %b -> %0d", 6'(i), {co2, s2});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
