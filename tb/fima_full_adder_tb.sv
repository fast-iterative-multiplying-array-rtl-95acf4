// fima_full_adder_tb: exhaustive check of the full adder, 2*c + s == x+y+z
// for all eight inputs, with a watchdog.
module fima_full_adder_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic x, y, z, s, c;
  fima_full_adder dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {x, y, z} = 3'(i);
      @(posedge clk);
      checks++;
      if ({c, s} != 2'(int'(x) + int'(y) + int'(z))) begin
        failures++;
        $display("%b%b%b -> c=%b s=%b", x, y, z, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
