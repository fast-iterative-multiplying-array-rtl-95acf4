// fima_cla_tb: exhaustive check of the carry look-ahead adder at widths 2,
// 3 and 4 against integer addition. Checks {cout, s} == x + y + cin for every
// operand pair and carry-in. A free-running clock paces the stimulus; a
// watchdog ends the run with a failure if it does not finish in time.
module fima_cla_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] x2, y2, s2;  logic c2, co2;
  logic [2:0] x3, y3, s3;  logic c3, co3;
  logic [3:0] x4, y4, s4;  logic c4, co4;

  fima_cla #(.W(2)) dut2 (.x(x2), .y(y2), .cin(c2), .s(s2), .cout(co2));
  fima_cla #(.W(3)) dut3 (.x(x3), .y(y3), .cin(c3), .s(s3), .cout(co3));
  fima_cla #(.W(4)) dut4 (.x(x4), .y(y4), .cin(c4), .s(s4), .cout(co4));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int c = 0; c < 2; c++) begin
          x2 = 2'(i); y2 = 2'(j); c2 = c[0];
          x3 = 3'(i); y3 = 3'(j); c3 = c[0];
          x4 = 4'(i); y4 = 4'(j); c4 = c[0];
          @(posedge clk);
          if (i < 4 && j < 4) begin
            checks++;
            if ({co2, s2} != 3'(i + j + c)) begin
              failures++;
              $display("W=2 %0d+%0d+%0d -> %0d", i, j, c, {co2, s2});
            end
          end
          if (i < 8 && j < 8) begin
            checks++;
            if ({co3, s3} != 4'(i + j + c)) begin
              failures++;
              $display("W=3 %0d+%0d+%0d -> %0d", i, j, c, {co3, s3});
            end
          end
          checks++;
          if ({co4, s4} != 5'(i + j + c)) begin
            failures++;
            $display("W=4 %0d+%0d+%0d -> %0d", i, j, c, {co4, s4});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
