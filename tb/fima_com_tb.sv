// fima_com_tb: checks the COM block of a K1 = 2, K2 = 5 cell exhaustively
// (all 2^11 factor windows) and of a K1 = 3, K2 = 9 cell at random. The
// reference is the block total rebuilt from single partial products:
// a_win[i]*b_win[j] has weight i - (K2-1-j) and belongs to the block when that
// weight lies in 0..K1-1. Checks that lo1 + lo2 + 2^K1*(hi1 + hi2) equals the
// total, and that each table's word, {hi, lo}, equals the total of its own
// half of the rows (upper ceil(K2/2) rows to table 1, the rest to table 2).
module fima_com_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // K1 = 2, K2 = 5
  logic [5:0] aw;  logic [4:0] bw;
  logic [1:0] lo1, lo2, hi1;  logic [0:0] hi2;
  // K1 = 3, K2 = 9
  logic [10:0] awl; logic [8:0] bwl;
  logic [2:0] lo1l, lo2l, hi1l;  logic [1:0] hi2l;

  fima_com #(.K1(2), .K2(5)) dut (
    .a_win(aw), .b_win(bw), .lo1(lo1), .lo2(lo2), .hi1(hi1), .hi2(hi2));
  fima_com #(.K1(3), .K2(9)) dutl (
    .a_win(awl), .b_win(bwl), .lo1(lo1l), .lo2(lo2l), .hi1(hi1l), .hi2(hi2l));

  // total of rows j0..j1 of a K1 x K2 block
  function automatic int block(int k1, int k2, int a, int b, int j0, int j1);
    int sum = 0;
    for (int j = j0; j <= j1; j++)
      for (int i = 0; i < k1 + k2 - 1; i++) begin
        int w = i - (k2 - 1 - j);
        if (w >= 0 && w < k1 && ((a >> i) & 1) == 1 && ((b >> j) & 1) == 1)
          sum += 1 << w;
      end
    return sum;
  endfunction

  task automatic check(string tag, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", tag, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) begin
      {bw, aw} = 11'(i);
      {bwl, awl} = 20'($urandom);
      @(posedge clk);
      check("k1=2 total", int'(lo1) + int'(lo2) + 4 * (int'(hi1) + int'(hi2)),
            block(2, 5, int'(aw), int'(bw), 0, 4));
      check("k1=2 table1", int'({hi1, lo1}), block(2, 5, int'(aw), int'(bw), 0, 2));
      check("k1=2 table2", int'({hi2, lo2}), block(2, 5, int'(aw), int'(bw), 3, 4));
      check("k1=3 total", int'(lo1l) + int'(lo2l) + 8 * (int'(hi1l) + int'(hi2l)),
            block(3, 9, int'(awl), int'(bwl), 0, 8));
      check("k1=3 table1", int'({hi1l, lo1l}), block(3, 9, int'(awl), int'(bwl), 0, 4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
