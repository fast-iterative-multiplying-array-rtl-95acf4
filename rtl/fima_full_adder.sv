// fima_full_adder: one-bit full adder, x + y + z = 2*c + s.
//
// Used in each additive cell of the final adder to compress the three carry
// bits x, y and z left by the last row of macrocells into a sum bit of
// weight 1 and a carry bit of weight 2. A two-level realisation has a delay
// of about 3 gates, matching the array's timing analysis. Combinational.
module fima_full_adder (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,
  output logic c
);

  assign s = x ^ y ^ z;
  assign c = (x & y) | (x & z) | (y & z);

endmodule
