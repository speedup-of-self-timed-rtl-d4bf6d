// ncl_gen_s7: generator of the most significant product bit S7 of the 4x4
// multiplier.
//
// At the last stage the weight-6 column still holds three bits x, y, z and the
// weight-7 column one bit c. The full adder on x, y, z gives S6; its carry
// would have to be added to c to give S7. Since a 4x4 product is below 256,
// c and majority(x,y,z) are never both 1, so S7 = c xor maj(x,y,z), computed
// directly in two gate levels:
//   m.rail0 = TH23(x0, y0, z0)            m.rail1 = TH23(x1, y1, z1)
//   s.rail1 = THxor0(c1, m0, c0, m1)      s.rail0 = THxor0(c0, m0, c1, m1)
// Completeness: s asserts only once c is DATA, and releases only once c and
// all of x, y, z are NULL. The majority can be decided by two of x, y, z, so
// s alone does not prove that the third has arrived; in the multiplier the
// full adder that shares x, y, z observes all three, which keeps the stage as
// a whole input-complete (the same reasoning the incomplete ANDs rely on).
// Timing: s
// follows a complete input set two clk periods later (unit-delay emulation).
// The document gives the component's name, inputs (C, X, Y, Z) and purpose;
// the logic equation and gate structure are this design's own.
module ncl_gen_s7
  import ncl_pkg::*;
(
  input  logic clk,
  input  dr_t  c,
  input  dr_t  x,
  input  dr_t  y,
  input  dr_t  z,
  output dr_t  s
);

  dr_t m;

  ncl_th #(.N(3), .M(2)) u_m0 (
    .clk(clk), .rst(1'b0), .a({z.rail0, y.rail0, x.rail0}), .z(m.rail0));
  ncl_th #(.N(3), .M(2)) u_m1 (
    .clk(clk), .rst(1'b0), .a({z.rail1, y.rail1, x.rail1}), .z(m.rail1));
  ncl_thxor0 u_s1 (
    .clk(clk), .a(c.rail1), .b(m.rail0), .c(c.rail0), .d(m.rail1), .z(s.rail1));
  ncl_thxor0 u_s0 (
    .clk(clk), .a(c.rail0), .b(m.rail0), .c(c.rail1), .d(m.rail1), .z(s.rail0));

endmodule
