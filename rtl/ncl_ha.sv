// ncl_ha: dual-rail NCL half adder (s = a xor b, c = a and b).
//
// Two gate levels:
//   c.rail0 = TH12(a0, b0)          c.rail1 = TH22(a1, b1)
//   s.rail0 = TH23w2(c1, a0, b0)    s.rail1 = TH33w2(c0, a1, b1)
// (weight 2 on the first input). The sum rails can only assert with both
// inputs present and only release after both have gone NULL, which makes the
// half adder input-complete through s. Timing: s follows a complete input set
// two clk periods later (unit-delay emulation), c one period later, matching
// the two gate delays given for every adder stage. The document names the
// function; the gate-level structure is this design's own.
module ncl_ha
  import ncl_pkg::*;
(
  input  logic clk,
  input  dr_t  a,
  input  dr_t  b,
  output dr_t  s,
  output dr_t  c
);

  ncl_th #(.N(2), .M(1)) u_c0 (
    .clk(clk), .rst(1'b0), .a({b.rail0, a.rail0}), .z(c.rail0));
  ncl_th #(.N(2), .M(2)) u_c1 (
    .clk(clk), .rst(1'b0), .a({b.rail1, a.rail1}), .z(c.rail1));
  ncl_th #(.N(3), .M(2), .WEIGHTS(32'h0000_0112)) u_s0 (
    .clk(clk), .rst(1'b0), .a({b.rail0, a.rail0, c.rail1}), .z(s.rail0));
  ncl_th #(.N(3), .M(3), .WEIGHTS(32'h0000_0112)) u_s1 (
    .clk(clk), .rst(1'b0), .a({b.rail1, a.rail1, c.rail0}), .z(s.rail1));

endmodule
