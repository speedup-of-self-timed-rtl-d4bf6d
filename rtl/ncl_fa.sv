// ncl_fa: dual-rail NCL full adder.
//
// Two gate levels, the usual NCL full adder:
//   co.rail0 = TH23(a0, b0, ci0)          co.rail1 = TH23(a1, b1, ci1)
//   s.rail0  = TH34w2(co1, a0, b0, ci0)   s.rail1  = TH34w2(co0, a1, b1, ci1)
// (weight 2 on the carry input). Input-complete through s. Timing: co follows
// a complete input set one clk period later, s two periods later (unit-delay
// emulation). The document names the function; the gate-level structure is
// this design's own choice.
module ncl_fa
  import ncl_pkg::*;
(
  input  logic clk,
  input  dr_t  a,
  input  dr_t  b,
  input  dr_t  ci,
  output dr_t  s,
  output dr_t  co
);

  ncl_th #(.N(3), .M(2)) u_co0 (
    .clk(clk), .rst(1'b0), .a({ci.rail0, b.rail0, a.rail0}), .z(co.rail0));
  ncl_th #(.N(3), .M(2)) u_co1 (
    .clk(clk), .rst(1'b0), .a({ci.rail1, b.rail1, a.rail1}), .z(co.rail1));
  ncl_th #(.N(4), .M(3), .WEIGHTS(32'h0000_1112)) u_s0 (
    .clk(clk), .rst(1'b0), .a({ci.rail0, b.rail0, a.rail0, co.rail1}), .z(s.rail0));
  ncl_th #(.N(4), .M(3), .WEIGHTS(32'h0000_1112)) u_s1 (
    .clk(clk), .rst(1'b0), .a({ci.rail1, b.rail1, a.rail1, co.rail0}), .z(s.rail1));

endmodule
