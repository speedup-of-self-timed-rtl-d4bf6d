// ncl_and_c: complete (input-complete) dual-rail AND, the "C" partial-product
// gate of the multiplier's first stage.
//
// z becomes DATA only when both a and b are DATA, and returns to NULL only when
// both are NULL, so this gate observes both of its inputs:
//   z.rail1 = TH22(a1, b1)
//   z.rail0 = TH34w22(a0, b0, a1, b1)  -- weights 2,2,1,1, threshold 3, i.e.
//             a0b0 + a0b1 + a1b0
// One gate level: z follows a complete input set one clk period later
// (unit-delay emulation). The document names this function; the gate choice is
// this design's own.
module ncl_and_c
  import ncl_pkg::*;
(
  input  logic clk,
  input  dr_t  a,
  input  dr_t  b,
  output dr_t  z
);

  ncl_th #(.N(2), .M(2)) u_z1 (
    .clk(clk), .rst(1'b0), .a({b.rail1, a.rail1}), .z(z.rail1));
  ncl_th #(.N(4), .M(3), .WEIGHTS(32'h0000_1122)) u_z0 (
    .clk(clk), .rst(1'b0), .a({b.rail1, a.rail1, b.rail0, a.rail0}), .z(z.rail0));

endmodule
