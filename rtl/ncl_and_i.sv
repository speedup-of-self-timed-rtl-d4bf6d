// ncl_and_i: incomplete dual-rail AND, the "I" partial-product gate of the
// multiplier's first stage.
//
// z may become DATA0 as soon as either input is DATA0, without waiting for the
// other; completeness of the stage is instead provided by the complete ANDs
// (ncl_and_c), which together observe every input bit.
//   z.rail1 = TH22(a1, b1)
//   z.rail0 = TH12(a0, b0)
// One gate level (unit-delay emulation, one clk period). The document names
// this function; the gate choice is this design's own.
module ncl_and_i
  import ncl_pkg::*;
(
  input  logic clk,
  input  dr_t  a,
  input  dr_t  b,
  output dr_t  z
);

  ncl_th #(.N(2), .M(2)) u_z1 (
    .clk(clk), .rst(1'b0), .a({b.rail1, a.rail1}), .z(z.rail1));
  ncl_th #(.N(2), .M(1)) u_z0 (
    .clk(clk), .rst(1'b0), .a({b.rail0, a.rail0}), .z(z.rail0));

endmodule
