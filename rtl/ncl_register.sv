// ncl_register: N-bit dual-rail NCL registration stage for Early Completion.
//
// Each rail of each bit is a TH22 gate (a 2-input C-element) of the input rail
// and the request line ki: with ki = RFD a DATA wavefront at d passes to q,
// with ki = RFN a NULL wavefront passes, and otherwise q holds. Because the
// completion component of an Early Completion pipeline watches the register's
// inputs, the per-bit inverting TH12 that would produce Ko is left out, as the
// Early Completion scheme prescribes.
//
// Interface: d/q are arrays of dr_t; ki is the request from this stage's
// completion component. Reset (synchronous, active high) drives q to NULL,
// or, with RESET_DATA = 1, to the DATA word RESET_VALUE (bit i DATA1 where
// RESET_VALUE[i] is 1). Both reset choices are allowed by the document; which
// one a stage uses is up to the pipeline, and its completion component must
// reset to match (RFD for NULL, RFN for DATA).
// Timing: q follows d one clk period (one gate delay) after both d and ki allow
// it. An assertion checks that no latched bit ever has both rails high.
module ncl_register
  import ncl_pkg::*;
#(
  parameter int unsigned N           = 8,
  parameter bit          RESET_DATA  = 1'b0,
  parameter logic [N-1:0] RESET_VALUE = '0
) (
  input  logic          clk,
  input  logic          rst,
  input  dr_t   [N-1:0] d,
  input  logic          ki,
  output dr_t   [N-1:0] q
);

  for (genvar i = 0; i < N; i++) begin : g_bit
    ncl_th #(.N(2), .M(2), .RESETTABLE(1'b1),
             .RESET_VAL(RESET_DATA && !RESET_VALUE[i])) u_r0 (
      .clk(clk), .rst(rst), .a({ki, d[i].rail0}), .z(q[i].rail0));
    ncl_th #(.N(2), .M(2), .RESETTABLE(1'b1),
             .RESET_VAL(RESET_DATA && RESET_VALUE[i])) u_r1 (
      .clk(clk), .rst(rst), .a({ki, d[i].rail1}), .z(q[i].rail1));

    a_legal: assert property (@(posedge clk) disable iff (rst)
                              !(q[i].rail0 && q[i].rail1))
      else $error("ncl_register: bit %0d latched an illegal dual-rail state", i);
  end

endmodule
