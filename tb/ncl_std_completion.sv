// ncl_std_completion: standard NCL completion detection, used only as the
// reference against which Early Completion is measured.
//
// Each bit of a register's output drives an inverting TH12 (high while the
// bit is NULL), and a tree of TH44 gates (ncl_c_tree) combines them: ko is
// RFD once every output bit is NULL and RFN once every bit is DATA. It has no
// reset: after the registers reset to NULL its output settles to RFD within
// its own depth. Unit-delay emulation, one clk period per gate level.
module ncl_std_completion
  import ncl_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic        clk,
  input  dr_t [N-1:0] q,
  output logic        ko
);

  logic [N-1:0] kbit;

  for (genvar i = 0; i < N; i++) begin : g_bit
    ncl_th #(.N(2), .M(1), .INVERT(1'b1)) u_th12n (
      .clk(clk), .rst(1'b0), .a({q[i].rail1, q[i].rail0}), .z(kbit[i]));
  end

  ncl_c_tree #(.N(N), .MAX_OUT(1)) u_tree (.clk(clk), .ki(kbit), .ko(ko));

endmodule
