// ncl_ec_completion: Early Completion component for one NCL registration stage.
//
// Standard NCL detects completion at a register's outputs. Here completion is
// detected at the register's inputs instead, which lets the request for the
// next wavefront start while the current one is still being latched. To stay
// self-timed the component also waits for the request of the following stage,
// ko_next (Ko of stage i+1):
//   * each pair of bits feeds a TH24comp gate ((A+B)(C+D)), an odd last bit a
//     TH12, giving ceil(N/2) intermediate completion signals;
//   * a tree of TH44 gates (ncl_c_tree) reduces them;
//   * an inverting C-element combines the tree with ko_next.
// The result: ko = RFN once all inputs are DATA and ko_next is RFD, and ko =
// RFD once all inputs are NULL and ko_next is RFN.
//
// MERGE_ROOT = 1 folds the inverting TH22 into the root of the tree (the root
// becomes an inverting THnn with ko_next as one of its n <= 4 inputs), saving
// one gate level; MERGE_ROOT = 0 keeps the separate TH22 of the basic form.
//
// LAST = 1 gives the variant for the final stage, whose ko_next is the
// external Ki: the root of the tree is inverted and the final TH22 is not, so
// ko = RFD once the inputs are NULL and Ki is RFD, and ko = RFN once the inputs
// are DATA and Ki is RFN.
//
// Reset (synchronous, active high) drives the final gate to RFD, matching a
// register that resets to NULL, or with RESET_RFN = 1 to RFN, matching a
// register that resets to DATA, so initialisation does not have to ripple
// back through the pipeline. The other gates have no reset and settle from
// the register inputs while reset is held. Timing: unit-delay emulation, one clk period per
// gate level. Structure, variants and reset follow the document; the tree's
// remainder handling and the clocked emulation are this design's own.
module ncl_ec_completion
  import ncl_pkg::*;
#(
  parameter int unsigned N          = 8,
  parameter bit          LAST       = 1'b0,
  parameter bit          MERGE_ROOT = 1'b1,
  parameter bit          RESET_RFN  = 1'b0
) (
  input  logic        clk,
  input  logic        rst,
  input  dr_t [N-1:0] x,
  input  logic        ko_next,
  output logic        ko
);

  localparam int unsigned NPAIR = N / 2;
  localparam int unsigned NLEAF = (N + 1) / 2;
  localparam bit          KO_RST = RESET_RFN ? RFN : RFD;

  logic [NLEAF-1:0] leaf;

  for (genvar j = 0; j < NPAIR; j++) begin : g_pair
    ncl_th24comp u_comp (
      .clk(clk),
      .a(x[2*j].rail0), .b(x[2*j].rail1),
      .c(x[2*j+1].rail0), .d(x[2*j+1].rail1),
      .z(leaf[j]));
  end
  if (N % 2 == 1) begin : g_odd
    ncl_th #(.N(2), .M(1)) u_th12 (
      .clk(clk), .rst(1'b0), .a({x[N-1].rail1, x[N-1].rail0}), .z(leaf[NLEAF-1]));
  end

  if (!LAST) begin : g_mid
    localparam int unsigned MAXO = MERGE_ROOT ? 3 : 1;
    localparam int unsigned K    = tree_out(NLEAF, MAXO);
    logic [K-1:0] top;
    ncl_c_tree #(.N(NLEAF), .MAX_OUT(MAXO)) u_tree (.clk(clk), .ki(leaf), .ko(top));
    // Inverting TH(K+1)(K+1): RFN once everything is complete and ko_next is RFD.
    ncl_th #(.N(K+1), .M(K+1), .INVERT(1'b1), .RESETTABLE(1'b1), .RESET_VAL(KO_RST)) u_root (
      .clk(clk), .rst(rst), .a({ko_next, top}), .z(ko));
  end else begin : g_last
    localparam int unsigned K = tree_out(NLEAF, 4);
    logic [K-1:0] top;
    logic         not_done;
    ncl_c_tree #(.N(NLEAF), .MAX_OUT(4)) u_tree (.clk(clk), .ki(leaf), .ko(top));
    // Inverted root of the tree: high while the inputs are NULL.
    ncl_th #(.N(K), .M(K), .INVERT(1'b1)) u_root (
      .clk(clk), .rst(1'b0), .a(top), .z(not_done));
    // Non-inverting TH22 with the external request.
    ncl_th #(.N(2), .M(2), .RESETTABLE(1'b1), .RESET_VAL(KO_RST)) u_fin (
      .clk(clk), .rst(rst), .a({ko_next, not_done}), .z(ko));
  end

endmodule
