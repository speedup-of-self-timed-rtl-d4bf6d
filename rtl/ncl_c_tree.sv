// ncl_c_tree: tree of 4-input C-elements (TH44 gates) for completion detection.
//
// The N leaves are grouped by four, in index order, and each group feeds a
// TH44 gate; a smaller remainder group uses a TH33 or TH22, and a single
// leftover passes up one level unchanged. Levels are added until at most
// MAX_OUT signals remain. With MAX_OUT = 1 this is the full completion tree,
// whose output asserts once every leaf is asserted and de-asserts once every
// leaf is de-asserted. A larger MAX_OUT stops one level early so that a
// caller can fold its own last input into the root gate.
//
// Interface: ki are the leaves, ko the tree_out(N, MAX_OUT) top signals.
// Timing: one clk period per level, tree_levels(N, MAX_OUT) levels. The
// grouping by four follows the document; the handling of remainders is this
// design's own.
module ncl_c_tree
  import ncl_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter int unsigned MAX_OUT = 1
) (
  input  logic                            clk,
  input  logic [N-1:0]                    ki,
  output logic [tree_out(N, MAX_OUT)-1:0] ko
);

  localparam int unsigned LEVELS = tree_levels(N, MAX_OUT);

  // sig[l] holds the tree_count(N, MAX_OUT, l) signals of level l.
  logic [N-1:0] sig [LEVELS+1];

  assign sig[0] = ki;

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned CIN  = tree_count(N, MAX_OUT, l);
    localparam int unsigned COUT = tree_count(N, MAX_OUT, l + 1);
    for (genvar g = 0; g < COUT; g++) begin : g_grp
      localparam int unsigned GS = (CIN - 4*g >= 4) ? 4 : (CIN - 4*g);
      if (GS == 1) begin : g_pass
        assign sig[l+1][g] = sig[l][4*g];
      end else begin : g_gate
        ncl_th #(.N(GS), .M(GS)) u_c (
          .clk(clk), .rst(1'b0), .a(sig[l][4*g +: GS]), .z(sig[l+1][g]));
      end
    end
    if (COUT < N) begin : g_unused
      assign sig[l+1][N-1:COUT] = '0;
    end
  end

  assign ko = sig[LEVELS][tree_out(N, MAX_OUT)-1:0];

endmodule
