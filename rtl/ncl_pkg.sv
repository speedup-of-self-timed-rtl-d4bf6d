// ncl_pkg: shared types and constants for the dual-rail NULL Convention Logic
// (NCL) multiplier with Early Completion.
//
// A dual-rail signal has two rails. DATA0 is rail0=1/rail1=0, DATA1 is
// rail0=0/rail1=1, NULL is both rails 0; both rails 1 is illegal. Handshake
// lines carry "request for DATA" (RFD, 1) or "request for NULL" (RFN, 0).
// The encodings follow NCL convention; the struct layout and the helper
// functions are this design's own. tree_levels/tree_count describe the shape
// of the 4-input C-element trees used by the completion components.
package ncl_pkg;

  typedef struct packed {
    logic rail1;
    logic rail0;
  } dr_t;

  localparam dr_t DR_NULL  = '{rail1: 1'b0, rail0: 1'b0};
  localparam dr_t DR_DATA0 = '{rail1: 1'b0, rail0: 1'b1};
  localparam dr_t DR_DATA1 = '{rail1: 1'b1, rail0: 1'b0};

  localparam logic RFD = 1'b1;  // request for DATA
  localparam logic RFN = 1'b0;  // request for NULL

  // Registration stages of the 4x4 multiplier: widths in dual-rail bits, and
  // their offsets when all stages are laid out side by side in one vector.
  localparam int unsigned MUL_NREG = 8;
  localparam int unsigned MUL_REG_W [MUL_NREG] = '{8, 16, 13, 12, 12, 11, 10, 8};
  localparam int unsigned MUL_BITS = 90;

  function automatic int unsigned mul_reg_off(input int unsigned k);
    int unsigned o;
    o = 0;
    for (int unsigned i = 0; i < k; i++) o += MUL_REG_W[i];
    return o;
  endfunction

  // Maximum depth of a completion tree; 4**6 leaves is far beyond any use here.
  localparam int unsigned TREE_MAX_LEVELS = 6;

  function automatic dr_t dr_enc(input logic b);
    return b ? DR_DATA1 : DR_DATA0;
  endfunction

  function automatic logic dr_is_data(input dr_t v);
    return v.rail0 ^ v.rail1;
  endfunction

  function automatic logic dr_is_null(input dr_t v);
    return !v.rail0 && !v.rail1;
  endfunction

  // Number of signals at level lvl of a tree that groups n leaves by four
  // until at most max_out signals remain.
  function automatic int unsigned tree_count(input int unsigned n,
                                             input int unsigned max_out,
                                             input int unsigned lvl);
    int unsigned c;
    c = n;
    for (int unsigned l = 0; l < lvl; l++)
      if (c > max_out) c = (c + 3) / 4;
    return c;
  endfunction

  // Number of gate levels in that tree.
  function automatic int unsigned tree_levels(input int unsigned n,
                                              input int unsigned max_out);
    int unsigned c, l;
    c = n;
    l = 0;
    while (c > max_out && l < TREE_MAX_LEVELS) begin
      c = (c + 3) / 4;
      l++;
    end
    return l;
  endfunction

  function automatic int unsigned tree_out(input int unsigned n,
                                           input int unsigned max_out);
    return tree_count(n, max_out, tree_levels(n, max_out));
  endfunction

endpackage
