// ncl_mult4x4_ec: self-timed 4x4 unsigned multiplier in dual-rail NULL
// Convention Logic, pipelined into 7 combinational stages between 8
// registration stages, with Early Completion handshaking.
//
// The datapath (ncl_mult4x4_datapath) holds the registers and the partial-
// product and carry-save adder stages. Each register k gets an Early
// Completion component (ncl_ec_completion) that watches the register's
// inputs, not its outputs, together with Ko(k+1), the request that register
// k itself latches under. Its output Ko(k) is the request to register k-1;
// the first component's output goes to the input environment (ko). Register
// 8 latches under the output environment's request ki, and its component is
// the final-stage variant that takes ki.
//
// MERGE_ROOT (default 1) is passed to the middle-stage components: 1 folds
// each component's final inverting TH22 into the root of its TH44 tree, 0
// keeps the separate gate of the basic form.
//
// The environment must follow the four-phase NCL protocol: present DATA on x,
// y while ko = RFD and NULL while ko = RFN; drive ki = RFN once s is all DATA
// and RFD once s is all NULL.
//
// Timing: unit-delay emulation, one clk period per threshold gate. With
// MERGE_ROOT = 1 every completion component is three gates deep and the
// steady-state DATA-to-DATA cycle is 2 x (1 register + 2 logic + 3
// completion) = 12 gate delays. With MERGE_ROOT = 0 the wider components are
// four gates deep and the cycle varies with the data (12 to 16). rst
// (synchronous, active high, held for at least 8 periods with x and y NULL)
// resets every register to NULL and every completion output to RFD, so
// initialisation does not ripple through the pipeline.
//
// The stage structure, handshake and reset scheme follow the document; the
// clocked emulation is this design's own.
module ncl_mult4x4_ec
  import ncl_pkg::*;
#(
  parameter bit MERGE_ROOT = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  input  dr_t  [3:0]  x,
  input  dr_t  [3:0]  y,
  output logic        ko,
  output dr_t  [7:0]  s,
  input  logic        ki
);

  // kreq[k-1] is the output of completion component k, the request Ko(k) to
  // register k-1 (kreq[0] goes to the input environment). Register k latches
  // under kreq[k]; kreq[MUL_NREG] is the external request ki.
  // reg_q (register outputs) is what standard completion would watch; Early
  // Completion does not need it.
  logic [MUL_NREG:0]         kreq;
  dr_t  [MUL_BITS-1:0]       reg_d;
  dr_t  [MUL_BITS-1:0]       reg_q;

  assign kreq[MUL_NREG] = ki;
  assign ko             = kreq[0];

  ncl_mult4x4_datapath u_dp (
    .clk, .rst, .x, .y, .kreg(kreq[MUL_NREG:1]), .reg_d, .reg_q, .s);

  for (genvar k = 0; k < MUL_NREG; k++) begin : g_comp
    ncl_ec_completion #(.N(MUL_REG_W[k]), .LAST(k == MUL_NREG - 1),
                        .MERGE_ROOT(MERGE_ROOT)) u_comp (
      .clk, .rst,
      .x(reg_d[mul_reg_off(k) +: MUL_REG_W[k]]),
      .ko_next(kreq[k+1]),
      .ko(kreq[k]));
  end

endmodule
