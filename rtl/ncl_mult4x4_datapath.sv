// ncl_mult4x4_datapath: datapath of the self-timed 4x4 unsigned multiplier
// in dual-rail NULL Convention Logic: 8 registration stages and the 7
// combinational stages between them, without the completion components.
//
// Structure (register widths 8, 16, 13, 12, 12, 11, 10, 8):
//   R1  latches x[3:0], y[3:0].
//   S1  16 partial products x_i*y_j; the four diagonal ones are complete ANDs
//       (ncl_and_c), the rest incomplete ANDs (ncl_and_i).          -> R2 (16)
//   S2  carry-save step: HA on weight 1, FA on weights 2, 3, 4, HA on 5. -> R3 (13)
//   S3  HA on weight 2, FA on 3, HA on 4, 5, 6; product bit 2 done.  -> R4 (12)
//   S4  HA on weight 3; product bit 3 done.                          -> R5 (12)
//   S5  FA on weight 4; product bit 4 done.                          -> R6 (11)
//   S6  FA on weight 5; product bit 5 done.                          -> R7 (10)
//   S7  FA on weight 6 gives S6, ncl_gen_s7 gives S7.                -> R8 (8)
// Bits that are already final, or wait for a later stage, pass straight
// through the combinational stages to the next register.
//
// Interface: kreg[k-1] is the request register k latches under (RFD passes
// DATA, RFN passes NULL). reg_d and reg_q bring out the inputs and outputs of
// all registers side by side (register k at mul_reg_off(k-1), width
// MUL_REG_W[k-1]) so that completion detection of either kind can be
// attached: Early Completion watches reg_d, standard completion reg_q. s is
// the output of register 8.
//
// Timing: unit-delay emulation, one clk period per threshold gate. Stage 1 is
// one gate level deep, stages 2-7 two; each register adds one. rst
// (synchronous, active high) resets every register to NULL.
//
// The stage structure, register widths and adder counts follow the document;
// the assignment of partial products and carries to particular adders, the
// choice of which ANDs are complete, and the clocked emulation are this
// design's own.
module ncl_mult4x4_datapath
  import ncl_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  dr_t  [3:0]           x,
  input  dr_t  [3:0]           y,
  input  logic [MUL_NREG-1:0]  kreg,
  output dr_t  [MUL_BITS-1:0]  reg_d,
  output dr_t  [MUL_BITS-1:0]  reg_q,
  output dr_t  [7:0]           s
);

  localparam int unsigned W1 = MUL_REG_W[0], W2 = MUL_REG_W[1];
  localparam int unsigned W3 = MUL_REG_W[2], W4 = MUL_REG_W[3];
  localparam int unsigned W5 = MUL_REG_W[4], W6 = MUL_REG_W[5];
  localparam int unsigned W7 = MUL_REG_W[6], W8 = MUL_REG_W[7];

  // Register inputs (d*) and outputs (q*).
  dr_t [W1-1:0] d1, q1;
  dr_t [W2-1:0] d2, q2;
  dr_t [W3-1:0] d3, q3;
  dr_t [W4-1:0] d4, q4;
  dr_t [W5-1:0] d5, q5;
  dr_t [W6-1:0] d6, q6;
  dr_t [W7-1:0] d7, q7;
  dr_t [W8-1:0] d8, q8;

  // ---------------------------------------------------------------- registers
  ncl_register #(.N(W1)) u_r1 (.clk, .rst, .d(d1), .ki(kreg[0]), .q(q1));
  ncl_register #(.N(W2)) u_r2 (.clk, .rst, .d(d2), .ki(kreg[1]), .q(q2));
  ncl_register #(.N(W3)) u_r3 (.clk, .rst, .d(d3), .ki(kreg[2]), .q(q3));
  ncl_register #(.N(W4)) u_r4 (.clk, .rst, .d(d4), .ki(kreg[3]), .q(q4));
  ncl_register #(.N(W5)) u_r5 (.clk, .rst, .d(d5), .ki(kreg[4]), .q(q5));
  ncl_register #(.N(W6)) u_r6 (.clk, .rst, .d(d6), .ki(kreg[5]), .q(q6));
  ncl_register #(.N(W7)) u_r7 (.clk, .rst, .d(d7), .ki(kreg[6]), .q(q7));
  ncl_register #(.N(W8)) u_r8 (.clk, .rst, .d(d8), .ki(kreg[7]), .q(q8));

  // ------------------------------------------------------------------- input
  assign d1 = {y, x};

  // ------------------------------------------------ stage 1: partial products
  // d2 holds the products ordered by weight:
  //   [0] x0y0 | [1] x1y0 [2] x0y1 | [3] x2y0 [4] x1y1 [5] x0y2 |
  //   [6] x3y0 [7] x2y1 [8] x1y2 [9] x0y3 | [10] x3y1 [11] x2y2 [12] x1y3 |
  //   [13] x3y2 [14] x2y3 | [15] x3y3
  localparam int PP_I [16] = '{0, 1, 0, 2, 1, 0, 3, 2, 1, 0, 3, 2, 1, 3, 2, 3};
  localparam int PP_J [16] = '{0, 0, 1, 0, 1, 2, 0, 1, 2, 3, 1, 2, 3, 2, 3, 3};

  for (genvar k = 0; k < 16; k++) begin : g_pp
    if (PP_I[k] == PP_J[k]) begin : g_c
      ncl_and_c u_and (.clk, .a(q1[PP_I[k]]), .b(q1[4 + PP_J[k]]), .z(d2[k]));
    end else begin : g_i
      ncl_and_i u_and (.clk, .a(q1[PP_I[k]]), .b(q1[4 + PP_J[k]]), .z(d2[k]));
    end
  end

  // ---------------------------------------------------------------- stage 2
  // d3: [0] w0 | [1] w1 | [2] w2 [3] w2 | [4] w3 [5] w3 [6] w3 |
  //     [7] w4 [8] w4 | [9] w5 [10] w5 | [11] w6 [12] w6
  ncl_ha u_s2_ha1 (.clk, .a(q2[1]),  .b(q2[2]),                 .s(d3[1]), .c(d3[3]));
  ncl_fa u_s2_fa1 (.clk, .a(q2[3]),  .b(q2[4]),  .ci(q2[5]),    .s(d3[2]), .co(d3[6]));
  ncl_fa u_s2_fa2 (.clk, .a(q2[6]),  .b(q2[7]),  .ci(q2[8]),    .s(d3[5]), .co(d3[8]));
  ncl_fa u_s2_fa3 (.clk, .a(q2[10]), .b(q2[11]), .ci(q2[12]),   .s(d3[7]), .co(d3[10]));
  ncl_ha u_s2_ha2 (.clk, .a(q2[13]), .b(q2[14]),                .s(d3[9]), .c(d3[12]));
  assign d3[0]  = q2[0];
  assign d3[4]  = q2[9];
  assign d3[11] = q2[15];

  // ---------------------------------------------------------------- stage 3
  // d4: [0] w0 [1] w1 [2] w2 | [3] w3 [4] w3 | [5] w4 [6] w4 |
  //     [7] w5 [8] w5 | [9] w6 [10] w6 | [11] w7
  ncl_ha u_s3_ha1 (.clk, .a(q3[2]),  .b(q3[3]),                 .s(d4[2]), .c(d4[4]));
  ncl_fa u_s3_fa1 (.clk, .a(q3[4]),  .b(q3[5]),  .ci(q3[6]),    .s(d4[3]), .co(d4[6]));
  ncl_ha u_s3_ha2 (.clk, .a(q3[7]),  .b(q3[8]),                 .s(d4[5]), .c(d4[8]));
  ncl_ha u_s3_ha3 (.clk, .a(q3[9]),  .b(q3[10]),                .s(d4[7]), .c(d4[10]));
  ncl_ha u_s3_ha4 (.clk, .a(q3[11]), .b(q3[12]),                .s(d4[9]), .c(d4[11]));
  assign d4[1:0] = q3[1:0];

  // ---------------------------------------------------------------- stage 4
  // d5: [0..3] w0..w3 | [4] [5] [6] w4 | [7] [8] w5 | [9] [10] w6 | [11] w7
  ncl_ha u_s4_ha1 (.clk, .a(q4[3]), .b(q4[4]), .s(d5[3]), .c(d5[6]));
  assign d5[2:0]  = q4[2:0];
  assign d5[5:4]  = q4[6:5];
  assign d5[11:7] = q4[11:7];

  // ---------------------------------------------------------------- stage 5
  // d6: [0..4] w0..w4 | [5] [6] [7] w5 | [8] [9] w6 | [10] w7
  ncl_fa u_s5_fa1 (.clk, .a(q5[4]), .b(q5[5]), .ci(q5[6]), .s(d6[4]), .co(d6[7]));
  assign d6[3:0]  = q5[3:0];
  assign d6[6:5]  = q5[8:7];
  assign d6[10:8] = q5[11:9];

  // ---------------------------------------------------------------- stage 6
  // d7: [0..5] w0..w5 | [6] [7] [8] w6 | [9] w7
  ncl_fa u_s6_fa1 (.clk, .a(q6[5]), .b(q6[6]), .ci(q6[7]), .s(d7[5]), .co(d7[8]));
  assign d7[4:0] = q6[4:0];
  assign d7[7:6] = q6[9:8];
  assign d7[9]   = q6[10];

  // ---------------------------------------------------------------- stage 7
  // The full adder's carry is not needed: ncl_gen_s7 forms S7 directly.
  dr_t s7_fa_co;
  ncl_fa     u_s7_fa1 (.clk, .a(q7[6]), .b(q7[7]), .ci(q7[8]), .s(d8[6]), .co(s7_fa_co));
  ncl_gen_s7 u_s7_gen (.clk, .c(q7[9]), .x(q7[6]), .y(q7[7]), .z(q7[8]), .s(d8[7]));
  assign d8[5:0] = q7[5:0];

  assign s = q8;

  // Side-by-side view of every register's input and output.
  assign reg_d = {d8, d7, d6, d5, d4, d3, d2, d1};
  assign reg_q = {q8, q7, q6, q5, q4, q3, q2, q1};

  initial assert (mul_reg_off(MUL_NREG) == MUL_BITS)
    else $error("ncl_mult4x4_datapath: register widths do not add up to MUL_BITS");

endmodule
