// ncl_mult4x4_std: the same 4x4 multiplier datapath with standard completion
// (detection at each register's outputs), kept as the reference for
// measuring the speedup of Early Completion. Interface and protocol as for
// ncl_mult4x4_ec. Unit-delay emulation.
module ncl_mult4x4_std
  import ncl_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  dr_t  [3:0]  x,
  input  dr_t  [3:0]  y,
  output logic        ko,
  output dr_t  [7:0]  s,
  input  logic        ki
);

  logic [MUL_NREG:0]   kreq;
  dr_t  [MUL_BITS-1:0] reg_d;
  dr_t  [MUL_BITS-1:0] reg_q;

  assign kreq[MUL_NREG] = ki;
  assign ko             = kreq[0];

  ncl_mult4x4_datapath u_dp (
    .clk, .rst, .x, .y, .kreg(kreq[MUL_NREG:1]), .reg_d, .reg_q, .s);

  for (genvar k = 0; k < MUL_NREG; k++) begin : g_comp
    ncl_std_completion #(.N(MUL_REG_W[k])) u_comp (
      .clk, .q(reg_q[mul_reg_off(k) +: MUL_REG_W[k]]), .ko(kreq[k]));
  end

endmodule
