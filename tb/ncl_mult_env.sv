// ncl_mult_env: test environment for a dual-rail 4x4 multiplier.
//
// Input side: presents the next operand pair as a DATA wavefront while ko is
// RFD and a NULL wavefront while ko is RFN, one gate delay after ko changes;
// pairs run from 15*15 down to 0*0. Output side: infinitely fast, ki is RFN
// whenever s is all DATA and RFD whenever s is all NULL. Every product is
// compared with x*y. The DATA-to-DATA time TDD (gate delays between
// successive products) is recorded from the 9th product on.
module ncl_mult_env
  import ncl_pkg::*;
#(
  parameter int NVEC = 256
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ko,
  input  dr_t [7:0]  s,
  output dr_t [3:0]  x,
  output dr_t [3:0]  y,
  output logic       ki,
  output logic       done,
  output int         errors,
  output int         tdd_min,
  output int         tdd_max,
  output longint     tdd_sum,
  output int         tdd_n
);

  int     vin, vout;
  logic   in_data, prev_data, s_all_data, s_all_null, ki_q;
  longint cyc, t_prev;

  function automatic int opx(input int v);
    return (NVEC - 1 - v) & 15;
  endfunction
  function automatic int opy(input int v);
    return ((NVEC - 1 - v) >> 4) & 15;
  endfunction

  always_comb begin
    s_all_data = 1'b1;
    s_all_null = 1'b1;
    for (int b = 0; b < 8; b++) begin
      s_all_data &= dr_is_data(s[b]);
      s_all_null &= dr_is_null(s[b]);
    end
    ki = s_all_data ? RFN : (s_all_null ? RFD : ki_q);
  end

  assign done = (vout == NVEC);

  always_ff @(posedge clk) begin
    if (rst) begin
      x <= '0; y <= '0; in_data <= 1'b0; vin <= 0; vout <= 0; ki_q <= RFD;
      prev_data <= 1'b0; cyc <= 0; t_prev <= 0; errors <= 0;
      tdd_min <= 1 << 30; tdd_max <= 0; tdd_sum <= 0; tdd_n <= 0;
    end else begin
      cyc       <= cyc + 1;
      ki_q      <= ki;
      prev_data <= s_all_data;
      if (!in_data && ko == RFD && vin < NVEC) begin
        for (int b = 0; b < 4; b++) begin
          x[b] <= dr_enc(opx(vin)[b]);
          y[b] <= dr_enc(opy(vin)[b]);
        end
        in_data <= 1'b1;
      end else if (in_data && ko == RFN) begin
        x <= '0; y <= '0; in_data <= 1'b0; vin <= vin + 1;
      end
      if (s_all_data && !prev_data && vout < NVEC) begin
        automatic logic [7:0] got = '0;
        for (int b = 0; b < 8; b++) got[b] = s[b].rail1;
        if (got != 8'(opx(vout) * opy(vout))) errors <= errors + 1;
        if (vout > 8) begin
          tdd_sum <= tdd_sum + (cyc - t_prev);
          tdd_n   <= tdd_n + 1;
          if (int'(cyc - t_prev) < tdd_min) tdd_min <= int'(cyc - t_prev);
          if (int'(cyc - t_prev) > tdd_max) tdd_max <= int'(cyc - t_prev);
        end
        t_prev <= cyc;
        vout   <= vout + 1;
      end
    end
  end

endmodule
