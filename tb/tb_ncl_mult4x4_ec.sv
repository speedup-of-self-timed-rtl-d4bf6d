// tb_ncl_mult4x4_ec: end-to-end test of the Early Completion 4x4 NCL multiplier.
//
// The input environment presents a DATA wavefront while ko is RFD and a NULL
// wavefront while ko is RFN, reacting one gate delay after ko changes. The
// output environment is infinitely fast: ki drops to RFN in the same instant
// the product is all DATA and rises to RFD when it is all NULL. All 256
// operand pairs are applied in sequence and every product is compared with
// x*y. The test also measures latency (operands presented to product
// complete) and the DATA-to-DATA cycle time TDD in gate delays, checks TDD
// against the analytical value for this structure, and counts how often the
// Early Completion mechanisms occur:
//   early RFN - a component requests NULL before its register's output is
//               all DATA,
//   early RFD - a component requests DATA before its register's output is
//               all NULL,
//   held      - a component's inputs are complete but it waits for the next
//               stage's request.
module tb_ncl_mult4x4_ec;
  import ncl_pkg::*;

  localparam int NVEC     = 256;
  localparam int WATCHDOG = 40000;
  // Steady-state DATA-to-DATA cycle in gate delays: two passes of register
  // (1) + two-level adder stage (2) + Early Completion component (3).
  localparam int TDD_EXPECT = 2 * (1 + 2 + 3);
  // Forward path: 8 register levels plus 1 + 6*2 combinational levels.
  localparam int LAT_MAX    = 8 + 1 + 6 * 2;
  // Delay of a standard completion detector on a register's outputs:
  // inverting TH12 per bit plus a two-level TH44 tree (8..16 bits).
  localparam int STD_DEPTH  = 3;

  logic        clk = 1'b0;
  logic        rst;
  dr_t  [3:0]  x, y;
  logic        ko;
  dr_t  [7:0]  s;
  logic        ki;

  int checks = 0, failures = 0;

  ncl_mult4x4_ec dut (.clk, .rst, .x, .y, .ko, .s, .ki);

  always #5 clk = ~clk;

  // ------------------------------------------------------------ environment
  int   vin;          // index of the operand pair being presented
  logic in_data;      // environment currently presents DATA
  longint cyc = 0;
  longint t_in [NVEC];

  always_ff @(posedge clk) cyc <= cyc + 1;

  always_ff @(posedge clk) begin
    if (rst) begin
      x <= '0; y <= '0; in_data <= 1'b0; vin <= 0;
    end else if (!in_data && ko == RFD && vin < NVEC) begin
      for (int b = 0; b < 4; b++) begin
        x[b] <= dr_enc(vin_x(vin)[b]);
        y[b] <= dr_enc(vin_y(vin)[b]);
      end
      in_data   <= 1'b1;
      t_in[vin] <= cyc;
    end else if (in_data && ko == RFN) begin
      x <= '0; y <= '0; in_data <= 1'b0; vin <= vin + 1;
    end
  end

  logic s_all_data, s_all_null, ki_q;
  always_comb begin
    s_all_data = 1'b1;
    s_all_null = 1'b1;
    for (int b = 0; b < 8; b++) begin
      s_all_data &= dr_is_data(s[b]);
      s_all_null &= dr_is_null(s[b]);
    end
    ki = s_all_data ? RFN : (s_all_null ? RFD : ki_q);
  end
  always_ff @(posedge clk) ki_q <= rst ? RFD : ki;

  // ----------------------------------------------------------------- checker
  int     vout = 0;
  logic   prev_data = 1'b0;
  longint t_prev = 0;
  int     tdd_min = 1 << 30, tdd_max = 0, lat_min = 1 << 30, lat_max = 0;
  longint tdd_sum = 0;
  int     tdd_n = 0;
  int     tdd_ss_min = 1 << 30, tdd_ss_max = 0;

  always_ff @(posedge clk) if (!rst) begin
    prev_data <= s_all_data;
    if (s_all_data && !prev_data) begin
      automatic logic [7:0] got = '0;
      automatic logic [7:0] exp = 8'(vin_x(vout) * vin_y(vout));
      for (int b = 0; b < 8; b++) got[b] = s[b].rail1;
      checks++;
      if (got !== exp) begin
        failures++;
        $display("MISMATCH vec %0d: %0d*%0d got %0d expected %0d",
                 vout, vin_x(vout), vin_y(vout), got, exp);
      end
      if (vout == 0) lat_first = int'(cyc - t_in[vout]);
      if (int'(cyc - t_in[vout]) < lat_min) lat_min = int'(cyc - t_in[vout]);
      if (int'(cyc - t_in[vout]) > lat_max) lat_max = int'(cyc - t_in[vout]);
      if (vout > 0) begin
        if (int'(cyc - t_prev) < tdd_min) tdd_min = int'(cyc - t_prev);
        if (int'(cyc - t_prev) > tdd_max) tdd_max = int'(cyc - t_prev);
        if (vout > 8) begin
          tdd_sum += cyc - t_prev;
          tdd_n++;
          if (int'(cyc - t_prev) < tdd_ss_min) tdd_ss_min = int'(cyc - t_prev);
          if (int'(cyc - t_prev) > tdd_ss_max) tdd_ss_max = int'(cyc - t_prev);
        end
      end
      t_prev <= cyc;
      vout   <= vout + 1;
    end
  end

  // Operand pairs are applied from 15*15 down to 0*0.
  function automatic int vin_x(input int v);
    return (NVEC - 1 - v) & 15;
  endfunction
  function automatic int vin_y(input int v);
    return ((NVEC - 1 - v) >> 4) & 15;
  endfunction

  // ------------------------------------------------- mechanism observation
  // qdata[k]/qnull[k]: output of register k+1 all DATA / all NULL.
  // ddata[k]/dnull[k]: input of register k+1 all DATA / all NULL.
  logic [7:0] qdata, qnull, ddata, dnull;
  logic [8:0] kprev;

  always_comb begin
    for (int k = 0; k < MUL_NREG; k++) begin
      qdata[k] = 1'b1; qnull[k] = 1'b1; ddata[k] = 1'b1; dnull[k] = 1'b1;
      for (int b = 0; b < int'(MUL_REG_W[k]); b++) begin
        qdata[k] &= dr_is_data(dut.reg_q[mul_reg_off(k) + b]);
        qnull[k] &= dr_is_null(dut.reg_q[mul_reg_off(k) + b]);
        ddata[k] &= dr_is_data(dut.reg_d[mul_reg_off(k) + b]);
        dnull[k] &= dr_is_null(dut.reg_d[mul_reg_off(k) + b]);
      end
    end
  end

  int n_early_rfn = 0, n_early_rfd = 0, n_held = 0;
  int n_illegal = 0;
  int lat_first = -1;

  // kreq[k] is the request of the component watching register k+1 (qdata[k]).
  // A request change counts as early when it comes sooner after that
  // register's output completed than a detector on the outputs could respond.
  logic [7:0] qdata_p, qnull_p;
  longint     t_qd [8], t_qn [8];

  always_ff @(posedge clk) begin
    kprev   <= dut.kreq;
    qdata_p <= qdata;
    qnull_p <= qnull;
    for (int k = 0; k < 8; k++) begin
      if (qdata[k] && !qdata_p[k]) t_qd[k] <= cyc;
      if (qnull[k] && !qnull_p[k]) t_qn[k] <= cyc;
    end
    if (!rst) begin
      for (int k = 0; k < 8; k++) begin
        if (kprev[k] == RFD && dut.kreq[k] == RFN &&
            (!qdata[k] || cyc - t_qd[k] < STD_DEPTH)) n_early_rfn++;
        if (kprev[k] == RFN && dut.kreq[k] == RFD &&
            (!qnull[k] || cyc - t_qn[k] < STD_DEPTH)) n_early_rfd++;
        // Inputs complete, request unchanged because the next stage is not ready.
        if (k < 7 && ddata[k] && dut.kreq[k] == RFD && dut.kreq[k+1] == RFN) n_held++;
        if (k < 7 && dnull[k] && dut.kreq[k] == RFN && dut.kreq[k+1] == RFD) n_held++;
      end
      for (int b = 0; b < 8; b++)
        if (s[b].rail0 && s[b].rail1) n_illegal++;
    end
  end

  // --------------------------------------------------------------- sequence
  initial begin
    rst = 1'b1;
    repeat (20) @(posedge clk);
    rst <= 1'b0;
    // After reset every request must be RFD (constant-time initialisation).
    @(posedge clk);
    checks++;
    if (dut.kreq[7:0] !== 8'hFF) begin
      failures++;
      $display("FAIL: requests after reset %b, expected all RFD", dut.kreq[7:0]);
    end
    wait (vout == NVEC);
    repeat (40) @(posedge clk);

    $display("latency %0d..%0d gate delays, TDD %0d..%0d, mean %0.2f gate delays",
             lat_min, lat_max, tdd_min, tdd_max, real'(tdd_sum) / real'(tdd_n));
    $display("early RFN %0d, early RFD %0d, held %0d", n_early_rfn, n_early_rfd, n_held);
    checks++;
    if (tdd_ss_min != TDD_EXPECT || tdd_ss_max != TDD_EXPECT) begin
      failures++;
      $display("FAIL: steady-state TDD %0d..%0d, expected %0d",
               tdd_ss_min, tdd_ss_max, TDD_EXPECT);
    end
    // The first pair (15*15) entered the empty pipeline: forward path only.
    $display("latency of 15*15 into the empty pipeline: %0d gate delays", lat_first);
    checks++;
    if (lat_first > LAT_MAX || lat_first < LAT_MAX - 6) begin
      failures++;
      $display("FAIL: latency %0d, expected at most %0d", lat_first, LAT_MAX);
    end
    checks++; if (n_early_rfn == 0) begin failures++; $display("FAIL: no early RFN"); end
    checks++; if (n_early_rfd == 0) begin failures++; $display("FAIL: no early RFD"); end
    checks++; if (n_held == 0)      begin failures++; $display("FAIL: never held"); end
    checks++; if (n_illegal != 0)   begin failures++; $display("FAIL: illegal output state"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired after %0d products", vout);
    $display("kreq %b qdata %b qnull %b ddata %b dnull %b vin %0d in_data %b", dut.kreq, qdata, qnull, ddata, dnull, vin, in_data);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
