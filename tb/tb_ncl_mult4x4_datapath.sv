// tb_ncl_mult4x4_datapath: checks the multiplier datapath without handshake
// logic.
//
// With every register request held at RFD the datapath is a chain of
// transparent C-element registers and logic, so a DATA wavefront flows
// straight to s. For all 256 operand pairs the bench applies DATA, waits for
// s to be all DATA, compares it with x*y and checks the flow-through latency
// against the forward path (8 register levels + 1 + 6 x 2 logic levels = 21
// gate delays at most; some values complete sooner). It then applies NULL
// with every request at RFN and checks that s returns to NULL. Every 16th
// pair, register 4's request is held at RFN first, and the DATA must stop
// there: s stays NULL while the inputs of register 4 are all DATA.
module tb_ncl_mult4x4_datapath;
  import ncl_pkg::*;

  localparam int LAT_MAX = 8 + 1 + 6 * 2;

  logic clk = 1'b0;
  logic rst;
  dr_t  [3:0] x, y;
  logic [MUL_NREG-1:0] kreg;
  dr_t  [MUL_BITS-1:0] reg_d, reg_q;
  dr_t  [7:0] s;
  int checks = 0, failures = 0, n_blocked = 0;

  always #5 clk = ~clk;

  ncl_mult4x4_datapath dut (.clk, .rst, .x, .y, .kreg, .reg_d, .reg_q, .s);

  function automatic logic all_data(input dr_t [7:0] v);
    for (int b = 0; b < 8; b++) if (!dr_is_data(v[b])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic stage_data(input int k);
    for (int b = 0; b < int'(MUL_REG_W[k]); b++)
      if (!dr_is_data(reg_d[mul_reg_off(k) + b])) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    rst = 1'b1;
    x = '0; y = '0;
    kreg = '1;
    repeat (8) @(posedge clk);
    rst = 1'b0;
    for (int v = 0; v < 256; v++) begin
      int lat;
      logic [7:0] got;
      if (v % 16 == 5) kreg[3] = RFN;
      for (int b = 0; b < 4; b++) begin
        x[b] = dr_enc(v[b]);
        y[b] = dr_enc(v[4+b]);
      end
      if (v % 16 == 5) begin
        repeat (30) @(posedge clk);
        #1;
        checks++;
        if (!(s == '0 && stage_data(3))) begin
          failures++;
          $display("FAIL: DATA not held at register 4");
        end else n_blocked++;
        kreg[3] = RFD;
      end
      lat = 0;
      do begin
        @(posedge clk);
        #1;
        lat++;
      end while (!all_data(s) && lat < 100);
      for (int b = 0; b < 8; b++) got[b] = s[b].rail1;
      checks++;
      if (got !== 8'(v[3:0] * v[7:4])) begin
        failures++;
        $display("FAIL: %0d*%0d gave %0d", v[3:0], v[7:4], got);
      end
      checks++;
      if (v % 16 != 5 && lat > LAT_MAX) begin
        failures++;
        $display("FAIL: %0d*%0d took %0d gate delays", v[3:0], v[7:4], lat);
      end
      x = '0; y = '0;
      kreg = '0;
      repeat (LAT_MAX) @(posedge clk);
      #1;
      checks++;
      if (s !== '0) begin failures++; $display("FAIL: NULL did not flow through"); end
      kreg = '1;
    end
    checks++;
    if (n_blocked == 0) begin failures++; $display("FAIL: blocking never tested"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
