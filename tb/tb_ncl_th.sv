// tb_ncl_th: checks the threshold gate against an independent reference.
//
// Three instances are driven with random input vectors for 2000 gate delays:
// a TH23, a weighted TH34w2 (weight 2 on input 0) and an inverting,
// resettable TH22 that resets to 1. After every clock edge each output is
// compared with a reference that recomputes the threshold and hysteresis
// rules from the inputs of the previous period (one gate delay).
module tb_ncl_th;

  logic clk = 1'b0;
  logic rst;
  logic [2:0] a23;
  logic [3:0] a34;
  logic [1:0] a22;
  logic z23, z34, z22n;
  logic r23, r34, r22;   // reference gate states (before inversion)
  int checks = 0, failures = 0;
  int n_set = 0, n_hold = 0;

  always #5 clk = ~clk;

  ncl_th #(.N(3), .M(2)) u23 (.clk, .rst, .a(a23), .z(z23));
  ncl_th #(.N(4), .M(3), .WEIGHTS(32'h0000_1112)) u34 (.clk, .rst, .a(a34), .z(z34));
  ncl_th #(.N(2), .M(2), .INVERT(1'b1), .RESETTABLE(1'b1), .RESET_VAL(1'b1)) u22n (
    .clk, .rst, .a(a22), .z(z22n));

  function automatic logic next_state(input logic cur, input int cnt, input int thr,
                                      input logic all_zero);
    if (cnt >= thr) return 1'b1;
    if (all_zero)   return 1'b0;
    return cur;
  endfunction

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    rst = 1'b1; a23 = '0; a34 = '0; a22 = '0;
    repeat (3) @(posedge clk);
    #1;
    check(z22n, 1'b1, "TH22n reset value");
    check(z23, 1'b0, "TH23 settles to 0 on NULL inputs");
    r23 = 1'b0; r34 = 1'b0; r22 = 1'b0;
    rst = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      // Random inputs, biased towards all-zero so that gates release often.
      a23 = ($urandom_range(0, 3) == 0) ? '0 : 3'($urandom);
      a34 = ($urandom_range(0, 3) == 0) ? '0 : 4'($urandom);
      a22 = ($urandom_range(0, 3) == 0) ? '0 : 2'($urandom);
      @(posedge clk);
      r23 = next_state(r23, a23[0] + a23[1] + a23[2], 2, a23 == 0);
      r34 = next_state(r34, 2*a34[0] + a34[1] + a34[2] + a34[3], 3, a34 == 0);
      r22 = next_state(r22, a22[0] + a22[1], 2, a22 == 0);
      if (a34 != 0 && 2*a34[0] + a34[1] + a34[2] + a34[3] < 3) n_hold++;
      if (2*a34[0] + a34[1] + a34[2] + a34[3] >= 3) n_set++;
      #1;
      check(z23, r23, "TH23");
      check(z34, r34, "TH34w2");
      check(z22n, !r22, "TH22n");
    end
    checks++;
    if (n_set == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL: stimulus did not exercise set and hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
