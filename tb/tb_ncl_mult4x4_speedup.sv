// tb_ncl_mult4x4_speedup: throughput of Early Completion against standard
// completion on the same 4x4 multiplier datapath.
//
// Both pipelines multiply all 256 operand pairs, each driven by its own
// environment (ncl_mult_env) with the same infinitely fast output side. The
// bench checks that both produce every product correctly, measures the
// steady-state DATA-to-DATA cycle TDD of each in gate delays, and checks them
// against the unit-delay analysis:
//   standard:  2 x (1 register + 2 logic + 1 register + 3 detection) = 14
//   early:     2 x (1 register + 2 logic + 3 detection)              = 12
// (early completion overlaps the detection with the latching of the
// register). It prints the resulting speedup.
// A third pipeline uses the basic component form with a separate final TH22
// (MERGE_ROOT = 0), which is four gates deep for the wider registers. Its
// cycle depends on the data, so the bench checks only that its products are
// correct and that its mean TDD lies strictly between the other two.
module tb_ncl_mult4x4_speedup;
  import ncl_pkg::*;

  localparam int TDD_STD = 14;
  localparam int TDD_EC  = 12;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  dr_t [3:0] x_e, y_e, x_s, y_s, x_b, y_b;
  dr_t [7:0] s_e, s_s, s_b;
  logic ko_e, ki_e, ko_s, ki_s, ko_b, ki_b, done_e, done_s, done_b;
  int err_e, err_s, err_b, min_e, max_e, min_s, max_s, min_b, max_b, n_e, n_s, n_b;
  longint sum_e, sum_s, sum_b;
  int checks = 0, failures = 0;

  ncl_mult4x4_ec  u_ec  (.clk, .rst, .x(x_e), .y(y_e), .ko(ko_e), .s(s_e), .ki(ki_e));
  ncl_mult4x4_std u_std (.clk, .rst, .x(x_s), .y(y_s), .ko(ko_s), .s(s_s), .ki(ki_s));

  ncl_mult4x4_ec #(.MERGE_ROOT(1'b0)) u_basic (
    .clk, .rst, .x(x_b), .y(y_b), .ko(ko_b), .s(s_b), .ki(ki_b));

  ncl_mult_env env_b (.clk, .rst, .ko(ko_b), .s(s_b), .x(x_b), .y(y_b), .ki(ki_b),
                      .done(done_b), .errors(err_b), .tdd_min(min_b), .tdd_max(max_b),
                      .tdd_sum(sum_b), .tdd_n(n_b));
  ncl_mult_env env_e (.clk, .rst, .ko(ko_e), .s(s_e), .x(x_e), .y(y_e), .ki(ki_e),
                      .done(done_e), .errors(err_e), .tdd_min(min_e), .tdd_max(max_e),
                      .tdd_sum(sum_e), .tdd_n(n_e));
  ncl_mult_env env_s (.clk, .rst, .ko(ko_s), .s(s_s), .x(x_s), .y(y_s), .ki(ki_s),
                      .done(done_s), .errors(err_s), .tdd_min(min_s), .tdd_max(max_s),
                      .tdd_sum(sum_s), .tdd_n(n_s));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    real mean_e, mean_s, mean_b;
    rst = 1'b1;
    repeat (20) @(posedge clk);
    rst <= 1'b0;
    wait (done_e && done_s && done_b);
    @(posedge clk);
    mean_e = real'(sum_e) / real'(n_e);
    mean_s = real'(sum_s) / real'(n_s);
    mean_b = real'(sum_b) / real'(n_b);
    $display("standard completion: TDD %0d..%0d, mean %0.2f gate delays", min_s, max_s, mean_s);
    $display("early completion:    TDD %0d..%0d, mean %0.2f gate delays", min_e, max_e, mean_e);
    $display("early, separate TH22: TDD %0d..%0d, mean %0.2f gate delays", min_b, max_b, mean_b);
    $display("speedup %0.3f (separate TH22: %0.3f)", mean_s / mean_e, mean_s / mean_b);
    check(err_e == 0, "early completion products");
    check(err_s == 0, "standard completion products");
    check(min_s == TDD_STD && max_s == TDD_STD, "standard steady-state TDD");
    check(min_e == TDD_EC && max_e == TDD_EC, "early completion steady-state TDD");
    check(mean_s > mean_e, "early completion is faster");
    check(err_b == 0, "early completion (separate TH22) products");
    check(mean_s > mean_b && mean_b > mean_e, "separate TH22 lies between the two");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
