// tb_ncl_and_i: exhaustive check of the incomplete dual-rail AND.
//
// For each operand pair: with only one operand DATA, z must be DATA0 one gate
// delay later if that operand is 0 (the result is already known) and stay
// NULL if it is 1. With both DATA, z = a&b one gate delay later. With both
// NULL, z returns to NULL one gate delay later.
module tb_ncl_and_i;
  import ncl_pkg::*;

  logic clk = 1'b0;
  dr_t a, b, z;
  int checks = 0, failures = 0, n_early = 0;

  always #5 clk = ~clk;

  ncl_and_i dut (.clk, .a, .b, .z);

  task automatic tick(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic expect_z(input dr_t e, input string what);
    checks++;
    if (z !== e) begin
      failures++;
      $display("FAIL %s: a %b b %b z %b expected %b", what, a, b, z, e);
    end
  endtask

  initial begin
    a = DR_NULL; b = DR_NULL;
    tick(3);
    for (int rep = 0; rep < 4; rep++)
      for (int v = 0; v < 4; v++) begin
        logic first;
        first = (rep % 2 == 0) ? v[0] : v[1];
        if (rep % 2 == 0) a = dr_enc(v[0]); else b = dr_enc(v[1]);
        tick(1);
        if (!first) begin
          expect_z(DR_DATA0, "early DATA0 from a single 0 operand");
          n_early++;
        end else begin
          tick(5);
          expect_z(DR_NULL, "single 1 operand must wait");
        end
        a = dr_enc(v[0]);
        b = dr_enc(v[1]);
        tick(1);
        expect_z(dr_enc(v[0] & v[1]), "one gate delay after complete input");
        a = DR_NULL;
        b = DR_NULL;
        tick(1);
        expect_z(DR_NULL, "one gate delay after NULL");
      end
    checks++;
    if (n_early == 0) begin failures++; $display("FAIL: no early result"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
