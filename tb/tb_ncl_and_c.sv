// tb_ncl_and_c: exhaustive check of the complete dual-rail AND.
//
// For each of the four operand pairs: one operand DATA and the other NULL for
// six gate delays must leave z NULL (input-completeness); with both DATA, z
// must be DATA and equal a&b one gate delay later; withdrawing one operand
// must leave z DATA (hysteresis); with both NULL z must be NULL one gate
// delay later.
module tb_ncl_and_c;
  import ncl_pkg::*;

  logic clk = 1'b0;
  dr_t a, b, z;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ncl_and_c dut (.clk, .a, .b, .z);

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
        // a first, b late; then b first, a late on the next repetition.
        if (rep % 2 == 0) a = dr_enc(v[0]); else b = dr_enc(v[1]);
        tick(6);
        expect_z(DR_NULL, "one operand only");
        a = dr_enc(v[0]);
        b = dr_enc(v[1]);
        tick(1);
        expect_z(dr_enc(v[0] & v[1]), "one gate delay after complete input");
        if (rep % 2 == 0) a = DR_NULL; else b = DR_NULL;
        tick(6);
        expect_z(dr_enc(v[0] & v[1]), "hold while one operand is still DATA");
        a = DR_NULL;
        b = DR_NULL;
        tick(1);
        expect_z(DR_NULL, "one gate delay after NULL");
      end
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
