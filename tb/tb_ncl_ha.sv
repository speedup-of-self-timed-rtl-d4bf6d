// tb_ncl_ha: exhaustive check of the dual-rail half adder.
//
// For each operand pair: one operand alone for six gate delays must leave the
// sum NULL; with both DATA, carry and sum must be DATA with the right values
// no later than two gate delays; withdrawing one operand must leave the sum
// DATA; with both NULL, everything is NULL two gate delays later. The sum is
// also checked to need the full two levels when the operands differ.
module tb_ncl_ha;
  import ncl_pkg::*;

  logic clk = 1'b0;
  dr_t a, b, s, c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ncl_ha dut (.clk, .a, .b, .s, .c);

  task automatic tick(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic expect_sc(input dr_t es, input dr_t ec, input string what);
    checks++;
    if (s !== es || c !== ec) begin
      failures++;
      $display("FAIL %s: a %b b %b -> s %b c %b, expected s %b c %b",
               what, a, b, s, c, es, ec);
    end
  endtask

  initial begin
    a = DR_NULL; b = DR_NULL;
    tick(3);
    for (int rep = 0; rep < 4; rep++)
      for (int v = 0; v < 4; v++) begin
        if (rep % 2 == 0) a = dr_enc(v[0]); else b = dr_enc(v[1]);
        tick(6);
        checks++;
        if (s !== DR_NULL) begin failures++; $display("FAIL: sum from one operand"); end
        if (rep >= 2) begin
          a = dr_enc(v[0]);
          b = dr_enc(v[1]);
          tick(1);
        end else begin
          // Start from a fully NULL state for the timing check.
          a = DR_NULL; b = DR_NULL;
          tick(3);
          a = dr_enc(v[0]); b = dr_enc(v[1]);
          tick(1);
          if (v[0] != v[1]) begin
            checks++;
            if (s !== DR_NULL) begin failures++; $display("FAIL: sum after one level"); end
          end
        end
        tick(1);
        expect_sc(dr_enc(v[0] ^ v[1]), dr_enc(v[0] & v[1]), "two gate delays");
        if (rep % 2 == 0) a = DR_NULL; else b = DR_NULL;
        tick(6);
        checks++;
        if (s !== dr_enc(v[0] ^ v[1])) begin failures++; $display("FAIL: sum released early"); end
        a = DR_NULL;
        b = DR_NULL;
        tick(2);
        expect_sc(DR_NULL, DR_NULL, "two gate delays after NULL");
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
