// tb_ncl_fa: exhaustive check of the dual-rail full adder.
//
// For each of the eight input combinations: two inputs DATA and the third
// NULL for six gate delays must leave the sum NULL; with all three DATA, sum
// and carry must be right two gate delays later; withdrawing one input must
// leave the sum DATA; all NULL gives NULL two gate delays later.
module tb_ncl_fa;
  import ncl_pkg::*;

  logic clk = 1'b0;
  dr_t a, b, ci, s, co;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ncl_fa dut (.clk, .a, .b, .ci, .s, .co);

  task automatic tick(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    a = DR_NULL; b = DR_NULL; ci = DR_NULL;
    tick(3);
    for (int rep = 0; rep < 3; rep++)
      for (int v = 0; v < 8; v++) begin
        logic [1:0] sum;
        sum = v[0] + v[1] + v[2];
        a = dr_enc(v[0]); b = dr_enc(v[1]); ci = dr_enc(v[2]);
        case (rep)
          0: a = DR_NULL;
          1: b = DR_NULL;
          default: ci = DR_NULL;
        endcase
        tick(6);
        checks++;
        if (s !== DR_NULL) begin failures++; $display("FAIL: sum with input %0d missing", rep); end
        a = dr_enc(v[0]); b = dr_enc(v[1]); ci = dr_enc(v[2]);
        tick(2);
        checks++;
        if (s !== dr_enc(sum[0]) || co !== dr_enc(sum[1])) begin
          failures++;
          $display("FAIL: %0d+%0d+%0d gave s %b co %b", v[0], v[1], v[2], s, co);
        end
        case (rep)
          0: a = DR_NULL;
          1: b = DR_NULL;
          default: ci = DR_NULL;
        endcase
        tick(6);
        checks++;
        if (s !== dr_enc(sum[0])) begin failures++; $display("FAIL: sum released early"); end
        a = DR_NULL; b = DR_NULL; ci = DR_NULL;
        tick(2);
        checks++;
        if (s !== DR_NULL || co !== DR_NULL) begin failures++; $display("FAIL: not NULL"); end
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
