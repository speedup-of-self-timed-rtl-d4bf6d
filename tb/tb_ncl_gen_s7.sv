// tb_ncl_gen_s7: exhaustive check of the S7 generator.
//
// S7 = c xor maj(x, y, z). All 16 input combinations are applied, including
// the ones the multiplier never produces (c = 1 with maj = 1). For each:
// with c held NULL for six gate delays s must stay NULL; with one of x, y, z
// held NULL s may only show the correct value (the majority can be decided
// by two inputs); all four
// DATA gives the right s two gate delays later; all NULL gives NULL two gate
// delays later.
module tb_ncl_gen_s7;
  import ncl_pkg::*;

  logic clk = 1'b0;
  dr_t c, x, y, z, s;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ncl_gen_s7 dut (.clk, .c, .x, .y, .z, .s);

  task automatic tick(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    c = DR_NULL; x = DR_NULL; y = DR_NULL; z = DR_NULL;
    tick(3);
    for (int v = 0; v < 16; v++) begin
      logic maj, e;
      maj = (v[1] & v[2]) | (v[1] & v[3]) | (v[2] & v[3]);
      e = v[0] ^ maj;
      for (int miss = 0; miss < 4; miss++) begin
        c = dr_enc(v[0]); x = dr_enc(v[1]); y = dr_enc(v[2]); z = dr_enc(v[3]);
        case (miss)
          0: c = DR_NULL;
          1: x = DR_NULL;
          2: y = DR_NULL;
          default: z = DR_NULL;
        endcase
        tick(6);
        checks++;
        // c is always observed; x, y, z are observed by the full adder that
        // shares them, so s may appear early but only with the right value.
        if (miss == 0 ? (s !== DR_NULL) : (s !== DR_NULL && s !== dr_enc(e))) begin
          failures++;
          $display("FAIL: v %0d input %0d missing, s %b", v, miss, s);
        end
        c = dr_enc(v[0]); x = dr_enc(v[1]); y = dr_enc(v[2]); z = dr_enc(v[3]);
        tick(2);
        checks++;
        if (s !== dr_enc(e)) begin failures++; $display("FAIL: v %0d s %b expected %b", v, s, e); end
        c = DR_NULL; x = DR_NULL; y = DR_NULL; z = DR_NULL;
        tick(2);
        checks++;
        if (s !== DR_NULL) begin failures++; $display("FAIL: v %0d not NULL", v); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
