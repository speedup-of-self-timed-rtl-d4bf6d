// tb_ncl_th24comp: checks the TH24comp gate against an independent reference.
//
// Random inputs for 1000 gate delays; after each edge the output must equal
// a reference that sets on (A+B)(C+D), releases when all inputs are 0 and
// holds otherwise. The two set cases that matter for completion detection
// (both dual-rail bits DATA) and the hold case (one bit NULL) are counted.
module tb_ncl_th24comp;

  logic clk = 1'b0;
  logic a, b, c, d, z, r;
  int checks = 0, failures = 0, n_set = 0, n_hold = 0;

  always #5 clk = ~clk;

  ncl_th24comp dut (.clk, .a, .b, .c, .d, .z);

  initial begin
    {a, b, c, d} = '0;
    repeat (3) @(posedge clk);
    #1;
    r = 1'b0;
    checks++;
    if (z !== 1'b0) begin failures++; $display("FAIL: not 0 after NULL inputs"); end
    for (int t = 0; t < 1000; t++) begin
      {a, b, c, d} = ($urandom_range(0, 3) == 0) ? 4'b0 : 4'($urandom);
      @(posedge clk);
      if ((a || b) && (c || d)) begin r = 1'b1; n_set++; end
      else if (!(a || b || c || d)) r = 1'b0;
      else n_hold++;
      #1;
      checks++;
      if (z !== r) begin
        failures++;
        $display("FAIL: in %b%b%b%b got %b expected %b", a, b, c, d, z, r);
      end
    end
    checks++;
    if (n_set == 0 || n_hold == 0) begin failures++; $display("FAIL: weak stimulus"); end
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
