// tb_ncl_c_tree: checks the C-element completion tree.
//
// Two trees over 11 leaves: a full tree (MAX_OUT = 1, two levels: 11 -> 3 ->
// 1) and one stopped at three outputs (one level: groups {0-3}, {4-7},
// {8-10}). Each is driven through random sequences that set leaves one at a
// time up to all-ones and clear them one at a time down to all-zeros. The
// full tree's output must rise exactly two gate delays after the last leaf
// rises and fall exactly two after the last leaf falls, and never change in
// between; each output of the short tree must follow the C-element of its own
// group one gate delay late.
module tb_ncl_c_tree;
  import ncl_pkg::*;

  localparam int N = 11;

  logic clk = 1'b0;
  logic [N-1:0] leaves;
  logic         full;
  logic [2:0]   part;
  logic [2:0]   pref;
  logic         fref;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ncl_c_tree #(.N(N), .MAX_OUT(1)) u_full (.clk, .ki(leaves), .ko(full));
  ncl_c_tree #(.N(N), .MAX_OUT(3)) u_part (.clk, .ki(leaves), .ko(part));

  // Group g of the short tree covers leaves 4g .. min(4g+3, N-1).
  function automatic logic [2:0] groups_next(input logic [2:0] cur, input logic [N-1:0] l);
    logic [2:0] n;
    n = cur;
    if (&l[3:0])  n[0] = 1'b1; else if (l[3:0] == 0)  n[0] = 1'b0;
    if (&l[7:4])  n[1] = 1'b1; else if (l[7:4] == 0)  n[1] = 1'b0;
    if (&l[10:8]) n[2] = 1'b1; else if (l[10:8] == 0) n[2] = 1'b0;
    return n;
  endfunction

  task automatic step();
    @(posedge clk);
    pref = groups_next(pref, leaves);
    #1;
    checks++;
    if (part !== pref) begin
      failures++;
      $display("FAIL short tree: leaves %b got %b expected %b", leaves, part, pref);
    end
  endtask

  initial begin
    int order [N];
    leaves = '0;
    repeat (4) @(posedge clk);
    #1;
    pref = 3'b000;
    fref = 1'b0;
    for (int round = 0; round < 40; round++) begin
      for (int i = 0; i < N; i++) order[i] = i;
      order.shuffle();
      for (int i = 0; i < N; i++) begin
        leaves[order[i]] = 1'b1;
        step();
        if (i < N - 1) begin
          checks++;
          if (full !== 1'b0) begin failures++; $display("FAIL: rose before all leaves"); end
        end
      end
      // Last leaf was applied before the previous edge: one more level.
      checks++;
      if (full !== 1'b0) begin failures++; $display("FAIL: rose after one level"); end
      step();
      checks++;
      if (full !== 1'b1) begin failures++; $display("FAIL: not high two levels after"); end
      order.shuffle();
      for (int i = 0; i < N; i++) begin
        leaves[order[i]] = 1'b0;
        step();
        if (i < N - 1) begin
          checks++;
          if (full !== 1'b1) begin failures++; $display("FAIL: fell before all leaves"); end
        end
      end
      checks++;
      if (full !== 1'b1) begin failures++; $display("FAIL: fell after one level"); end
      step();
      checks++;
      if (full !== 1'b0) begin failures++; $display("FAIL: not low two levels after"); end
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
