// tb_ncl_register: checks the dual-rail registration stage.
//
// A 5-bit register is driven with random dual-rail inputs that obey the NCL
// protocol (DATA and NULL alternate, and new DATA waits until the register
// has released the old) and a random request line ki. Every rail must behave
// as a C-element of its input rail and ki, one gate delay late: it passes
// DATA under RFD, NULL under RFN, and holds otherwise. Reset must give NULL.
// The count of holds (input changed but the request blocked it) is checked to
// be non-zero. A second instance resets to a DATA word (RESET_DATA = 1): it
// must come out of reset holding that word, keep it while the request is RFD
// and the input NULL, and release it to NULL one gate delay after RFN.
// The top-level bench keeps the register's assertion enabled.
module tb_ncl_register;
  import ncl_pkg::*;

  localparam int N = 5;

  logic clk = 1'b0;
  logic rst;
  dr_t [N-1:0] d, q, r;
  logic ki;
  localparam logic [N-1:0] RV = 5'b10110;
  dr_t [N-1:0] d2, q2, rv_word;
  logic ki2;
  int checks = 0, failures = 0, n_block = 0;

  always #5 clk = ~clk;

  ncl_register #(.N(N)) dut (.clk, .rst, .d, .ki, .q);
  ncl_register #(.N(N), .RESET_DATA(1'b1), .RESET_VALUE(RV)) dut_d (
    .clk, .rst, .d(d2), .ki(ki2), .q(q2));

  function automatic logic c_elem(input logic cur, input logic x, input logic k);
    if (x && k)   return 1'b1;
    if (!x && !k) return 1'b0;
    return cur;
  endfunction

  initial begin
    // The register's own illegal-state assertion would stop the run at the
    // first error; this bench counts errors itself, so it turns it off.
    $assertoff(0, dut);
    rst = 1'b1;
    ki = RFD;
    d = '{default: DR_DATA1};
    d2 = '0;
    ki2 = RFD;
    for (int i = 0; i < N; i++) rv_word[i] = dr_enc(RV[i]);
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL: reset does not give NULL"); end
    checks++;
    if (q2 !== rv_word) begin
      failures++;
      $display("FAIL: DATA reset gives %b expected %b", q2, rv_word);
    end
    d = '0;
    rst = 1'b0;
    repeat (4) @(posedge clk);
    #1;
    checks++;
    if (q2 !== rv_word) begin failures++; $display("FAIL: DATA reset word not held"); end
    ki2 = RFN;
    @(posedge clk);
    #1;
    checks++;
    if (q2 !== '0) begin failures++; $display("FAIL: DATA reset word not released"); end
    r = '0;
    for (int t = 0; t < 1500; t++) begin
      // Legal NCL stimulus: a bit goes DATA -> NULL at random, and NULL ->
      // DATA only once the register has released the previous DATA.
      for (int i = 0; i < N; i++)
        if ($urandom_range(0, 2) == 0) begin
          if (d[i] != DR_NULL) d[i] = DR_NULL;
          else if (r[i] == DR_NULL) d[i] = dr_enc(1'($urandom));
        end
      ki = 1'($urandom);
      @(posedge clk);
      for (int i = 0; i < N; i++) begin
        r[i].rail0 = c_elem(r[i].rail0, d[i].rail0, ki);
        r[i].rail1 = c_elem(r[i].rail1, d[i].rail1, ki);
        if (d[i] != r[i]) n_block++;
      end
      #1;
      checks++;
      if (q !== r) begin
        failures++;
        $display("FAIL t=%0d: q %b expected %b (d %b ki %b)", t, q, r, d, ki);
      end
    end
    checks++;
    if (n_block == 0) begin failures++; $display("FAIL: never blocked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
