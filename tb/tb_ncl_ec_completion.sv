// tb_ncl_ec_completion: checks the Early Completion component in its three
// forms.
//
//   u_m16 : 16 bits, root merged with ko_next (tree 8 -> 2, inverting TH33)
//   u_s16 : 16 bits, separate inverting TH22 (tree 8 -> 2 -> 1, then TH22)
//   u_o13 : 13 bits (odd, uses the TH12 leaf), merged root
//   u_l8  : 8 bits, final-stage variant (inverted TH44 root, plain TH22)
//   u_r8  : 8 bits, merged root, reset to RFN (for a register reset to DATA)
//
// The stimulus walks the inputs through NULL -> partial DATA -> DATA ->
// partial NULL -> NULL with the next-stage request held either way, and
// checks after each step that ko is what the rules demand:
//   middle stages: RFN iff inputs all DATA and ko_next RFD (else hold),
//                  RFD iff inputs all NULL and ko_next RFN;
//   final stage:   RFD iff inputs all NULL and ki RFD,
//                  RFN iff inputs all DATA and ki RFN.
// It also checks the response times in gate delays: from the last input
// arriving, 3 for the merged and final forms and 4 for the separate TH22;
// from ko_next arriving last, 1 for the middle forms. Reset must give RFD,
// or RFN for u_r8, which must hold RFN until its inputs are NULL and ko_next
// is RFN.
module tb_ncl_ec_completion;
  import ncl_pkg::*;

  logic clk = 1'b0;
  logic rst;
  dr_t [15:0] x;
  logic kn_mid, kn_last;
  logic ko_m16, ko_s16, ko_o13, ko_l8, ko_r8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ncl_ec_completion #(.N(16), .MERGE_ROOT(1'b1)) u_m16 (
    .clk, .rst, .x(x), .ko_next(kn_mid), .ko(ko_m16));
  ncl_ec_completion #(.N(16), .MERGE_ROOT(1'b0)) u_s16 (
    .clk, .rst, .x(x), .ko_next(kn_mid), .ko(ko_s16));
  ncl_ec_completion #(.N(13)) u_o13 (
    .clk, .rst, .x(x[12:0]), .ko_next(kn_mid), .ko(ko_o13));
  ncl_ec_completion #(.N(8), .LAST(1'b1)) u_l8 (
    .clk, .rst, .x(x[7:0]), .ko_next(kn_last), .ko(ko_l8));

  ncl_ec_completion #(.N(8), .RESET_RFN(1'b1)) u_r8 (
    .clk, .rst, .x(x[7:0]), .ko_next(kn_mid), .ko(ko_r8));

  task automatic expect_r8(input logic e, input string what);
    checks++;
    if (ko_r8 !== e) begin
      failures++;
      $display("FAIL %s: ko r8 = %b expected %b", what, ko_r8, e);
    end
  endtask

  task automatic expect4(input logic em16, input logic es16, input logic eo13,
                         input logic el8, input string what);
    checks++;
    if ({ko_m16, ko_s16, ko_o13, ko_l8} !== {em16, es16, eo13, el8}) begin
      failures++;
      $display("FAIL %s: ko m16/s16/o13/l8 = %b%b%b%b expected %b%b%b%b", what,
               ko_m16, ko_s16, ko_o13, ko_l8, em16, es16, eo13, el8);
    end
  endtask

  task automatic tick(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // Random DATA value on every bit, or NULL on every bit.
  task automatic all_data();
    for (int i = 0; i < 16; i++) x[i] = dr_enc(1'($urandom));
  endtask

  initial begin
    rst = 1'b1;
    x = '0;
    kn_mid = RFD;
    kn_last = RFD;
    tick(6);
    expect4(RFD, RFD, RFD, RFD, "reset");
    expect_r8(RFN, "reset to RFN");
    rst = 1'b0;
    tick(6);
    expect4(RFD, RFD, RFD, RFD, "idle after reset");
    expect_r8(RFN, "RFN held after reset while ko_next is RFD");

    for (int round = 0; round < 30; round++) begin
      // ---- DATA arrives with the next stage already requesting DATA.
      kn_mid = RFD;
      kn_last = RFN;       // final stage: ki already RFN, output taken
      all_data();
      x[0] = DR_NULL;      // bit 0 late: shared by all four instances
      tick(8);
      expect4(RFD, RFD, RFD, RFD, "partial DATA must not complete");
      x[0] = dr_enc(1'($urandom));
      tick(2);
      expect4(RFD, RFD, RFD, RFD, "2 gate delays after last DATA bit");
      tick(1);
      expect4(RFN, RFD, RFN, RFN, "3 gate delays after last DATA bit");
      tick(1);
      expect4(RFN, RFN, RFN, RFN, "4 gate delays after last DATA bit");

      // ---- NULL arrives while the next stage still requests NULL... held.
      kn_mid = RFD;
      kn_last = RFN;
      x = '0;
      tick(8);
      expect4(RFN, RFN, RFN, RFN, "NULL held while ko_next is RFD / ki RFN");
      expect_r8(RFN, "NULL held while ko_next is RFD");
      // Next stage turns around: middle forms answer in one gate delay.
      kn_mid = RFN;
      kn_last = RFD;
      tick(1);
      expect4(RFD, RFD, RFD, RFD, "one gate delay after ko_next");
      expect_r8(RFD, "one gate delay after ko_next");

      // ---- DATA arrives first, the next stage's request comes later.
      all_data();
      tick(8);
      expect4(RFD, RFD, RFD, RFD, "DATA held while ko_next is RFN / ki RFD");
      kn_mid = RFD;
      kn_last = RFN;
      tick(1);
      expect4(RFN, RFN, RFN, RFN, "one gate delay after ko_next (DATA)");

      // ---- Partial NULL must not release; then full NULL with kn ready.
      kn_mid = RFN;
      kn_last = RFD;
      x[15:1] = '0;
      tick(8);
      expect4(RFN, RFN, RFN, RFN, "partial NULL must not release");
      x[0] = DR_NULL;
      tick(2);
      expect4(RFN, RFN, RFN, RFN, "2 gate delays after last NULL bit");
      tick(1);
      expect4(RFD, RFN, RFD, RFD, "3 gate delays after last NULL bit");
      tick(1);
      expect4(RFD, RFD, RFD, RFD, "4 gate delays after last NULL bit");
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
