// ncl_th24comp: TH24comp threshold gate with hysteresis.
//
// Sets when (A+B)(C+D): with A,B the two rails of one dual-rail bit and C,D
// those of another, the output asserts when both bits are DATA. It
// de-asserts only when all four inputs are 0 (both bits NULL) and holds
// otherwise. The set function is the document's; the gate is emulated with
// unit delay like ncl_th: its state updates on each rising edge of clk.
module ncl_th24comp (
  input  logic clk,
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic z
);

  always_ff @(posedge clk) begin
    if ((a | b) & (c | d))     z <= 1'b1;
    else if (!(a | b | c | d)) z <= 1'b0;
  end

endmodule
