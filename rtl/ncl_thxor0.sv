// ncl_thxor0: THxor0 threshold gate with hysteresis.
//
// Sets when AB + CD, de-asserts when all four inputs are 0, holds otherwise.
// Used by the S7 generator to combine two mutually exclusive dual-rail terms
// input-completely. A standard NCL gate; its use here is this design's choice.
// Unit-delay emulation: the state updates on each rising edge of clk.
module ncl_thxor0 (
  input  logic clk,
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic z
);

  always_ff @(posedge clk) begin
    if ((a & b) | (c & d))     z <= 1'b1;
    else if (!(a | b | c | d)) z <= 1'b0;
  end

endmodule
