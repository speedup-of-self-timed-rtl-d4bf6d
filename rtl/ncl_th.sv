// ncl_th: THmn threshold gate with hysteresis, the basic NCL gate.
//
// The output asserts once the weighted number of asserted inputs reaches the
// threshold M, and de-asserts only when every input is de-asserted; otherwise
// it holds. With all weights 1 this is the THmn gate: THnn is an n-input
// C-element, TH1n an OR gate. Weights (4 bits per input, input 0 in the low
// nibble) give the weighted gates such as TH34w2 used inside the adders.
// INVERT gives the inverting gates (TH12 with a bubble, inverting TH22/TH33)
// used by the registers and completion components; RESETTABLE/RESET_VAL give
// the reset-to-0 / reset-to-1 gates that initialise registers and completion
// outputs. RESET_VAL is the value seen at z, after any inversion.
//
// Timing: this is a unit-delay emulation of an asynchronous gate. The gate's
// state updates on every rising edge of clk, so one clk period stands for one
// gate delay and z follows its inputs one period later. The threshold/
// hysteresis behaviour follows NCL; the clocked emulation is this design's
// own way of making the asynchronous circuit simulable and synthesizable.
module ncl_th #(
  parameter int unsigned N          = 2,
  parameter int unsigned M          = 2,
  parameter logic [31:0] WEIGHTS    = 32'h1111_1111,
  parameter bit          INVERT     = 1'b0,
  parameter bit          RESETTABLE = 1'b0,
  parameter bit          RESET_VAL  = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] a,
  output logic         z
);

  logic        state;
  logic        set_c;
  logic        clr_c;
  int unsigned sum;

  always_comb begin
    sum = 0;
    for (int unsigned i = 0; i < N; i++)
      if (a[i]) sum += int'(WEIGHTS[4*i +: 4]);
    set_c = (sum >= M);
    clr_c = (a == '0);
  end

  always_ff @(posedge clk) begin
    if (RESETTABLE && rst) state <= RESET_VAL ^ INVERT;
    else if (set_c)        state <= 1'b1;
    else if (clr_c)        state <= 1'b0;
  end

  assign z = state ^ INVERT;

  initial begin
    assert (N >= 1 && N <= 8) else $error("ncl_th: N must be 1..8");
    assert (M >= 1) else $error("ncl_th: M must be at least 1");
  end

endmodule
