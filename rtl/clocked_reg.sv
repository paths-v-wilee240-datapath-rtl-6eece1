// clocked_reg: a register with load enable and asynchronous active-low reset.
//
// On a rising clock edge with load high, q takes d; otherwise q holds. While
// reset is low q is cleared, regardless of the clock. One parameterised module
// serves the original design's 16-bit PC, SP, MAR, MDR and IR registers and
// its 4-bit condition-code register. The active-low asynchronous reset
// follows the original FSM's reset; resetting the condition codes too is this
// design's choice (the original passes no reset to that register).
module clocked_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clock,
  input  logic             reset,   // active low
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clock or negedge reset) begin
    if (!reset)    q <= '0;
    else if (load) q <= d;
  end
endmodule
