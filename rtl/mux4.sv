// mux4: four-input word multiplexer (the A and B ALU source selectors).
//
// Output y is in0, in1, in2 or in3 as sel is 0, 1, 2 or 3. In the datapath
// the inputs are, in this order, a register-file read port, SP, PC and MDR,
// as in the original design. Purely combinational, no timing of its own.
// The width is a parameter; the original is 16 bits wide.
module mux4 #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [1:0]       sel,
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  input  logic [WIDTH-1:0] in2,
  input  logic [WIDTH-1:0] in3,
  output logic [WIDTH-1:0] y
);
  always_comb begin
    unique case (sel)
      2'd0: y = in0;
      2'd1: y = in1;
      2'd2: y = in2;
      default: y = in3;
    endcase
  end
endmodule
