// reg_file: the eight general-purpose 16-bit registers.
//
// Three combinational read ports: A (sel_a, driven by IR[5:3]), B (sel_b,
// IR[2:0]) and C (sel_c, an external select used to observe any register).
// One write port: on a rising clock edge with we high, register sel_a takes
// wd, so the register named in IR[5:3] is both the first operand and the
// destination of every instruction, as the original design's instruction
// sequences require. A write is seen on the read ports from the next cycle.
// Active-low asynchronous reset clears all registers (this reset of the
// register contents is this design's choice).
module reg_file #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned NREGS = 8
) (
  input  logic                     clock,
  input  logic                     reset,   // active low
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] sel_a,
  input  logic [$clog2(NREGS)-1:0] sel_b,
  input  logic [$clog2(NREGS)-1:0] sel_c,
  input  logic [WIDTH-1:0]         wd,
  output logic [WIDTH-1:0]         rd_a,
  output logic [WIDTH-1:0]         rd_b,
  output logic [WIDTH-1:0]         rd_c
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clock or negedge reset) begin
    if (!reset) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[sel_a] <= wd;
    end
  end

  assign rd_a = regs[sel_a];
  assign rd_b = regs[sel_b];
  assign rd_c = regs[sel_c];
endmodule
