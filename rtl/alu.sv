// alu: the WileE240's single arithmetic/logic unit.
//
// Computes y = f(a, b) for the fourteen functions of the original design
// (A, B, A+1, A-1, A+B, A-B, and, or, xor, not, arithmetic shift right,
// shift left, logical shift right, rotate left; all shifts by one place) and
// the condition codes Z C N V (cc_t, Z in bit 3, V in bit 0). The datapath
// loads the codes only when the control word asks for it.
//
// Flag rules (the original names the flags but not their rules; these are
// this design's choice):
//   Z = (y == 0), N = y[15] for every function.
//   C: carry out of A+B and A+1; borrow (A < B unsigned) for A-B and A-1;
//      the bit shifted or rotated out for the shifts; 0 otherwise.
//   V: two's-complement overflow for A+B, A-B, A+1, A-1; for shift left,
//      a change of the sign bit; 0 otherwise.
// Purely combinational.
module alu
  import wile_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  alu_fn_t          fn,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y,
  output cc_t              cc
);
  localparam int unsigned M = WIDTH - 1;

  logic [WIDTH:0] sum;   // extended sum/difference for carry and borrow
  logic [WIDTH-1:0] opb;
  logic           is_arith, is_sub;

  always_comb begin
    // Operand B of the adder: b for A+B / A-B, 1 for A+1 / A-1.
    is_sub   = (fn == F_SUB) || (fn == F_ADEC);
    is_arith = (fn == F_ADD) || (fn == F_AINC) || is_sub;
    opb      = ((fn == F_AINC) || (fn == F_ADEC)) ? WIDTH'(1) : b;
    sum      = is_sub ? ({1'b0, a} - {1'b0, opb}) : ({1'b0, a} + {1'b0, opb});

    y    = a;
    cc.c = 1'b0;
    cc.v = 1'b0;
    unique case (fn)
      F_A:    y = a;
      F_B:    y = b;
      F_AINC, F_ADEC, F_ADD, F_SUB: begin
        y    = sum[M:0];
        cc.c = sum[WIDTH];
      end
      F_AND:  y = a & b;
      F_OR:   y = a | b;
      F_XOR:  y = a ^ b;
      F_NOT:  y = ~a;
      F_ASHR: begin y = {a[M], a[M:1]};  cc.c = a[0]; end
      F_SHL:  begin y = {a[M-1:0], 1'b0}; cc.c = a[M]; cc.v = a[M] ^ a[M-1]; end
      F_LSHR: begin y = {1'b0, a[M:1]};  cc.c = a[0]; end
      F_ROL:  begin y = {a[M-1:0], a[M]}; cc.c = a[M]; end
      default: y = a;
    endcase

    if (is_arith) begin
      // Overflow: operands of equal effective sign give a result of the
      // other sign.
      cc.v = is_sub ? ((a[M] != opb[M]) && (y[M] != a[M]))
                    : ((a[M] == opb[M]) && (y[M] != a[M]));
    end
    cc.z = (y == '0);
    cc.n = y[M];
  end
endmodule
