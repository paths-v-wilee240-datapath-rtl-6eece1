// wile_iss: an instruction-level reference model of the WileE240, used by
// the processor testbenches. It executes one instruction per call on its
// own copy of the registers and memory and adds that instruction's cycle
// count (four for fetch and decode plus one per execution state). It is
// written from the instruction semantics, independently of the RTL.
package wile_iss;
  import wile_pkg::*;

  class iss;
    logic [15:0] r [8];
    logic [15:0] mem [256];
    logic [15:0] pc, sp;
    logic        z, c, n, v;
    longint      cycles;
    bit          halted;
    int          taken [4];     // per flag Z C N V
    int          not_taken [4];

    function new();
      foreach (r[i]) r[i] = 0;
      pc = 0; sp = 0; {z, c, n, v} = 4'b0; cycles = 0; halted = 0;
      foreach (taken[i]) begin taken[i] = 0; not_taken[i] = 0; end
    endfunction

    function logic [15:0] rd(logic [15:0] a); return mem[a[7:0]]; endfunction
    function void wr(logic [15:0] a, logic [15:0] d); mem[a[7:0]] = d; endfunction

    // y = a op b with the flag rules of the design, flags stored if setcc.
    function logic [15:0] alu(int f, logic [15:0] a, logic [15:0] b, bit setcc);
      int ua, ub, sa, sb, s, y;
      bit fc, fv;
      ua = int'(a); ub = int'(b);
      sa = (ua > 32767) ? ua - 65536 : ua;
      sb = (ub > 32767) ? ub - 65536 : ub;
      fc = 0; fv = 0;
      case (f)
        0: y = ua;
        1: y = ub;
        2: begin y = ua + 1; fc = y > 65535; s = sa + 1; fv = s > 32767; end
        3: begin y = ua - 1; fc = ua == 0; s = sa - 1; fv = s < -32768; end
        4: begin y = ua + ub; fc = y > 65535; s = sa + sb; fv = (s > 32767) || (s < -32768); end
        5: begin y = ua - ub; fc = ua < ub; s = sa - sb; fv = (s > 32767) || (s < -32768); end
        6: y = ua & ub;
        7: y = ua | ub;
        8: y = ua ^ ub;
        9: y = 65535 - ua;
        10: begin y = (ua / 2) + (ua & 32768); fc = ua[0]; end
        11: begin y = ua * 2; fc = ua > 32767; fv = (ua[15] != ua[14]); end
        12: begin y = ua / 2; fc = ua[0]; end
        13: begin y = ua * 2 + (ua > 32767 ? 1 : 0); fc = ua > 32767; end
        default: y = ua;
      endcase
      y = y & 65535;
      if (setcc) begin z = (y == 0); n = y > 32767; c = fc; v = fv; end
      return 16'(y);
    endfunction

    function void branch(int flag_idx, bit flag, logic [15:0] target);
      if (flag) begin pc = target; cycles += 3; taken[flag_idx]++; end
      else begin pc = pc + 1; cycles += 2; not_taken[flag_idx]++; end
    endfunction

    // Execute one instruction.
    function void step();
      logic [15:0] ir, imm, t;
      logic [9:0]  op;
      int a, b;
      if (halted) return;
      ir = rd(pc); pc = pc + 1; cycles += 4;
      op = ir[15:6]; a = ir[5:3]; b = ir[2:0];
      imm = rd(pc);
      case (op)
        10'(OP_NOP):  ;
        10'(OP_LDI):  begin r[a] = alu(0, imm, 0, 1); pc++; cycles += 3; end
        10'(OP_ADD):  begin r[a] = alu(4, r[a], r[b], 1); cycles += 1; end
        10'(OP_SUB):  begin r[a] = alu(5, r[a], r[b], 1); cycles += 1; end
        10'(OP_INCR): begin r[a] = alu(2, r[a], 0, 1); cycles += 1; end
        10'(OP_DECR): begin r[a] = alu(3, r[a], 0, 1); cycles += 1; end
        10'(OP_LDR):  begin r[a] = alu(0, rd(r[b]), 0, 1); cycles += 3; end
        10'(OP_BRA):  begin pc = imm; cycles += 3; end
        10'(OP_BRZ):  branch(0, z, imm);
        10'(OP_BRC):  branch(1, c, imm);
        10'(OP_BRN):  branch(2, n, imm);
        10'(OP_BRV):  branch(3, v, imm);
        10'(OP_STOP): begin halted = 1; pc = pc; end
        10'(OP_AND):  begin r[a] = alu(6, r[a], r[b], 1); cycles += 1; end
        10'(OP_NOT):  begin r[a] = alu(9, r[a], 0, 1); cycles += 1; end
        10'(OP_OR):   begin r[a] = alu(7, r[a], r[b], 1); cycles += 1; end
        10'(OP_XOR):  begin r[a] = alu(8, r[a], r[b], 1); cycles += 1; end
        10'(OP_CMI):  begin t = alu(5, r[a], imm, 1); pc++; cycles += 3; end
        10'(OP_CMR):  begin t = alu(5, r[a], r[b], 1); cycles += 1; end
        10'(OP_ASHR): begin r[a] = alu(10, r[a], 0, 1); cycles += 1; end
        10'(OP_LSHL): begin r[a] = alu(11, r[a], 0, 1); cycles += 1; end
        10'(OP_LSHR): begin r[a] = alu(12, r[a], 0, 1); cycles += 1; end
        10'(OP_ROL):  begin r[a] = alu(13, r[a], 0, 1); cycles += 1; end
        10'(OP_MOV):  begin r[a] = r[b]; cycles += 1; end
        10'(OP_LDA):  begin r[a] = alu(0, rd(imm), 0, 1); pc++; cycles += 5; end
        10'(OP_STA):  begin wr(imm, r[b]); pc++; cycles += 5; end
        10'(OP_STR):  begin wr(r[a], r[b]); cycles += 3; end
        10'(OP_JSR):  begin sp = sp - 1; wr(sp, pc + 1); pc = imm; cycles += 6; end
        10'(OP_LDSF): begin r[a] = rd(sp + imm); pc++; cycles += 5; end
        10'(OP_LDSP): begin sp = r[a]; cycles += 1; end
        10'(OP_POP):  begin r[a] = rd(sp); sp = sp + 1; cycles += 3; end
        10'(OP_PUSH): begin sp = sp - 1; wr(sp, r[a]); cycles += 3; end
        10'(OP_RTN):  begin pc = rd(sp); sp = sp + 1; cycles += 3; end
        10'(OP_STSF): begin wr(sp + imm, r[a]); pc++; cycles += 5; end
        10'(OP_ADDSP): begin sp = sp + imm; pc++; cycles += 3; end
        10'(OP_STSP): begin r[a] = sp; cycles += 1; end
        10'(OP_NEG):  begin r[a] = ~r[a] + 16'd1; cycles += 2; end
        default: ;   // undefined opcode: back to fetch
      endcase
    endfunction
  endclass
endpackage
