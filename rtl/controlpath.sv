// controlpath: the WileE240's control unit, a Moore state machine.
//
// Every instruction starts with the same four states: fetch (MAR <= PC),
// fetch1 (PC <= PC+1 while the memory word at MAR is read into the MDR),
// fetch2 (IR <= MDR) and decode, which jumps to the state whose code is
// IR[15:6]. The instruction's own states follow and end by returning to
// fetch. Each state drives one 14-bit control word (ctrl_t in wile_pkg:
// ALU function, A and B source selects, destination register, CC load,
// memory read, memory write). Conditional branches test the ZCNV condition
// codes in their first state. The stop state holds the machine and raises w.
//
// Instruction timing in clock cycles (4 for fetch and decode included):
// add sub incr decr and not or xor cmr ashr lshl lshr rol mov ldsp stsp: 5;
// ldi cmi ldr bra addsp pop rtn: 7; not-taken branch: 6, taken branch: 7;
// neg: 6; str: 7; lda sta ldsf stsf: 9; jsr: 10; push: 7.
//
// The state sequences and control words follow the original design state
// for state. The numeric codes of the states, and hence the opcodes, are
// this design's own (see wile_pkg); don't-care fields are driven as zero.
// An undefined state (an unknown opcode) returns to fetch. Reset is
// asynchronous and active low and enters fetch. Only IRIn[15:6] is decoded;
// the register fields IRIn[5:0] are used by the datapath, not here.
module controlpath
  import wile_pkg::*;
(
  input  logic          clock,
  input  logic          reset,      // active low
  input  cc_t           CCin,
  input  logic [DW-1:0] IRIn,
  output ctrl_t         out,
  output logic [SW-1:0] currState,
  output logic [SW-1:0] nextState,
  output logic          w           // high in the stop state
);
  // Named states.
  localparam logic [SW-1:0]
    FETCH  = st(0, OP_NOP), FETCH1 = st(1, OP_NOP),
    FETCH2 = st(2, OP_NOP), DECODE = st(3, OP_NOP),
    LDI    = st(0, OP_LDI),  LDI1  = st(1, OP_LDI),  LDI2  = st(2, OP_LDI),
    ADD    = st(0, OP_ADD),  SUB   = st(0, OP_SUB),
    INCR   = st(0, OP_INCR), DECR  = st(0, OP_DECR),
    LDR    = st(0, OP_LDR),  LDR1  = st(1, OP_LDR),  LDR2  = st(2, OP_LDR),
    BRA    = st(0, OP_BRA),  BRA1  = st(1, OP_BRA),  BRA2  = st(2, OP_BRA),
    STOP   = st(0, OP_STOP),
    ANDOP  = st(0, OP_AND),  NOTOP = st(0, OP_NOT),
    OROP   = st(0, OP_OR),   XOROP = st(0, OP_XOR),
    CMI    = st(0, OP_CMI),  CMI1  = st(1, OP_CMI),  CMI2  = st(2, OP_CMI),
    CMR    = st(0, OP_CMR),
    ASHR   = st(0, OP_ASHR), LSHL  = st(0, OP_LSHL),
    LSHR   = st(0, OP_LSHR), ROL   = st(0, OP_ROL),
    MOV    = st(0, OP_MOV),
    LDA    = st(0, OP_LDA),  LDA1  = st(1, OP_LDA),  LDA2  = st(2, OP_LDA),
    LDA3   = st(3, OP_LDA),  LDA4  = st(4, OP_LDA),
    STA    = st(0, OP_STA),  STA1  = st(1, OP_STA),  STA2  = st(2, OP_STA),
    STA3   = st(3, OP_STA),  STA4  = st(4, OP_STA),
    STR    = st(0, OP_STR),  STR1  = st(1, OP_STR),  STR2  = st(2, OP_STR),
    JSR    = st(0, OP_JSR),  JSR1  = st(1, OP_JSR),  JSR2  = st(2, OP_JSR),
    JSR3   = st(3, OP_JSR),  JSR4  = st(4, OP_JSR),  JSR5  = st(5, OP_JSR),
    LDSF   = st(0, OP_LDSF), LDSF1 = st(1, OP_LDSF), LDSF2 = st(2, OP_LDSF),
    LDSF3  = st(3, OP_LDSF), LDSF4 = st(4, OP_LDSF),
    LDSP   = st(0, OP_LDSP),
    POP    = st(0, OP_POP),  POP1  = st(1, OP_POP),  POP2  = st(2, OP_POP),
    PUSH   = st(0, OP_PUSH), PUSH1 = st(1, OP_PUSH), PUSH2 = st(2, OP_PUSH),
    RTN    = st(0, OP_RTN),  RTN1  = st(1, OP_RTN),  RTN2  = st(2, OP_RTN),
    STSF   = st(0, OP_STSF), STSF1 = st(1, OP_STSF), STSF2 = st(2, OP_STSF),
    STSF3  = st(3, OP_STSF), STSF4 = st(4, OP_STSF),
    ADDSP  = st(0, OP_ADDSP), ADDSP1 = st(1, OP_ADDSP), ADDSP2 = st(2, OP_ADDSP),
    STSP   = st(0, OP_STSP),
    NEG    = st(0, OP_NEG),  NEG1  = st(1, OP_NEG);

  // Conditional branches: step 1 = not taken, steps 2 and 3 = taken.
  localparam logic [5:0] BR_NT = 6'd1, BR_T = 6'd2, BR_T2 = 6'd3;

  // Control word builder.
  function automatic ctrl_t cw(alu_fn_t fn, mux_sel_t a, mux_sel_t b,
                               dest_t d, logic cc, logic rd, logic wr);
    return '{fn: fn, a_sel: a, b_sel: b, dest: d, cc_load: cc,
             mem_rd: rd, mem_wr: wr};
  endfunction

  // Frequently used words.
  localparam ctrl_t NOTHING  = '{fn: F_A, a_sel: MUX_REG, b_sel: MUX_REG,
                                 dest: DEST_NONE, cc_load: 1'b0,
                                 mem_rd: 1'b0, mem_wr: 1'b0};
  localparam ctrl_t PC_TO_MAR = '{fn: F_A, a_sel: MUX_PC, b_sel: MUX_REG,
                                  dest: DEST_MAR, cc_load: 1'b0,
                                  mem_rd: 1'b0, mem_wr: 1'b0};
  localparam ctrl_t PC_INC_RD = '{fn: F_AINC, a_sel: MUX_PC, b_sel: MUX_REG,
                                  dest: DEST_PC, cc_load: 1'b0,
                                  mem_rd: 1'b1, mem_wr: 1'b0};
  localparam ctrl_t PC_INC    = '{fn: F_AINC, a_sel: MUX_PC, b_sel: MUX_REG,
                                  dest: DEST_PC, cc_load: 1'b0,
                                  mem_rd: 1'b0, mem_wr: 1'b0};
  localparam ctrl_t MEM_RD    = '{fn: F_A, a_sel: MUX_REG, b_sel: MUX_REG,
                                  dest: DEST_NONE, cc_load: 1'b0,
                                  mem_rd: 1'b1, mem_wr: 1'b0};
  localparam ctrl_t MEM_WR    = '{fn: F_A, a_sel: MUX_REG, b_sel: MUX_REG,
                                  dest: DEST_NONE, cc_load: 1'b0,
                                  mem_rd: 1'b0, mem_wr: 1'b1};
  localparam ctrl_t MDR_TO_PC = '{fn: F_A, a_sel: MUX_MDR, b_sel: MUX_REG,
                                  dest: DEST_PC, cc_load: 1'b0,
                                  mem_rd: 1'b0, mem_wr: 1'b0};

  always_ff @(posedge clock or negedge reset) begin
    if (!reset) currState <= FETCH;
    else        currState <= nextState;
  end

  // Flag tested by a conditional branch, by opcode.
  function automatic logic br_flag(logic [5:0] op, cc_t cc);
    unique case (op)
      OP_BRN:  return cc.n;
      OP_BRZ:  return cc.z;
      OP_BRC:  return cc.c;
      default: return cc.v;   // OP_BRV
    endcase
  endfunction

  logic [5:0] op;
  logic [3:0] step;
  assign {step, op} = currState;

  always_comb begin
    w         = 1'b0;
    out       = NOTHING;
    nextState = FETCH;
    // The four conditional branches share one sequence.
    if ((op == OP_BRN || op == OP_BRZ || op == OP_BRC || op == OP_BRV) &&
        step <= 4'd3) begin
      unique case (step)
        4'd0: begin
          out       = PC_TO_MAR;
          nextState = br_flag(op, CCin) ? {BR_T[3:0], op} : {BR_NT[3:0], op};
        end
        4'd1: begin out = PC_INC;    nextState = FETCH; end      // skip operand
        4'd2: begin out = MEM_RD;    nextState = {BR_T2[3:0], op}; end
        default: begin out = MDR_TO_PC; nextState = FETCH; end   // take it
      endcase
    end else begin
      unique case (currState)
        FETCH:  begin out = PC_TO_MAR; nextState = FETCH1; end
        FETCH1: begin out = PC_INC_RD; nextState = FETCH2; end
        FETCH2: begin out = cw(F_A, MUX_MDR, MUX_REG, DEST_IR, 0, 0, 0); nextState = DECODE; end
        DECODE: begin out = NOTHING;   nextState = IRIn[15:6]; end
        // load immediate: Ra <= mem[PC++]
        LDI:    begin out = PC_TO_MAR; nextState = LDI1; end
        LDI1:   begin out = PC_INC_RD; nextState = LDI2; end
        LDI2:   out = cw(F_A, MUX_MDR, MUX_REG, DEST_REG, 1, 0, 0);
        // register arithmetic and logic: Ra <= f(Ra, Rb)
        ADD:    out = cw(F_ADD,  MUX_REG, MUX_REG, DEST_REG, 1, 0, 0);
        SUB:    out = cw(F_SUB,  MUX_REG, MUX_REG, DEST_REG, 1, 0, 0);
        INCR:   out = cw(F_AINC, MUX_REG, MUX_REG, DEST_REG, 1, 0, 0);
        DECR:   out = cw(F_ADEC, MUX_REG, MUX_REG, DEST_REG, 1, 0, 0);
        ANDOP:  out = cw(F_AND,  MUX_REG, MUX_REG, DEST_REG, 1, 0, 0);
        NOTOP:  out = cw(F_NOT,  MUX_REG, MUX_REG, DEST_REG, 1, 0, 0);
        OROP:   out = cw(F_OR,   MUX_REG, MUX_REG, DEST_REG, 1, 0, 0);
        XOROP:  out = cw(F_XOR,  MUX_REG, MUX_REG, DEST_REG, 1, 0, 0);
        ASHR:   out = cw(F_ASHR, MUX_REG, MUX_REG, DEST_REG, 1, 0, 0);
        LSHL:   out = cw(F_SHL,  MUX_REG, MUX_REG, DEST_REG, 1, 0, 0);
        LSHR:   out = cw(F_LSHR, MUX_REG, MUX_REG, DEST_REG, 1, 0, 0);
        ROL:    out = cw(F_ROL,  MUX_REG, MUX_REG, DEST_REG, 1, 0, 0);
        MOV:    out = cw(F_B,    MUX_REG, MUX_REG, DEST_REG, 0, 0, 0);
        // load register indirect: Ra <= mem[Rb]
        LDR:    begin out = cw(F_B, MUX_REG, MUX_REG, DEST_MAR, 0, 0, 0); nextState = LDR1; end
        LDR1:   begin out = MEM_RD; nextState = LDR2; end
        LDR2:   out = cw(F_A, MUX_MDR, MUX_REG, DEST_REG, 1, 0, 0);
        // unconditional branch: PC <= mem[PC]
        BRA:    begin out = PC_TO_MAR; nextState = BRA1; end
        BRA1:   begin out = MEM_RD;    nextState = BRA2; end
        BRA2:   out = MDR_TO_PC;
        // halt
        STOP:   begin out = NOTHING; nextState = STOP; w = 1'b1; end
        // compare: flags of Ra - mem[PC++], Ra - Rb
        CMI:    begin out = PC_TO_MAR; nextState = CMI1; end
        CMI1:   begin out = PC_INC_RD; nextState = CMI2; end
        CMI2:   out = cw(F_SUB, MUX_REG, MUX_MDR, DEST_NONE, 1, 0, 0);
        CMR:    out = cw(F_SUB, MUX_REG, MUX_REG, DEST_NONE, 1, 0, 0);
        // load absolute: Ra <= mem[mem[PC++]]
        LDA:    begin out = PC_TO_MAR; nextState = LDA1; end
        LDA1:   begin out = PC_INC_RD; nextState = LDA2; end
        LDA2:   begin out = cw(F_A, MUX_MDR, MUX_REG, DEST_MAR, 0, 0, 0); nextState = LDA3; end
        LDA3:   begin out = MEM_RD; nextState = LDA4; end
        LDA4:   out = cw(F_A, MUX_MDR, MUX_REG, DEST_REG, 1, 0, 0);
        // store absolute: mem[mem[PC++]] <= Rb
        STA:    begin out = PC_TO_MAR; nextState = STA1; end
        STA1:   begin out = PC_INC_RD; nextState = STA2; end
        STA2:   begin out = cw(F_A, MUX_MDR, MUX_REG, DEST_MAR, 0, 0, 0); nextState = STA3; end
        STA3:   begin out = cw(F_B, MUX_REG, MUX_REG, DEST_MDR, 0, 0, 0); nextState = STA4; end
        STA4:   out = MEM_WR;
        // store register indirect: mem[Ra] <= Rb
        STR:    begin out = cw(F_A, MUX_REG, MUX_REG, DEST_MAR, 0, 0, 0); nextState = STR1; end
        STR1:   begin out = cw(F_B, MUX_REG, MUX_REG, DEST_MDR, 0, 0, 0); nextState = STR2; end
        STR2:   out = MEM_WR;
        // subroutine call: mem[--SP] <= PC+1; PC <= mem[PC]
        JSR:    begin out = cw(F_ADEC, MUX_SP, MUX_REG, DEST_SP,  0, 0, 0); nextState = JSR1; end
        JSR1:   begin out = cw(F_A,    MUX_SP, MUX_REG, DEST_MAR, 0, 0, 0); nextState = JSR2; end
        JSR2:   begin out = cw(F_AINC, MUX_PC, MUX_REG, DEST_MDR, 0, 0, 0); nextState = JSR3; end
        JSR3:   begin out = cw(F_A,    MUX_PC, MUX_REG, DEST_MAR, 0, 0, 1); nextState = JSR4; end
        JSR4:   begin out = MEM_RD; nextState = JSR5; end
        JSR5:   out = MDR_TO_PC;
        // load from stack frame: Ra <= mem[SP + mem[PC++]]
        LDSF:   begin out = PC_TO_MAR; nextState = LDSF1; end
        LDSF1:  begin out = PC_INC_RD; nextState = LDSF2; end
        LDSF2:  begin out = cw(F_ADD, MUX_MDR, MUX_SP, DEST_MAR, 0, 0, 0); nextState = LDSF3; end
        LDSF3:  begin out = MEM_RD; nextState = LDSF4; end
        LDSF4:  out = cw(F_A, MUX_MDR, MUX_REG, DEST_REG, 0, 0, 0);
        // SP <= Ra
        LDSP:   out = cw(F_A, MUX_REG, MUX_REG, DEST_SP, 0, 0, 0);
        // pop: Ra <= mem[SP++]
        POP:    begin out = cw(F_A,    MUX_SP, MUX_REG, DEST_MAR, 0, 0, 0); nextState = POP1; end
        POP1:   begin out = cw(F_AINC, MUX_SP, MUX_REG, DEST_SP,  0, 1, 0); nextState = POP2; end
        POP2:   out = cw(F_A, MUX_MDR, MUX_REG, DEST_REG, 0, 0, 0);
        // push: mem[--SP] <= Ra
        PUSH:   begin out = cw(F_ADEC, MUX_SP,  MUX_REG, DEST_MAR, 0, 0, 0); nextState = PUSH1; end
        PUSH1:  begin out = cw(F_A,    MUX_REG, MUX_REG, DEST_MDR, 0, 0, 0); nextState = PUSH2; end
        PUSH2:  out = cw(F_ADEC, MUX_SP, MUX_REG, DEST_SP, 0, 0, 1);
        // return: PC <= mem[SP++]
        RTN:    begin out = cw(F_A,    MUX_SP, MUX_REG, DEST_MAR, 0, 0, 0); nextState = RTN1; end
        RTN1:   begin out = cw(F_AINC, MUX_SP, MUX_REG, DEST_SP,  0, 1, 0); nextState = RTN2; end
        RTN2:   out = MDR_TO_PC;
        // store to stack frame: mem[SP + mem[PC++]] <= Ra
        STSF:   begin out = PC_TO_MAR; nextState = STSF1; end
        STSF1:  begin out = PC_INC_RD; nextState = STSF2; end
        STSF2:  begin out = cw(F_ADD, MUX_MDR, MUX_SP, DEST_MAR, 0, 0, 0); nextState = STSF3; end
        STSF3:  begin out = cw(F_A, MUX_REG, MUX_REG, DEST_MDR, 0, 0, 0); nextState = STSF4; end
        STSF4:  out = MEM_WR;
        // SP <= SP + mem[PC++]
        ADDSP:  begin out = PC_TO_MAR; nextState = ADDSP1; end
        ADDSP1: begin out = PC_INC_RD; nextState = ADDSP2; end
        ADDSP2: out = cw(F_ADD, MUX_MDR, MUX_SP, DEST_SP, 0, 0, 0);
        // Ra <= SP
        STSP:   out = cw(F_A, MUX_SP, MUX_REG, DEST_REG, 0, 0, 0);
        // two's-complement negate: Ra <= ~Ra; Ra <= Ra + 1
        NEG:    begin out = cw(F_NOT, MUX_REG, MUX_REG, DEST_REG, 0, 0, 0); nextState = NEG1; end
        NEG1:   out = cw(F_AINC, MUX_REG, MUX_REG, DEST_REG, 0, 0, 0);
        default: begin out = NOTHING; nextState = FETCH; end
      endcase
    end
  end
endmodule
