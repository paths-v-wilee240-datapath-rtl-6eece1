// wile_pkg: types and constants shared by the WileE240 processor.
//
// The WileE240 is a multi-cycle 16-bit machine: a Moore state machine
// (controlpath) drives a 14-bit control word into a datapath built around one
// ALU. This package fixes the encodings of that control word and of the FSM
// states, which double as instruction opcodes: after decode the FSM jumps to
// the state whose code equals IR[15:6].
//
// The field order of the control word {ALU function, A-mux select, B-mux
// select, destination, CC load, memory read, memory write}, the set of ALU
// functions, the mux inputs (register file, SP, PC, MDR), the destination
// registers and the state names all follow the original design. The numeric
// codes are this design's own:
//   * state code = {step[3:0], op[5:0]}: the first state of an instruction
//     has step 0, so its code is the 6-bit opcode; later steps of the same
//     instruction share the low bits. Opcode 0 is fetch itself, so an
//     all-zero instruction word behaves as a no-operation.
//   * destination 0 means "load nothing"; 1..6 select one load enable.
//   * mux select 0..3 = register file, SP, PC, MDR (the order in which the
//     original datapath wires the mux inputs).
package wile_pkg;

  localparam int unsigned DW = 16;  // data / address word width
  localparam int unsigned SW = 10;  // state register width (IR[15:6])

  // ALU functions (4-bit code, control word bits [13:10])
  typedef enum logic [3:0] {
    F_A      = 4'h0,  // A
    F_B      = 4'h1,  // B
    F_AINC   = 4'h2,  // A + 1
    F_ADEC   = 4'h3,  // A - 1
    F_ADD    = 4'h4,  // A + B
    F_SUB    = 4'h5,  // A - B
    F_AND    = 4'h6,  // A & B
    F_OR     = 4'h7,  // A | B
    F_XOR    = 4'h8,  // A ^ B
    F_NOT    = 4'h9,  // ~A
    F_ASHR   = 4'hA,  // A >>> 1
    F_SHL    = 4'hB,  // A << 1
    F_LSHR   = 4'hC,  // A >> 1
    F_ROL    = 4'hD   // rotate A left by one
  } alu_fn_t;

  // A/B source multiplexer selects
  typedef enum logic [1:0] {
    MUX_REG = 2'd0,
    MUX_SP  = 2'd1,
    MUX_PC  = 2'd2,
    MUX_MDR = 2'd3
  } mux_sel_t;

  // Destination (which register loads the ALU result)
  typedef enum logic [2:0] {
    DEST_NONE = 3'd0,
    DEST_REG  = 3'd1,
    DEST_SP   = 3'd2,
    DEST_PC   = 3'd3,
    DEST_MDR  = 3'd4,
    DEST_MAR  = 3'd5,
    DEST_IR   = 3'd6
  } dest_t;

  // The 14-bit control word, most significant field first.
  typedef struct packed {
    alu_fn_t  fn;       // [13:10]
    mux_sel_t a_sel;    // [9:8]
    mux_sel_t b_sel;    // [7:6]
    dest_t    dest;     // [5:3]
    logic     cc_load;  // [2]
    logic     mem_rd;   // [1]
    logic     mem_wr;   // [0]
  } ctrl_t;

  // Condition codes, ordered Z C N V (Z is bit 3, V is bit 0).
  typedef struct packed {
    logic z;
    logic c;
    logic n;
    logic v;
  } cc_t;

  // Instruction opcodes (= code of each instruction's first state).
  typedef enum logic [5:0] {
    OP_NOP   = 6'h00,  // fetch
    OP_LDI   = 6'h01, OP_ADD   = 6'h02, OP_SUB   = 6'h03, OP_INCR  = 6'h04,
    OP_DECR  = 6'h05, OP_LDR   = 6'h06, OP_BRA   = 6'h07, OP_BRN   = 6'h08,
    OP_BRZ   = 6'h09, OP_STOP  = 6'h0A, OP_BRC   = 6'h0B, OP_BRV   = 6'h0C,
    OP_AND   = 6'h0D, OP_NOT   = 6'h0E, OP_OR    = 6'h0F, OP_XOR   = 6'h10,
    OP_CMI   = 6'h11, OP_CMR   = 6'h12, OP_ASHR  = 6'h13, OP_LSHL  = 6'h14,
    OP_LSHR  = 6'h15, OP_ROL   = 6'h16, OP_MOV   = 6'h17, OP_LDA   = 6'h18,
    OP_STA   = 6'h19, OP_STR   = 6'h1A, OP_JSR   = 6'h1B, OP_LDSF  = 6'h1C,
    OP_LDSP  = 6'h1D, OP_POP   = 6'h1E, OP_PUSH  = 6'h1F, OP_RTN   = 6'h20,
    OP_STSF  = 6'h21, OP_ADDSP = 6'h22, OP_STSP  = 6'h23, OP_NEG   = 6'h24
  } opcode_t;

  // State code of step k of the instruction with opcode op.
  function automatic logic [SW-1:0] st(input logic [3:0] k, input opcode_t op);
    return {k, op};
  endfunction

  // Instruction word: opcode in [11:6] (with [15:12] zero), register A in
  // [5:3] (also the destination), register B in [2:0].
  function automatic logic [DW-1:0] instr(input opcode_t op,
                                          input logic [2:0] ra,
                                          input logic [2:0] rb);
    return {4'h0, op, ra, rb};
  endfunction

endpackage
