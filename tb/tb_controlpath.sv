// tb_controlpath: runs the state machine through fetch, decode and every
// instruction's states, and compares the sequence of destinations and
// memory/CC strobes, the cycle count, the ALU function of the one-state
// operations, both outcomes of every conditional branch, and the stop state.
//
// Each state is written as its destination letter (N none, R register,
// S SP, P PC, D MDR, M MAR, I IR) followed by r (memory read), w (memory
// write) and c (CC load) where set; states are separated by spaces.
module tb_controlpath;
  import wile_pkg::*;
  logic          clock = 0, reset = 1;
  cc_t           CCin = '0;
  logic [15:0]   IRIn = 0;
  ctrl_t         out;
  logic [9:0]    currState, nextState;
  logic          w;
  int checks = 0, failures = 0;

  controlpath dut (.*);

  always #5 clock = ~clock;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic string word(ctrl_t c);
    string s;
    case (c.dest)
      DEST_NONE: s = "N"; DEST_REG: s = "R"; DEST_SP: s = "S"; DEST_PC: s = "P";
      DEST_MDR: s = "D";  DEST_MAR: s = "M"; DEST_IR: s = "I"; default: s = "?";
    endcase
    if (c.mem_rd) s = {s, "r"};
    if (c.mem_wr) s = {s, "w"};
    if (c.cc_load) s = {s, "c"};
    return s;
  endfunction

  // Runs one instruction from fetch; returns the states after decode.
  task automatic run(opcode_t op, cc_t cc, output string seq, output int cycles,
                     output alu_fn_t first_fn);
    string pre;
    IRIn = instr(op, 3'd2, 3'd5);
    CCin = cc;
    reset = 0; #1 reset = 1; #1;   // called shortly after a falling edge
    pre = ""; seq = ""; cycles = 0;
    for (int i = 0; i < 4; i++) begin
      pre = {pre, (i ? " " : ""), word(out)};
      @(posedge clock); @(negedge clock); cycles++;
    end
    checks++;
    if (pre != "M Pr I N") begin
      failures++; $display("FAIL fetch sequence '%s'", pre);
    end
    first_fn = out.fn;
    while (currState != 10'd0 && cycles < 40) begin
      seq = {seq, (seq.len() ? " " : ""), word(out)};
      @(posedge clock); @(negedge clock); cycles++;
    end
  endtask

  task automatic expect_op(opcode_t op, cc_t cc, string exp_seq, int exp_cycles);
    string seq; int cycles; alu_fn_t fn;
    run(op, cc, seq, cycles, fn);
    checks++;
    if (seq != exp_seq || cycles != exp_cycles) begin
      failures++;
      $display("FAIL %s: '%s' in %0d cycles, expected '%s' in %0d",
               op.name(), seq, cycles, exp_seq, exp_cycles);
    end
  endtask

  task automatic expect_fn(opcode_t op, alu_fn_t exp_fn);
    string seq; int cycles; alu_fn_t fn;
    run(op, '0, seq, cycles, fn);
    checks++;
    if (fn != exp_fn) begin
      failures++; $display("FAIL %s uses ALU function %s", op.name(), fn.name());
    end
  endtask

  initial begin
    cc_t none, all;
    none = '0; all = '1;
    #1;
    expect_op(OP_LDI,  none, "M Pr Rc", 7);
    expect_op(OP_ADD,  none, "Rc", 5);  expect_op(OP_SUB,  none, "Rc", 5);
    expect_op(OP_INCR, none, "Rc", 5);  expect_op(OP_DECR, none, "Rc", 5);
    expect_op(OP_AND,  none, "Rc", 5);  expect_op(OP_NOT,  none, "Rc", 5);
    expect_op(OP_OR,   none, "Rc", 5);  expect_op(OP_XOR,  none, "Rc", 5);
    expect_op(OP_ASHR, none, "Rc", 5);  expect_op(OP_LSHL, none, "Rc", 5);
    expect_op(OP_LSHR, none, "Rc", 5);  expect_op(OP_ROL,  none, "Rc", 5);
    expect_op(OP_CMR,  none, "Nc", 5);  expect_op(OP_MOV,  none, "R", 5);
    expect_op(OP_LDR,  none, "M Nr Rc", 7);
    expect_op(OP_BRA,  none, "M Nr P", 7);
    expect_op(OP_CMI,  none, "M Pr Nc", 7);
    expect_op(OP_LDA,  none, "M Pr M Nr Rc", 9);
    expect_op(OP_STA,  none, "M Pr M D Nw", 9);
    expect_op(OP_STR,  none, "M D Nw", 7);
    expect_op(OP_JSR,  none, "S M D Mw Nr P", 10);
    expect_op(OP_LDSF, none, "M Pr M Nr R", 9);
    expect_op(OP_LDSP, none, "S", 5);
    expect_op(OP_POP,  none, "M Sr R", 7);
    expect_op(OP_PUSH, none, "M D Sw", 7);
    expect_op(OP_RTN,  none, "M Sr P", 7);
    expect_op(OP_STSF, none, "M Pr M D Nw", 9);
    expect_op(OP_ADDSP, none, "M Pr S", 7);
    expect_op(OP_STSP, none, "R", 5);
    expect_op(OP_NEG,  none, "R R", 6);
    expect_op(OP_NOP,  none, "", 4);
    // conditional branches: taken only on their own flag (Z C N V)
    expect_op(OP_BRZ, cc_t'(4'b1000), "M Nr P", 7); expect_op(OP_BRZ, cc_t'(4'b0111), "M P", 6);
    expect_op(OP_BRC, cc_t'(4'b0100), "M Nr P", 7); expect_op(OP_BRC, cc_t'(4'b1011), "M P", 6);
    expect_op(OP_BRN, cc_t'(4'b0010), "M Nr P", 7); expect_op(OP_BRN, cc_t'(4'b1101), "M P", 6);
    expect_op(OP_BRV, cc_t'(4'b0001), "M Nr P", 7); expect_op(OP_BRV, cc_t'(4'b1110), "M P", 6);
    // ALU function of the one-state operations
    expect_fn(OP_ADD, F_ADD);  expect_fn(OP_SUB, F_SUB);   expect_fn(OP_INCR, F_AINC);
    expect_fn(OP_DECR, F_ADEC); expect_fn(OP_AND, F_AND);  expect_fn(OP_NOT, F_NOT);
    expect_fn(OP_OR, F_OR);    expect_fn(OP_XOR, F_XOR);   expect_fn(OP_ASHR, F_ASHR);
    expect_fn(OP_LSHL, F_SHL); expect_fn(OP_LSHR, F_LSHR); expect_fn(OP_ROL, F_ROL);
    expect_fn(OP_MOV, F_B);    expect_fn(OP_CMR, F_SUB);
    // stop holds the machine with w high
    IRIn = instr(OP_STOP, 3'd0, 3'd0);
    reset = 0; #1 reset = 1;
    repeat (4) @(posedge clock);
    repeat (20) begin
      @(negedge clock);
      checks++;
      if (!w || currState != {4'd0, OP_STOP}) begin
        failures++; $display("FAIL stop: w=%b state=%h", w, currState);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
