// tb_wilee240: end-to-end test of the whole processor at its default size.
//
// For each program the testbench builds a full 256-word memory image,
// downloads it through the parallel port while reset holds the CPU (the
// last word fills the memory and raises pe), releases reset and lets the
// program run to its stop instruction. The same image is executed by an
// instruction-level reference model (wile_iss); the eight registers, SP,
// PC, the condition codes, all 256 memory words and the cycle count from
// reset release to the stop state must match it exactly.
//
// Program 1 is written by hand to reach every instruction and both outcomes
// of every conditional branch (a counted loop, a subroutine call that works
// on its stack frame, absolute and indirect loads and stores, flag tests).
// Programs 2.. are random: straight-line code with forward branches only,
// memory accesses kept to a data area, calls to one subroutine, and the
// stack depth kept bounded.
// Coverage of each instruction, each branch outcome, the download, the
// memory-full indication and memory writes is counted on the RTL's own
// state register; any that never happened counts as a failure.
module tb_wilee240;
  import wile_pkg::*;
  import wile_iss::*;

  localparam int NRANDOM = 12;

  logic clock = 0, clk25 = 0, reset = 1, stbl = 1;
  logic [7:0]  pport = 0, addr_p;
  logic        ackl, busy, pe, w;
  logic [2:0]  RegSelC = 0;
  logic [15:0] RegC, PC, IR, SP, MemAddr, MemData, ALUresult, ALUSrcA, ALUSrcB;
  logic [2:0]  RegSelA, RegSelB;
  cc_t         CondCodes;
  ctrl_t       cPoints;
  logic [9:0]  currState, nextState;
  int checks = 0, failures = 0;

  wilee240 dut (.*);

  always #5 clock = ~clock;     // 100 MHz
  always #20 clk25 = ~clk25;    // 25 MHz

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---- coverage, counted on the RTL state register ----
  int op_seen [64];
  int br_taken [4], br_not [4];       // Z C N V
  int downloads = 0, mem_full = 0, mem_writes = 0;
  logic [9:0] prev_state;
  always @(posedge clock) begin
    prev_state <= currState;
    if (reset && currState[9:6] == 4'd0 && prev_state == 10'h0C0)
      op_seen[currState[5:0]]++;
    if (reset && prev_state[9:6] == 4'd0) begin
      int fi;
      fi = (prev_state[5:0] == OP_BRZ) ? 0 : (prev_state[5:0] == OP_BRC) ? 1 :
           (prev_state[5:0] == OP_BRN) ? 2 : (prev_state[5:0] == OP_BRV) ? 3 : -1;
      if (fi >= 0 && currState == {4'd2, prev_state[5:0]}) br_taken[fi]++;
      if (fi >= 0 && currState == {4'd1, prev_state[5:0]}) br_not[fi]++;
    end
    if (reset && cPoints.mem_wr) mem_writes++;
  end

  // ---- program construction ----
  logic [15:0] image [256];
  int pcw;

  function automatic void emit(opcode_t op, int ra = 0, int rb = 0);
    image[pcw] = instr(op, 3'(ra), 3'(rb)); pcw++;
  endfunction
  function automatic void word(int v);
    image[pcw] = 16'(v); pcw++;
  endfunction

  task automatic hand_program();
    int loop_a, sub_a, bad_a, fix [$];
    foreach (image[i]) image[i] = 16'($urandom);
    pcw = 0;
    emit(OP_LDI, 1); word(5);                 // r1 = 5 (loop counter)
    emit(OP_LDI, 2); word(0);                 // r2 = 0 (sum)
    emit(OP_LDI, 7); word(16'h00F0);
    emit(OP_LDSP, 7);                         // SP = F0
    loop_a = pcw;
    emit(OP_ADD, 2, 1);
    emit(OP_DECR, 1);
    emit(OP_BRZ); fix.push_back(pcw); word(0);   // -> done
    emit(OP_BRA); word(loop_a);
    image[fix.pop_front()] = 16'(pcw);        // done:
    emit(OP_MOV, 3, 2);                       // r3 = 15
    emit(OP_PUSH, 3);
    emit(OP_JSR); fix.push_back(pcw); word(0);   // -> sub
    emit(OP_POP, 4);                          // r4 = 30 (doubled by sub)
    emit(OP_STA, 0, 4); word(16'h00C0);
    emit(OP_LDA, 6); word(16'h00C0);
    emit(OP_CMI, 6); word(30);                // Z
    emit(OP_BRZ); word(pcw + 2);
    emit(OP_STOP);
    emit(OP_CMI, 6); word(31);                // C, N
    emit(OP_BRC); word(pcw + 2);
    emit(OP_STOP);
    emit(OP_BRN); word(pcw + 2);
    emit(OP_STOP);
    emit(OP_BRV); fix.push_back(pcw); word(0);   // not taken -> bad
    emit(OP_LDI, 0); word(16'h7FFF);
    emit(OP_INCR, 0);                         // V, N
    emit(OP_BRV); word(pcw + 2);
    emit(OP_STOP);
    emit(OP_BRC); fix.push_back(pcw); word(0);   // not taken
    emit(OP_BRZ); fix.push_back(pcw); word(0);   // not taken
    emit(OP_LDI, 1); word(16'h00FF);
    emit(OP_LDI, 2); word(16'h0F0F);
    emit(OP_AND, 1, 2);
    emit(OP_OR, 1, 2);
    emit(OP_XOR, 1, 2);                       // 0
    emit(OP_BRN); fix.push_back(pcw); word(0);   // not taken
    emit(OP_NOT, 1);
    emit(OP_ASHR, 1);
    emit(OP_LSHR, 1);
    emit(OP_ROL, 1);
    emit(OP_LSHL, 1);
    emit(OP_SUB, 1, 2);
    emit(OP_CMR, 1, 2);
    emit(OP_NEG, 2);
    emit(OP_LDI, 3); word(16'h00C8);
    emit(OP_STR, 3, 2);                       // mem[C8] = r2
    emit(OP_LDR, 4, 3);                       // r4 = mem[C8]
    emit(OP_ADDSP); word(16'hFFFE);           // SP -= 2
    emit(OP_STSP, 5);
    emit(OP_NOP);
    emit(OP_STOP);
    bad_a = pcw;
    emit(OP_STOP);
    sub_a = pcw;                              // sub: double the pushed word
    emit(OP_LDSF, 5); word(1);
    emit(OP_LSHL, 5);
    emit(OP_STSF, 5); word(1);
    emit(OP_RTN);
    image[fix.pop_front()] = 16'(sub_a);
    while (fix.size() > 0) image[fix.pop_front()] = 16'(bad_a);
  endtask

  // Random program: forward branches only, memory traffic in C0..DF,
  // stack from F0 down by at most 7 words, calls to one subroutine.
  task automatic random_program();
    opcode_t ops [] = '{OP_ADD, OP_SUB, OP_INCR, OP_DECR, OP_AND, OP_NOT, OP_OR,
                        OP_XOR, OP_ASHR, OP_LSHL, OP_LSHR, OP_ROL, OP_MOV, OP_CMR,
                        OP_LDI, OP_CMI, OP_LDR, OP_STR, OP_LDA, OP_STA, OP_BRZ,
                        OP_BRC, OP_BRN, OP_BRV, OP_BRA, OP_PUSH, OP_POP, OP_LDSF,
                        OP_STSF, OP_STSP, OP_NEG, OP_NOP, OP_JSR};
    int starts [$];
    int patch_at [$], patch_to [$];
    int depth = 0, sub_a;
    foreach (image[i]) image[i] = 16'($urandom);
    pcw = 0;
    emit(OP_LDI, 7); word(16'h00F0);
    emit(OP_LDSP, 7);
    for (int k = 0; k < 40; k++) begin
      opcode_t op;
      int ra, rb;
      op = ops[$urandom % ops.size()];
      ra = $urandom % 8; rb = $urandom % 8;
      starts.push_back(pcw);
      case (op)
        OP_LDI, OP_CMI: begin emit(op, ra, rb); word($urandom); end
        OP_LDR, OP_STR: begin
          // address register first
          int ar = (ra + 1 + $urandom % 7) % 8;
          emit(OP_LDI, ar); word(16'h00C0 + $urandom % 32);
          if (op == OP_LDR) emit(OP_LDR, ra, ar); else emit(OP_STR, ar, rb);
        end
        OP_LDA, OP_STA: begin emit(op, ra, rb); word(16'h00C0 + $urandom % 32); end
        OP_BRZ, OP_BRC, OP_BRN, OP_BRV, OP_BRA: begin
          emit(op); patch_at.push_back(pcw); patch_to.push_back(k + 1 + $urandom % 3);
          word(0);
        end
        OP_JSR: if (depth < 6) begin     // call the subroutine after the stops
          emit(op); patch_at.push_back(pcw); patch_to.push_back(-1); word(0);
        end else emit(OP_NOP);
        OP_PUSH: if (depth < 6) begin emit(op, ra); depth++; end else emit(OP_NOP);
        OP_POP:  if (depth > 0) begin emit(op, ra); depth--; end else emit(OP_NOP);
        OP_LDSF, OP_STSF: begin emit(op, ra); word($urandom % 8); end
        default: emit(op, ra, rb);
      endcase
    end
    starts.push_back(pcw);
    for (int e = 0; e < 4; e++) begin starts.push_back(pcw); emit(OP_STOP); end
    sub_a = pcw;                            // sub: r6 += r7, then return
    emit(OP_ADD, 6, 7);
    emit(OP_RTN);
    foreach (patch_at[i])
      image[patch_at[i]] = 16'(patch_to[i] < 0 ? sub_a :
                               starts[patch_to[i] < starts.size() ? patch_to[i] : starts.size() - 1]);
  endtask

  // ---- parallel-port host ----
  task automatic send_byte(input logic [7:0] b);
    while (busy) @(negedge clk25);
    pport = b;
    #30 stbl = 0;
    #120 stbl = 1;
    while (ackl) @(negedge clk25);
    while (!ackl) @(negedge clk25);
  endtask

  task automatic download();
    reset = 1;
    repeat (6) @(posedge clk25);            // loader rewinds while reset is high
    reset = 0;                              // hold the CPU, enable loading
    repeat (6) @(posedge clk25);
    check(pe === 1'b0 && addr_p === 8'd0, "loader ready at address 0");
    foreach (image[i]) begin
      send_byte(image[i][15:8]);
      send_byte(image[i][7:0]);
    end
    if (pe) mem_full++;
    downloads++;
    check(pe === 1'b1, "pe after 256 words");
  endtask

  // ---- run one program and compare with the reference model ----
  task automatic run_and_compare(string name);
    iss m;
    longint cyc = 0;
    int steps = 0;
    m = new();
    foreach (image[i]) m.mem[i] = image[i];
    while (!m.halted && steps < 5000) begin m.step(); steps++; end
    check(m.halted, {name, ": reference model halts"});
    download();
    foreach (image[i])
      check(dut.dp.DataMem.mem[i] === image[i], $sformatf("%s: loaded word %0d", name, i));
    @(negedge clock) reset = 1;
    while (!w && cyc < 100000) begin @(posedge clock); #1; cyc++; end
    check(w, {name, ": reached stop"});
    // cycles from reset release to the stop state = cycles of all
    // instructions before it + 4 for fetching and decoding the stop
    check(cyc == m.cycles, $sformatf("%s: %0d cycles, expected %0d", name, cyc, m.cycles));
    for (int r = 0; r < 8; r++) begin
      RegSelC = 3'(r); #1;
      check(RegC === m.r[r], $sformatf("%s: R%0d = %h, expected %h", name, r, RegC, m.r[r]));
    end
    check(SP === m.sp, $sformatf("%s: SP = %h, expected %h", name, SP, m.sp));
    check(PC === m.pc, $sformatf("%s: PC = %h, expected %h", name, PC, m.pc));
    check(CondCodes === {m.z, m.c, m.n, m.v},
          $sformatf("%s: ZCNV = %b, expected %b", name, CondCodes, {m.z, m.c, m.n, m.v}));
    foreach (image[i])
      check(dut.dp.DataMem.mem[i] === m.mem[i],
            $sformatf("%s: mem[%0d] = %h, expected %h", name, i, dut.dp.DataMem.mem[i], m.mem[i]));
    repeat (5) @(posedge clock);
    check(w && PC === m.pc, {name, ": stop holds the machine"});
    $display("%s: %0d instructions, %0d cycles", name, steps, cyc);
  endtask

  initial begin
    hand_program();
    run_and_compare("hand-written program");
    for (int p = 0; p < NRANDOM; p++) begin
      random_program();
      run_and_compare($sformatf("random program %0d", p));
    end

    // every instruction, both outcomes of each branch, and the loader
    for (int op = 0; op <= int'(OP_NEG); op++) begin
      opcode_t o;
      o = opcode_t'(op);
      check(op_seen[op] > 0, $sformatf("instruction %s never executed", o.name()));
    end
    for (int f = 0; f < 4; f++) begin
      check(br_taken[f] > 0, $sformatf("branch on flag %0d never taken", f));
      check(br_not[f] > 0, $sformatf("branch on flag %0d never fell through", f));
    end
    check(downloads > 0 && mem_full > 0 && mem_writes > 0, "download, memory full, memory write");
    $display("coverage: downloads=%0d memory-full=%0d CPU memory writes=%0d", downloads, mem_full, mem_writes);
    $display("branches taken ZCNV: %0d %0d %0d %0d  not taken: %0d %0d %0d %0d",
             br_taken[0], br_taken[1], br_taken[2], br_taken[3], br_not[0], br_not[1], br_not[2], br_not[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
