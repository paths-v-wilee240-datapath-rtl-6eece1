// tb_datapath: loads four words through the parallel port, then drives
// hand-written control words cycle by cycle (an instruction fetch, an
// immediate load, register moves and arithmetic, a stack write and a memory
// read back) and checks every register transfer, the condition codes and
// their load enable, the source multiplexers and the third read port.
module tb_datapath;
  import wile_pkg::*;
  logic clock = 0, clk25 = 0, reset = 1, stbl = 1;
  logic [7:0] pport = 0, addr_p;
  ctrl_t cPoints = '0;
  logic [15:0] IR, SP, ALUSrcA, ALUSrcB, ALUresult, PC, MemAddr, MemData, RegC;
  cc_t  CondCodes;
  logic [2:0] RegSelA, RegSelB, RegSelC = 0;
  logic ackl, busy, pe;
  int checks = 0, failures = 0;

  datapath dut (.*);

  always #5 clock = ~clock;
  always #20 clk25 = ~clk25;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic send_byte(input logic [7:0] b);
    while (busy) @(negedge clk25);
    pport = b;
    #30 stbl = 0;
    #120 stbl = 1;
    while (ackl) @(negedge clk25);
    while (!ackl) @(negedge clk25);
  endtask

  // One clock cycle with control word c.
  task automatic cyc(alu_fn_t fn, mux_sel_t a, mux_sel_t b, dest_t d,
                     logic cc = 0, logic rd = 0, logic wr = 0);
    @(negedge clock);
    cPoints = '{fn: fn, a_sel: a, b_sel: b, dest: d, cc_load: cc, mem_rd: rd, mem_wr: wr};
    @(posedge clock); #1;
  endtask

  task automatic reg_is(int r, logic [15:0] v);
    RegSelC = 3'(r); #1;
    check(RegC === v, $sformatf("R%0d = %h, expected %h", r, RegC, v));
  endtask

  logic [15:0] image [4];

  initial begin
    image = '{instr(OP_ADD, 3'd2, 3'd5), 16'h00F0, instr(OP_ADD, 3'd5, 3'd2), 16'hBEEF};
    repeat (6) @(posedge clk25);   // loader rewinds while reset is high
    reset = 0;
    repeat (6) @(posedge clk25);
    foreach (image[i]) begin send_byte(image[i][15:8]); send_byte(image[i][7:0]); end
    check(addr_p == 8'd4, "four words loaded");
    @(negedge clock) reset = 1;
    check(PC == 0 && SP == 0 && IR == 0, "registers cleared by reset");

    // fetch: MAR <= PC; PC <= PC+1 with a read; IR <= MDR
    cyc(F_A, MUX_PC, MUX_REG, DEST_MAR);
    check(MemAddr == 0, "MAR <= PC");
    cyc(F_AINC, MUX_PC, MUX_REG, DEST_PC, 0, 1);
    check(PC == 1 && MemData == image[0], $sformatf("PC=%h MDR=%h after read", PC, MemData));
    cyc(F_A, MUX_MDR, MUX_REG, DEST_IR);
    check(IR == image[0] && RegSelA == 2 && RegSelB == 5, "IR <= MDR, register selects");

    // immediate: R2 <= mem[PC++] with CC load
    cyc(F_A, MUX_PC, MUX_REG, DEST_MAR);
    cyc(F_AINC, MUX_PC, MUX_REG, DEST_PC, 0, 1);
    cyc(F_A, MUX_MDR, MUX_REG, DEST_REG, 1);
    reg_is(2, 16'h00F0);
    check(CondCodes == 4'b0000, $sformatf("CC after 00F0 = %b", CondCodes));

    // next instruction word selects R5 as A and R2 as B
    cyc(F_A, MUX_PC, MUX_REG, DEST_MAR);
    cyc(F_AINC, MUX_PC, MUX_REG, DEST_PC, 0, 1);
    cyc(F_A, MUX_MDR, MUX_REG, DEST_IR);
    check(RegSelA == 5 && RegSelB == 2, "second IR");
    cyc(F_B, MUX_REG, MUX_REG, DEST_REG);              // R5 <= R2
    reg_is(5, 16'h00F0);
    cyc(F_ADD, MUX_REG, MUX_REG, DEST_REG, 1);         // R5 <= R5 + R2
    reg_is(5, 16'h01E0);
    check(ALUSrcA == 16'h01E0 && ALUSrcB == 16'h00F0, "ALU sources from registers");

    // stack write: SP <= SP-1; MAR <= SP; MDR <= R5; write
    cyc(F_ADEC, MUX_SP, MUX_REG, DEST_SP);
    check(SP == 16'hFFFF, $sformatf("SP=%h", SP));
    cyc(F_A, MUX_SP, MUX_REG, DEST_MAR);
    cyc(F_A, MUX_REG, MUX_REG, DEST_MDR);
    check(MemData == 16'h01E0, "MDR <= R5");
    cyc(F_A, MUX_PC, MUX_REG, DEST_MDR, 0, 0, 1);      // MDR <= PC while writing
    check(MemData == 16'h0003, $sformatf("MDR <= PC = %h", MemData));
    cyc(F_A, MUX_REG, MUX_REG, DEST_NONE, 0, 1);       // read it back
    check(MemData == 16'h01E0, $sformatf("stack word read back = %h", MemData));

    // B multiplexer inputs
    @(negedge clock);
    cPoints = '{fn: F_B, a_sel: MUX_REG, b_sel: MUX_SP, dest: DEST_NONE, cc_load: 0, mem_rd: 0, mem_wr: 0};
    #1 check(ALUresult == 16'hFFFF, "B = SP");
    cPoints.b_sel = MUX_PC;  #1 check(ALUresult == 16'h0003, "B = PC");
    cPoints.b_sel = MUX_MDR; #1 check(ALUresult == 16'h01E0, "B = MDR");

    // condition codes
    cyc(F_SUB, MUX_REG, MUX_REG, DEST_REG, 1);         // 01E0 - 00F0
    cyc(F_SUB, MUX_REG, MUX_REG, DEST_REG, 1);         // 00F0 - 00F0 = 0
    reg_is(5, 16'h0000);
    check(CondCodes == 4'b1000, $sformatf("CC zero = %b", CondCodes));
    cyc(F_SUB, MUX_REG, MUX_REG, DEST_REG, 1);         // 0 - 00F0
    reg_is(5, 16'hFF10);
    check(CondCodes == 4'b0110, $sformatf("CC borrow/negative = %b", CondCodes));
    cyc(F_ADD, MUX_REG, MUX_REG, DEST_REG, 0);         // no CC load
    reg_is(5, 16'h0000);
    check(CondCodes == 4'b0110, "CC held without cc_load");
    cyc(F_A, MUX_REG, MUX_REG, DEST_NONE, 0);
    reg_is(2, 16'h00F0);
    check(PC == 3 && SP == 16'hFFFF && MemAddr == 16'hFFFF, "no stray loads");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
