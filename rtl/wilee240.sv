// wilee240: the WileE240 processor, controlpath and datapath joined.
//
// A multi-cycle 16-bit CPU: eight general registers, a stack pointer, a
// program counter, ZCNV condition codes and a 256-word memory that holds both
// program and data. The controlpath state machine reads IR and the condition
// codes and drives the 14-bit control word into the datapath; every
// instruction takes 5 to 10 clock cycles (see controlpath).
//
// Use: hold reset low, download a program through the parallel port (two
// bytes per word, high byte first, starting at address 0; see
// parport_loader), then raise reset. Execution starts at address 0 and ends
// at a stop instruction, which raises w and holds the machine. RegSelC/RegC
// read any register; PC, IR, SP, MAR, MDR, the ALU's inputs and result, the
// register selects, the condition codes, the control word and the current
// and next state are brought out for observation, as the original datapath
// and controlpath bring them out.
//
// Timing: one control state per rising edge of clock. The loader runs on
// clk25; the two clocks need no relation, but clock should not be much
// slower than clk25 (see data_memory). reset is asynchronous for the CPU
// registers and synchronised inside the memory and loader.
module wilee240
  import wile_pkg::*;
(
  input  logic          clock,
  input  logic          reset,       // active low
  input  logic          clk25,
  input  logic [7:0]    pport,
  input  logic          stbl,
  output logic          ackl,
  output logic          busy,
  output logic          pe,
  output logic [7:0]    addr_p,
  input  logic [2:0]    RegSelC,
  output logic [DW-1:0] RegC,
  output logic [DW-1:0] PC,
  output logic [DW-1:0] IR,
  output logic [DW-1:0] SP,
  output logic [DW-1:0] MemAddr,
  output logic [DW-1:0] MemData,
  output logic [DW-1:0] ALUSrcA,
  output logic [DW-1:0] ALUSrcB,
  output logic [DW-1:0] ALUresult,
  output logic [2:0]    RegSelA,
  output logic [2:0]    RegSelB,
  output cc_t           CondCodes,
  output ctrl_t         cPoints,
  output logic [SW-1:0] currState,
  output logic [SW-1:0] nextState,
  output logic          w
);

  controlpath ctrl (
    .clock, .reset, .CCin(CondCodes), .IRIn(IR), .out(cPoints),
    .currState, .nextState, .w
  );

  datapath dp (
    .clock, .reset, .cPoints, .IR, .SP, .CondCodes, .ALUSrcA, .ALUSrcB,
    .ALUresult, .PC, .MemAddr, .MemData, .RegSelA, .RegSelB, .RegSelC, .RegC,
    .clk25, .pport, .stbl, .ackl, .busy, .pe, .addr_p
  );
endmodule
