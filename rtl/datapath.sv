// datapath: the WileE240's registers, ALU and memory, steered by the
// 14-bit control word from the controlpath.
//
// One ALU does all the work: its A input is chosen among register-file port
// A, SP, PC and MDR, its B input among register-file port B, SP, PC and MDR.
// The destination field of the control word picks at most one register to
// load the ALU result: the register file (entry IR[5:3]), SP, PC, MDR, MAR
// or IR. The MDR also loads the memory word at MAR in a memory-read cycle.
// A memory-write cycle writes the MDR to memory at MAR on the clock edge.
// The condition codes load from the ALU when cc_load is set. All registers
// change on the rising edge of clock; reset is asynchronous and active low
// and clears PC, SP, MAR, MDR, IR, the condition codes and the registers,
// so execution starts at address 0. The register file's third read port
// (RegSelC, RegC) lets the outside observe any register.
//
// Structure and wiring follow the original design. The MDR loads when it is
// the destination or on a memory read (this design's reading of the
// original's MDR enable); MAR's low 8 bits address the 256-word memory. The parallel-port signals belong to the memory's
// program loader (see data_memory and parport_loader).
module datapath
  import wile_pkg::*;
(
  input  logic          clock,
  input  logic          reset,       // active low
  input  ctrl_t         cPoints,
  output logic [DW-1:0] IR,
  output logic [DW-1:0] SP,
  output cc_t           CondCodes,
  output logic [DW-1:0] ALUSrcA,
  output logic [DW-1:0] ALUSrcB,
  output logic [DW-1:0] ALUresult,
  output logic [DW-1:0] PC,
  output logic [DW-1:0] MemAddr,
  output logic [DW-1:0] MemData,
  output logic [2:0]    RegSelA,
  output logic [2:0]    RegSelB,
  input  logic [2:0]    RegSelC,
  output logic [DW-1:0] RegC,
  // parallel port of the memory's program loader
  input  logic          clk25,
  input  logic [7:0]    pport,
  input  logic          stbl,
  output logic          ackl,
  output logic          busy,
  output logic          pe,
  output logic [7:0]    addr_p
);
  logic [DW-1:0] RfileA, RfileB, MemOut, NewMDR;
  logic [5:0]    LoadLines;
  logic          RegLoad, SPLoad, PCLoad, MDwrite, MARLoad, IRLoad, MDRLoad;
  cc_t           NewCondCodes;

  assign RegSelA = IR[5:3];
  assign RegSelB = IR[2:0];

  reg_file #(.WIDTH(DW), .NREGS(8)) rfile (
    .clock, .reset, .we(RegLoad), .sel_a(RegSelA), .sel_b(RegSelB),
    .sel_c(RegSelC), .wd(ALUresult), .rd_a(RfileA), .rd_b(RfileB), .rd_c(RegC)
  );

  mux4 #(.WIDTH(DW)) MuxA (.sel(cPoints.a_sel), .in0(RfileA), .in1(SP),
                           .in2(PC), .in3(MemData), .y(ALUSrcA));
  mux4 #(.WIDTH(DW)) MuxB (.sel(cPoints.b_sel), .in0(RfileB), .in1(SP),
                           .in2(PC), .in3(MemData), .y(ALUSrcB));

  alu #(.WIDTH(DW)) alu_i (.fn(cPoints.fn), .a(ALUSrcA), .b(ALUSrcB),
                           .y(ALUresult), .cc(NewCondCodes));

  dest_decoder RegLoadDecoder (.dest(cPoints.dest), .load(LoadLines));
  assign {IRLoad, MARLoad, MDwrite, PCLoad, SPLoad, RegLoad} = LoadLines;

  mdr_bus #(.WIDTH(DW)) mdr_src (
    .clock, .alu_en(MDwrite), .alu_data(ALUresult),
    .mem_en(cPoints.mem_rd), .mem_data(MemOut), .y(NewMDR), .load(MDRLoad)
  );

  clocked_reg #(.WIDTH(DW)) PCReg (.clock, .reset, .load(PCLoad),  .d(ALUresult), .q(PC));
  clocked_reg #(.WIDTH(DW)) MDR   (.clock, .reset, .load(MDRLoad), .d(NewMDR),    .q(MemData));
  clocked_reg #(.WIDTH(DW)) MAR   (.clock, .reset, .load(MARLoad), .d(ALUresult), .q(MemAddr));
  clocked_reg #(.WIDTH(DW)) IRReg (.clock, .reset, .load(IRLoad),  .d(ALUresult), .q(IR));
  clocked_reg #(.WIDTH(DW)) SPReg (.clock, .reset, .load(SPLoad),  .d(ALUresult), .q(SP));
  clocked_reg #(.WIDTH(4))  CCreg (.clock, .reset, .load(cPoints.cc_load),
                                   .d(NewCondCodes), .q(CondCodes));

  data_memory #(.DEPTH(256), .WIDTH(DW)) DataMem (
    .clock, .reset, .addr(MemAddr[7:0]), .wdata(MemData), .we(cPoints.mem_wr),
    .rdata(MemOut), .clk25, .pport, .stbl, .ackl, .busy, .pe, .addr_p
  );
endmodule
