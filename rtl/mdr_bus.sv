// mdr_bus: source selection for the memory data register's input.
//
// The MDR loads either the ALU result (when the destination decoder selects
// MDR, alu_en) or the word read from memory (mem_en, a memory-read cycle).
// The original design drives one shared bus from two tri-state drivers; here
// the same choice is a multiplexer, since on-chip tri-states are not wanted.
// load is high when either source drives, which is the MDR's load enable.
// The two enables must never be high together (that would be bus
// contention in the original); an assertion checks it. Combinational.
module mdr_bus #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clock,    // only for the contention assertion
  input  logic             alu_en,
  input  logic [WIDTH-1:0] alu_data,
  input  logic             mem_en,
  input  logic [WIDTH-1:0] mem_data,
  output logic [WIDTH-1:0] y,
  output logic             load
);
  assign y    = mem_en ? mem_data : alu_data;
  assign load = alu_en | mem_en;

  a_no_contention: assert property (@(posedge clock) !(alu_en && mem_en))
    else $error("mdr_bus: ALU and memory drive the MDR bus together");
endmodule
