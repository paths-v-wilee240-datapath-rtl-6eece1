// dest_decoder: turns the 3-bit destination field of the control word into
// one load enable per datapath register.
//
// Outputs {ir, mar, mdr, pc, sp, reg} in that order (the order of the original
// design's decoder outputs). Code 0 (DEST_NONE) and the unused code 7 enable
// nothing; codes 1..6 enable reg, sp, pc, mdr, mar, ir respectively, so at
// most one register loads the ALU result per cycle. The numeric codes are
// this design's own choice (see wile_pkg). Combinational.
module dest_decoder
  import wile_pkg::*;
(
  input  dest_t      dest,
  output logic [5:0] load   // {IRLoad, MARLoad, MDwrite, PCLoad, SPLoad, RegLoad}
);
  always_comb begin
    load = '0;
    unique case (dest)
      DEST_REG: load[0] = 1'b1;
      DEST_SP:  load[1] = 1'b1;
      DEST_PC:  load[2] = 1'b1;
      DEST_MDR: load[3] = 1'b1;
      DEST_MAR: load[4] = 1'b1;
      DEST_IR:  load[5] = 1'b1;
      default:  load = '0;
    endcase
  end
endmodule
