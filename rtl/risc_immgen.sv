// Immediate and displacement unit of the SPARC-subset processor.
//
// Forms the 32-bit constant that the instruction register places on the S2
// bus.  The four manipulations are those of the instruction formats:
//   simm13 (ADD etc.)  sign extended from IR[12:0]
//   disp30 (CALL)      IR[29:0] followed by 00 (word aligned)
//   disp22 (Bicc)      IR[21:0] sign extended, followed by 00
//   imm22  (SETHI)     IR[21:0] followed by ten zeros
// The constants 0 and 4 are this design's additions, used to move the PC to a
// register and to step the PC to the next word.  Purely combinational.
module risc_immgen
  import risc_pkg::*;
(
  input  logic [31:0] ir,
  input  imm_sel_e    sel,
  output logic [31:0] imm
);

  always_comb begin
    unique case (sel)
      IMM_FOUR:   imm = 32'd4;
      IMM_SIMM13: imm = {{19{ir[12]}}, ir[12:0]};
      IMM_DISP30: imm = {ir[29:0], 2'b00};
      IMM_DISP22: imm = {{8{ir[21]}}, ir[21:0], 2'b00};
      IMM_HI22:   imm = {ir[21:0], 10'b0};
      default:    imm = 32'd0;
    endcase
  end

endmodule
