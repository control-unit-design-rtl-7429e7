// Decoder of the SPARC-subset processor.
//
// Combinational logic from the instruction register, the sequencer state and
// the branch condition to every datapath control of one cycle (ctrl_t).  The
// instruction fields go almost straight to the datapath: rs1, rs2 and rd are
// the register addresses, F4:F0 of the function code is the ALU function, the
// low two function bits are the shift op, and the function code chooses the
// unit that drives Dest.  What the decoder adds is which field is enabled in
// which cycle:
//   NEXT   S1=PC, S2=4, ADD           -> PC, MAR
//   FETCH  RAM read                    -> IR
//   EX1    ALU/shift: S1=rs1, S2=rs2|simm13, F or shift -> rd (flags if F4)
//          SETHI:     S1=R0, S2=imm22<<10, ADD          -> rd
//          Bicc:      S1=PC, S2=taken ? disp22*4 : 4    -> PC, MAR
//          CALL:      S1=PC, S2=0                       -> R15
//          JMPL:      S1=PC, S2=0                       -> rd
//          LD/ST:     S1=rs1, S2=rs2|simm13, ADD        -> MAR
//   EX2    LD:   RAM read                  -> rd
//          ST:   S1=R0, S2=rd, OR          -> RAM write
//          CALL: S1=PC, S2=disp30*4, ADD   -> PC, MAR
//          JMPL: S1=rs1, S2=rs2|simm13     -> PC, MAR
// Address and PC arithmetic uses F = ADD with F4 = 0, so only the ..CC
// instructions change the flags.  A store's data reaches the RAM through the
// ALU because registers only drive the source buses.  JMPL writes rd before
// the target is formed, so JMPL with rd equal to rs1 or rs2 jumps using the
// saved PC; use a different rd (or R0) to avoid that.  Unrecognised
// instructions do nothing for three cycles.
module risc_decoder
  import risc_pkg::*;
(
  input  logic [31:0] ir,
  input  seq_state_e  state,
  input  logic        taken,
  output ctrl_t       ctl
);

  iclass_e    ic;
  logic [4:0] rd, rs1, rs2;
  logic       imm_i;

  always_comb begin
    ic    = classify(ir);
    rd    = ir[29:25];
    rs1   = ir[18:14];
    rs2   = ir[4:0];
    imm_i = ir[13];

    ctl           = '0;
    ctl.s1_sel    = S1_REG;
    ctl.imm_sel   = IMM_ZERO;
    ctl.dest_sel  = DEST_ALU;
    ctl.alu_f     = F_ADD;
    ctl.shift_op  = ir[20:19];
    ctl.ra1       = rs1;
    ctl.ra2       = rs2;
    ctl.wa        = rd;

    unique case (state)
      ST_NEXT: begin
        ctl.s1_sel    = S1_PC;
        ctl.s2_is_imm = 1'b1;
        ctl.imm_sel   = IMM_FOUR;
        ctl.pc_load   = 1'b1;
        ctl.mar_load  = 1'b1;
      end
      ST_FETCH: begin
        ctl.dest_sel = DEST_MEM;
        ctl.mem_oe   = 1'b1;
        ctl.ir_load  = 1'b1;
      end
      ST_EX1: begin
        unique case (ic)
          IC_ALU, IC_SHIFT: begin
            ctl.s2_is_imm = imm_i;
            ctl.imm_sel   = IMM_SIMM13;
            ctl.alu_f     = (ic == IC_ALU) ? ir[23:19] : F_ADD;
            ctl.dest_sel  = (ic == IC_ALU) ? DEST_ALU : DEST_SHIFT;
            ctl.reg_we    = 1'b1;
          end
          IC_SETHI: begin
            ctl.ra1       = 5'd0;
            ctl.s2_is_imm = 1'b1;
            ctl.imm_sel   = IMM_HI22;
            ctl.reg_we    = 1'b1;
          end
          IC_BICC: begin
            ctl.s1_sel    = S1_PC;
            ctl.s2_is_imm = 1'b1;
            ctl.imm_sel   = taken ? IMM_DISP22 : IMM_FOUR;
            ctl.pc_load   = 1'b1;
            ctl.mar_load  = 1'b1;
          end
          IC_CALL, IC_JMPL: begin
            ctl.s1_sel    = S1_PC;
            ctl.s2_is_imm = 1'b1;
            ctl.imm_sel   = IMM_ZERO;
            ctl.reg_we    = 1'b1;
            ctl.wa        = (ic == IC_CALL) ? 5'd15 : rd;
          end
          IC_LD, IC_ST: begin
            ctl.s2_is_imm = imm_i;
            ctl.imm_sel   = IMM_SIMM13;
            ctl.mar_load  = 1'b1;
          end
          default: ;
        endcase
      end
      default: begin  // ST_EX2
        unique case (ic)
          IC_LD: begin
            ctl.dest_sel = DEST_MEM;
            ctl.mem_oe   = 1'b1;
            ctl.reg_we   = 1'b1;
          end
          IC_ST: begin
            ctl.ra1    = 5'd0;
            ctl.ra2    = rd;
            ctl.alu_f  = F_OR;
            ctl.mem_wr = 1'b1;
          end
          IC_CALL: begin
            ctl.s1_sel    = S1_PC;
            ctl.s2_is_imm = 1'b1;
            ctl.imm_sel   = IMM_DISP30;
            ctl.pc_load   = 1'b1;
            ctl.mar_load  = 1'b1;
          end
          IC_JMPL: begin
            ctl.s2_is_imm = imm_i;
            ctl.imm_sel   = IMM_SIMM13;
            ctl.pc_load   = 1'b1;
            ctl.mar_load  = 1'b1;
          end
          default: ;
        endcase
      end
    endcase
  end

endmodule
