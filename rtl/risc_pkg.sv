// Shared types and constants of the SPARC-subset processor.
//
// Instruction fields follow the SPARC layout: op = IR[31:30] is the format
// field, rd = IR[29:25], op3 (the 6-bit function code) = IR[24:19],
// rs1 = IR[18:14], i = IR[13] selects simm13 = IR[12:0] over rs2 = IR[4:0].
// Bicc uses cond = IR[28:25], op2 = IR[24:22] and disp22 = IR[21:0]; SETHI
// uses op2 and imm22 = IR[21:0]; CALL uses disp30 = IR[29:0].  The printed
// format pictures give the order and the fixed bit values of these fields;
// the bit numbers are SPARC's.
package risc_pkg;

  // format field IR[31:30]
  localparam logic [1:0] FMT_BR   = 2'b00;  // Bicc, SETHI
  localparam logic [1:0] FMT_CALL = 2'b01;
  localparam logic [1:0] FMT_ALU  = 2'b10;  // ALU, shifts, JMPL
  localparam logic [1:0] FMT_MEM  = 2'b11;  // LD, ST

  // op2 field IR[24:22] of format 00
  localparam logic [2:0] OP2_BICC  = 3'b010;
  localparam logic [2:0] OP2_SETHI = 3'b100;

  // function codes (op3) used outside the ALU group
  localparam logic [5:0] OP3_JMPL = 6'b111000;
  localparam logic [5:0] OP3_LD   = 6'b000000;
  localparam logic [5:0] OP3_ST   = 6'b000100;
  localparam logic [3:0] OP3_SHIFT_HI = 4'b1001;  // 1001xx: xx = 01 SLL, 10 SRL, 11 SRA

  // ALU function F4:F0 (function code with bit 5 = 0)
  localparam logic [4:0] F_ADD  = 5'b00000;
  localparam logic [4:0] F_AND  = 5'b00001;
  localparam logic [4:0] F_OR   = 5'b00010;
  localparam logic [4:0] F_XOR  = 5'b00011;
  localparam logic [4:0] F_SUB  = 5'b00100;
  localparam logic [4:0] F_ADDX = 5'b01000;
  localparam logic [4:0] F_SUBX = 5'b01100;
  localparam logic [4:0] F_CC   = 5'b10000;  // OR into any of the above for the ..CC form

  // condition-code vector order
  localparam int unsigned FLAG_C = 3;
  localparam int unsigned FLAG_V = 2;
  localparam int unsigned FLAG_N = 1;
  localparam int unsigned FLAG_Z = 0;

  // cycles of one instruction, as tracked by the sequencer
  typedef enum logic [1:0] {
    ST_NEXT  = 2'd0,  // PC, MAR <- PC + 4
    ST_FETCH = 2'd1,  // IR <- mem(MAR)
    ST_EX1   = 2'd2,
    ST_EX2   = 2'd3
  } seq_state_e;

  typedef enum logic [0:0] { S1_REG = 1'b0, S1_PC = 1'b1 } s1_sel_e;

  typedef enum logic [2:0] {
    IMM_ZERO   = 3'd0,
    IMM_FOUR   = 3'd1,
    IMM_SIMM13 = 3'd2,  // sign extended
    IMM_DISP30 = 3'd3,  // word aligned
    IMM_DISP22 = 3'd4,  // sign extended and word aligned
    IMM_HI22   = 3'd5   // shifted left by 10
  } imm_sel_e;

  typedef enum logic [1:0] { DEST_ALU = 2'd0, DEST_SHIFT = 2'd1, DEST_MEM = 2'd2 } dest_sel_e;

  // one cycle's worth of datapath control, produced by the decoder
  typedef struct packed {
    s1_sel_e    s1_sel;
    logic       s2_is_imm;   // 1: S2 driven by the immediate unit, 0: by a register
    imm_sel_e   imm_sel;
    logic [4:0] ra1;         // register on S1
    logic [4:0] ra2;         // register on S2
    logic [4:0] alu_f;       // F4:F0
    logic [1:0] shift_op;
    dest_sel_e  dest_sel;
    logic       reg_we;
    logic [4:0] wa;
    logic       pc_load;
    logic       mar_load;
    logic       ir_load;
    logic       mem_oe;
    logic       mem_wr;
  } ctrl_t;

  // instruction classes, as the sequencer and decoder see them
  typedef enum logic [3:0] {
    IC_NOP, IC_ALU, IC_SHIFT, IC_SETHI, IC_BICC, IC_CALL, IC_JMPL, IC_LD, IC_ST
  } iclass_e;

  function automatic iclass_e classify(input logic [31:0] ir);
    iclass_e c;
    c = IC_NOP;
    unique case (ir[31:30])
      FMT_BR:
        if (ir[24:22] == OP2_BICC)       c = IC_BICC;
        else if (ir[24:22] == OP2_SETHI) c = IC_SETHI;
      FMT_CALL: c = IC_CALL;
      FMT_ALU:
        if (ir[24] == 1'b0)                                      c = IC_ALU;
        else if (ir[24:21] == OP3_SHIFT_HI && ir[20:19] != 2'b00) c = IC_SHIFT;
        else if (ir[24:19] == OP3_JMPL)                          c = IC_JMPL;
      default:
        if (ir[24:19] == OP3_LD)      c = IC_LD;
        else if (ir[24:19] == OP3_ST) c = IC_ST;
    endcase
    return c;
  endfunction

endpackage
