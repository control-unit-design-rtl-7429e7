// Accumulator machine: ALU function codes, operation codes and the
// microprogram.
//
// The machine has an 8-bit accumulator ACC, index register X, stack pointer
// S, program counter PC, memory address register MAR and instruction register
// IR.  Instructions are one byte (inherent, stack) or two bytes (an opcode
// byte followed by an operand byte that is immediate data, an address, an
// offset added to X, or a PC-relative offset).
//
// Operation codes (7 bits; their choice is a state-allocation problem, since
// each opcode is also the micro-address {1, opcode} of its first step):
//   0x00-0x09  inherent  CLR INC DEC NEG COM LSL LSR ASR ROL ROR (on ACC)
//   mode base + i, with base 0x10 immediate, 0x20 direct, 0x30 indirect,
//   0x40 indexed, 0x50 indexed indirect, 0x60 stack (pull / push) and
//     i = 0..6  ADD SUB ADC SBC AND OR EOR
//     i = 7..9  LDA LDX LDS
//     i = A..C  STA STX STS
//   0x2D/0x3D JMP direct/indirect, 0x2E/0x3E JSR direct/indirect, 0x6F RTS
//   0x70 BRA, 0x71 BRN, 0x72 BSR, and the conditional branches BCC 0x73,
//   BCS 0x75, BVC 0x77, BVS 0x79, BEQ 0x7B, BNE 0x7D, BLT 0x0A, BGE 0x0C,
//   BGT 0x0E, BLE 0x1A; the code after each conditional branch is left free
//   because the branch's taken step lives at that micro-address.
// Only the combinations of the instruction-set table exist (98 of them); the
// rest execute as 2-cycle no-operations.
//
// Addressing: direct = mem[operand]; indirect = mem[mem[operand]]; indexed =
// mem[X + operand]; indexed indirect = mem[mem[X + operand]]; stack pull reads
// mem[S] then S <- S + 1; push does S <- S - 1 then writes mem[S].  Branch
// targets are the address after the 2-byte branch plus the signed offset.
// JSR and BSR push the address after themselves; RTS pulls it into PC.
//
// The instructions, their addressing modes and their cycle counts (fetch
// included) follow the machine's instruction table; conditional branches
// take one extra cycle when taken.  The ALU encoding, the opcode values, the
// microprogram and the branch and stack conventions are this design's own.
// build_image() runs at elaboration time; its result is loaded into the
// writable control stores by cisc_machine.
package cisc_pkg;

  import ucode_pkg::*;

  // ALU function F5..F0 (this design's encoding)
  localparam logic [5:0] ALU_ADD   = 6'h00;  // A + B + cin
  localparam logic [5:0] ALU_SUB   = 6'h01;  // A + ~B + cin, C = borrow
  localparam logic [5:0] ALU_AND   = 6'h02;
  localparam logic [5:0] ALU_OR    = 6'h03;
  localparam logic [5:0] ALU_EOR   = 6'h04;
  localparam logic [5:0] ALU_PASSA = 6'h05;  // A + cin
  localparam logic [5:0] ALU_DECA  = 6'h06;  // A - 1 + cin, C = borrow
  localparam logic [5:0] ALU_PASSB = 6'h07;  // B
  localparam logic [5:0] ALU_NEG   = 6'h08;  // ~A + cin, C = borrow
  localparam logic [5:0] ALU_COM   = 6'h09;  // ~A
  localparam logic [5:0] ALU_CLR   = 6'h0A;  // 0
  localparam logic [5:0] ALU_SHL   = 6'h0B;  // A << 1, bit 0 = Multiword ? C : 0
  localparam logic [5:0] ALU_SHR   = 6'h0C;  // A >> 1, bit 7 = A[7] | C | 0

  // opcode bases
  localparam int unsigned OPB_IMM = 'h10, OPB_DIR = 'h20, OPB_IND = 'h30,
                          OPB_IDX = 'h40, OPB_IDXIND = 'h50, OPB_STK = 'h60;
  localparam int unsigned OP_JMP_DIR = 'h2D, OP_JMP_IND = 'h3D, OP_JSR_DIR = 'h2E,
                          OP_JSR_IND = 'h3E, OP_RTS = 'h6F, OP_BRA = 'h70,
                          OP_BRN = 'h71, OP_BSR = 'h72;

  localparam int unsigned NA_W   = 6;
  localparam int unsigned UW_W   = NA_W + UA_W + 4;            // microword
  localparam int unsigned NW_W   = $bits(nano_word_t);         // nanoword
  localparam int unsigned IMG_W  = (1 << UA_W) * UW_W + (1 << NA_W) * NW_W;

  // masks for building nanowords
  localparam logic [4:0] M_NONE   = 5'b00000;  // {Enable_Reg, OE, Load_IR, WR, Sel_PC}
  localparam logic [4:0] M_RD_PC  = 5'b01001;
  localparam logic [4:0] M_RD_MAR = 5'b01000;
  localparam logic [4:0] M_FETCH  = 5'b01101;
  localparam logic [4:0] M_WR_MAR = 5'b10010;
  localparam logic [1:0] R_ACC = 2'd0, R_X = 2'd1, R_S = 2'd2, R_PC = 2'd3;
  localparam logic [5:0] I_NONE = 6'b000000;     // {ACC, X, S, PC, Inc_PC, MAR}
  localparam logic [5:0] I_ACC = 6'b100000, I_X = 6'b010000, I_S = 6'b001000,
                         I_PC = 6'b000100, I_INC = 6'b000010, I_MAR = 6'b000001;
  localparam logic [2:0] X_NONE = 3'b000, X_MW = 3'b100, X_P1 = 3'b010, X_AS = 3'b001;
  localparam logic [3:0] U_NONE = 4'b0000, U_CVNZ = 4'b1111, U_VNZ = 4'b0111,
                         U_CNZ = 4'b1011, U_NZ = 4'b0011;

  function automatic nano_word_t nw(input logic [4:0] m, input logic [1:0] ro, input logic [5:0] ri,
                                    input logic [5:0] f, input logic [2:0] x, input logic [3:0] u);
    return nano_word_t'({m, ro, ri, f, x, u});
  endfunction

  // one microinstruction before nanoword sharing: {nanoword, jump, cond}
  function automatic logic [NW_W+UA_W+3:0] mi(input nano_word_t w, input int jump, input ucond_e c);
    return {w, UA_W'(jump), c};
  endfunction

  // The microprogram, as the image loaded into the two control stores:
  // bits [256*UW_W-1:0] hold microwords 0..255, the bits above hold nanowords
  // 0..63.  Identical nanowords are stored once.
  function automatic logic [IMG_W-1:0] build_image();
    logic [NW_W+UA_W+3:0] e [1 << UA_W];
    logic [NW_W-1:0]      nano [1 << NA_W];
    logic [IMG_W-1:0]     img;
    int                   lo, n_nano;
    logic [5:0]           af [7];
    logic [2:0]           ax [7];
    logic [3:0]           au [7];
    logic [5:0]           dest_ri [3];
    logic [1:0]           src_ro [3];
    logic [5:0]           inh_f [10];
    logic [2:0]           inh_x [10];
    logic [3:0]           inh_u [10];
    int unsigned          bcc_op [10];
    ucond_e               bcc_not [10];
    int                   opm, ind, stk, r1, js2;

    af = '{ALU_ADD, ALU_SUB, ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_EOR};
    ax = '{X_NONE, X_P1, X_MW, X_MW, X_NONE, X_NONE, X_NONE};
    au = '{U_CVNZ, U_CVNZ, U_CVNZ, U_CVNZ, U_NZ, U_NZ, U_NZ};
    dest_ri = '{I_ACC, I_X, I_S};
    src_ro  = '{R_ACC, R_X, R_S};
    inh_f = '{ALU_CLR, ALU_PASSA, ALU_DECA, ALU_NEG, ALU_COM, ALU_SHL, ALU_SHR, ALU_SHR, ALU_SHL, ALU_SHR};
    inh_x = '{X_NONE, X_P1, X_NONE, X_P1, X_NONE, X_NONE, X_NONE, X_AS, X_MW, X_MW};
    inh_u = '{U_CVNZ, U_VNZ, U_VNZ, U_CVNZ, U_NZ, U_CNZ, U_CNZ, U_CNZ, U_CNZ, U_CNZ};
    bcc_op  = '{'h73, 'h75, 'h77, 'h79, 'h7B, 'h7D, 'h0A, 'h0C, 'h0E, 'h1A};
    // condition under which each branch is NOT taken: BCC BCS BVC BVS BEQ BNE BLT BGE BGT BLE
    bcc_not = '{UC_JC, UC_JNC, UC_JV, UC_JNV, UC_JNZ, UC_JZ, UC_JGE, UC_JLT, UC_JLE, UC_JGT};

    // every address defaults to a no-operation that returns to the fetch
    for (int a = 0; a < (1 << UA_W); a++) e[a] = mi('0, 0, UC_JUMP);

    // fetch: IR <- mem[PC], PC <- PC + 1, continue at {1, opcode}
    e[0] = mi(nw(M_FETCH, R_ACC, I_INC, ALU_ADD, X_NONE, U_NONE), 0, UC_DISPATCH);
    lo = 1;

    // inherent operations on ACC
    for (int k = 0; k < 10; k++)
      e[128 + k] = mi(nw(M_NONE, R_ACC, I_ACC, inh_f[k], inh_x[k], inh_u[k]), 0, UC_JUMP);

    // two-operand ALU instructions: ACC <- ACC op operand
    for (int i = 0; i < 7; i++) begin
      opm = lo; ind = lo + 1; stk = lo + 2; lo += 3;
      e[opm] = mi(nw(M_RD_MAR, R_ACC, I_ACC, af[i], ax[i], au[i]), 0, UC_JUMP);
      e[ind] = mi(nw(M_RD_MAR, R_ACC, I_MAR, ALU_PASSB, X_NONE, U_NONE), opm, UC_JUMP);
      e[stk] = mi(nw(M_NONE, R_S, I_S, ALU_PASSA, X_P1, U_NONE), opm, UC_JUMP);
      e[128 + OPB_IMM + i]    = mi(nw(M_RD_PC, R_ACC, I_ACC | I_INC, af[i], ax[i], au[i]), 0, UC_JUMP);
      e[128 + OPB_DIR + i]    = mi(nw(M_RD_PC, R_ACC, I_MAR | I_INC, ALU_PASSB, X_NONE, U_NONE), opm, UC_JUMP);
      e[128 + OPB_IND + i]    = mi(nw(M_RD_PC, R_ACC, I_MAR | I_INC, ALU_PASSB, X_NONE, U_NONE), ind, UC_JUMP);
      e[128 + OPB_IDX + i]    = mi(nw(M_RD_PC, R_X, I_MAR | I_INC, ALU_ADD, X_NONE, U_NONE), opm, UC_JUMP);
      e[128 + OPB_IDXIND + i] = mi(nw(M_RD_PC, R_X, I_MAR | I_INC, ALU_ADD, X_NONE, U_NONE), ind, UC_JUMP);
      e[128 + OPB_STK + i]    = mi(nw(M_NONE, R_S, I_MAR, ALU_PASSA, X_NONE, U_NONE), stk, UC_JUMP);
    end

    // loads LDA, LDX, LDS (no LDX indexed, no LDS stack)
    for (int r = 0; r < 3; r++) begin
      opm = lo; ind = lo + 1; lo += 2;
      e[opm] = mi(nw(M_RD_MAR, R_ACC, dest_ri[r], ALU_PASSB, X_NONE, U_NZ), 0, UC_JUMP);
      e[ind] = mi(nw(M_RD_MAR, R_ACC, I_MAR, ALU_PASSB, X_NONE, U_NONE), opm, UC_JUMP);
      e[128 + OPB_IMM + 7 + r] = mi(nw(M_RD_PC, R_ACC, dest_ri[r] | I_INC, ALU_PASSB, X_NONE, U_NZ), 0, UC_JUMP);
      e[128 + OPB_DIR + 7 + r] = mi(nw(M_RD_PC, R_ACC, I_MAR | I_INC, ALU_PASSB, X_NONE, U_NONE), opm, UC_JUMP);
      e[128 + OPB_IND + 7 + r] = mi(nw(M_RD_PC, R_ACC, I_MAR | I_INC, ALU_PASSB, X_NONE, U_NONE), ind, UC_JUMP);
      if (r != 1)
        e[128 + OPB_IDX + 7 + r] = mi(nw(M_RD_PC, R_X, I_MAR | I_INC, ALU_ADD, X_NONE, U_NONE), opm, UC_JUMP);
      e[128 + OPB_IDXIND + 7 + r] = mi(nw(M_RD_PC, R_X, I_MAR | I_INC, ALU_ADD, X_NONE, U_NONE), ind, UC_JUMP);
      if (r != 2) begin
        stk = lo; lo += 1;
        e[stk] = mi(nw(M_NONE, R_S, I_S, ALU_PASSA, X_P1, U_NONE), opm, UC_JUMP);
        e[128 + OPB_STK + 7 + r] = mi(nw(M_NONE, R_S, I_MAR, ALU_PASSA, X_NONE, U_NONE), stk, UC_JUMP);
      end
    end

    // stores STA (all modes), STX (direct, indirect, push), STS (all but push)
    for (int r = 0; r < 3; r++) begin
      opm = lo; ind = lo + 1; lo += 2;
      e[opm] = mi(nw(M_WR_MAR, src_ro[r], I_NONE, ALU_ADD, X_NONE, U_NONE), 0, UC_JUMP);
      e[ind] = mi(nw(M_RD_MAR, R_ACC, I_MAR, ALU_PASSB, X_NONE, U_NONE), opm, UC_JUMP);
      e[128 + OPB_DIR + 10 + r] = mi(nw(M_RD_PC, R_ACC, I_MAR | I_INC, ALU_PASSB, X_NONE, U_NONE), opm, UC_JUMP);
      e[128 + OPB_IND + 10 + r] = mi(nw(M_RD_PC, R_ACC, I_MAR | I_INC, ALU_PASSB, X_NONE, U_NONE), ind, UC_JUMP);
      if (r != 1) begin
        e[128 + OPB_IDX + 10 + r]    = mi(nw(M_RD_PC, R_X, I_MAR | I_INC, ALU_ADD, X_NONE, U_NONE), opm, UC_JUMP);
        e[128 + OPB_IDXIND + 10 + r] = mi(nw(M_RD_PC, R_X, I_MAR | I_INC, ALU_ADD, X_NONE, U_NONE), ind, UC_JUMP);
      end
      if (r != 2)
        e[128 + OPB_STK + 10 + r] = mi(nw(M_NONE, R_S, I_S | I_MAR, ALU_DECA, X_NONE, U_NONE), opm, UC_JUMP);
    end

    // JMP
    e[128 + OP_JMP_DIR] = mi(nw(M_RD_PC, R_ACC, I_PC, ALU_PASSB, X_NONE, U_NONE), 0, UC_JUMP);
    e[lo] = mi(nw(M_RD_MAR, R_ACC, I_PC, ALU_PASSB, X_NONE, U_NONE), 0, UC_JUMP);
    e[128 + OP_JMP_IND] = mi(nw(M_RD_PC, R_ACC, I_MAR, ALU_PASSB, X_NONE, U_NONE), lo, UC_JUMP);
    lo += 1;

    // JSR: push the return address, point MAR back at the operand, then jump
    js2 = lo; lo += 1;
    e[js2] = mi(nw(M_RD_MAR, R_ACC, I_PC, ALU_PASSB, X_NONE, U_NONE), 0, UC_JUMP);
    e[lo]  = mi(nw(M_WR_MAR, R_PC, I_MAR, ALU_DECA, X_NONE, U_NONE), js2, UC_JUMP);
    e[128 + OP_JSR_DIR] = mi(nw(M_NONE, R_S, I_S | I_MAR | I_INC, ALU_DECA, X_NONE, U_NONE), lo, UC_JUMP);
    lo += 1;
    e[lo] = mi(nw(M_RD_MAR, R_ACC, I_MAR, ALU_PASSB, X_NONE, U_NONE), js2, UC_JUMP);
    e[lo + 1] = mi(nw(M_WR_MAR, R_PC, I_MAR, ALU_DECA, X_NONE, U_NONE), lo, UC_JUMP);
    e[128 + OP_JSR_IND] = mi(nw(M_NONE, R_S, I_S | I_MAR | I_INC, ALU_DECA, X_NONE, U_NONE), lo + 1, UC_JUMP);
    lo += 2;

    // BSR: as JSR, then PC <- PC + offset
    e[lo] = mi(nw(M_RD_MAR, R_PC, I_PC, ALU_ADD, X_NONE, U_NONE), 0, UC_JUMP);
    e[lo + 1] = mi(nw(M_WR_MAR, R_PC, I_MAR, ALU_DECA, X_NONE, U_NONE), lo, UC_JUMP);
    e[128 + OP_BSR] = mi(nw(M_NONE, R_S, I_S | I_MAR | I_INC, ALU_DECA, X_NONE, U_NONE), lo + 1, UC_JUMP);
    lo += 2;

    // RTS: MAR <- S, S <- S + 1, PC <- mem[MAR]
    r1 = lo; lo += 2;
    e[r1 + 1] = mi(nw(M_RD_MAR, R_ACC, I_PC, ALU_PASSB, X_NONE, U_NONE), 0, UC_JUMP);
    e[r1]     = mi(nw(M_NONE, R_S, I_S, ALU_PASSA, X_P1, U_NONE), r1 + 1, UC_JUMP);
    e[128 + OP_RTS] = mi(nw(M_NONE, R_S, I_MAR, ALU_PASSA, X_NONE, U_NONE), r1, UC_JUMP);

    // BRA, BRN
    e[128 + OP_BRA] = mi(nw(M_RD_PC, R_PC, I_PC, ALU_ADD, X_P1, U_NONE), 0, UC_JUMP);
    e[128 + OP_BRN] = mi(nw(M_NONE, R_ACC, I_INC, ALU_ADD, X_NONE, U_NONE), 0, UC_JUMP);

    // conditional branches: MAR <- PC, PC <- PC + 1, back to fetch unless
    // taken; the taken step PC <- PC + mem[MAR] is the next micro-address
    for (int b = 0; b < 10; b++) begin
      e[128 + bcc_op[b]]     = mi(nw(M_NONE, R_PC, I_MAR | I_INC, ALU_PASSA, X_NONE, U_NONE), 0, bcc_not[b]);
      e[128 + bcc_op[b] + 1] = mi(nw(M_RD_MAR, R_PC, I_PC, ALU_ADD, X_NONE, U_NONE), 0, UC_JUMP);
    end

    // share identical nanowords; nanoword 0 is the all-zero no-operation
    foreach (nano[k]) nano[k] = '0;
    n_nano = 1;
    img = '0;
    for (int a = 0; a < (1 << UA_W); a++) begin
      logic [NW_W-1:0] w;
      int idx;
      w = e[a][NW_W+UA_W+3:UA_W+4];
      idx = -1;
      for (int k = 0; k < n_nano; k++) if (idx < 0 && nano[k] == w) idx = k;
      if (idx < 0) begin
        idx = n_nano;
        if (n_nano < (1 << NA_W)) begin
          nano[n_nano] = w;
          n_nano++;
        end
      end
      img[a*UW_W +: UW_W] = {NA_W'(idx), e[a][UA_W+3:0]};
    end
    for (int k = 0; k < (1 << NA_W); k++)
      img[(1 << UA_W)*UW_W + k*NW_W +: NW_W] = nano[k];
    return img;
  endfunction

endpackage
