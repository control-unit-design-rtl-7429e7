// Test support for the accumulator machine: opcode names and an
// instruction-level reference model (registers ACC, X, S, PC, flags
// {C, V, N, Z} and a 256-byte memory) written from the instruction list, not
// from the microprogram.  step() executes one instruction and returns the
// number of clock cycles it should take, including the fetch cycle:
//   inherent 2, immediate 2, direct 3, indirect 4, indexed 3,
//   indexed indirect 4, stack pull 4, push 3, BRA/BRN 2, conditional branch
//   2 (not taken) or 3 (taken), BSR 4, JMP 2 / 3, JSR 4 / 5, RTS 4, unused 2.
// The model also counts how often each mechanism was exercised.
package cisc_tb_pkg;

  // inherent
  localparam byte CLR = 8'h00, INC = 8'h01, DEC = 8'h02, NEG = 8'h03, COM = 8'h04,
                  LSL = 8'h05, LSR = 8'h06, ASR = 8'h07, ROL = 8'h08, ROR = 8'h09;
  // mode bases and operation offsets
  localparam byte IMM = 8'h10, DIR = 8'h20, IND = 8'h30, IDX = 8'h40, IDXI = 8'h50, STK = 8'h60;
  localparam byte ADD = 0, SUB = 1, ADC = 2, SBC = 3, AND_ = 4, OR_ = 5, EOR = 6,
                  LDA = 7, LDX = 8, LDS = 9, STA = 10, STX = 11, STS = 12;
  localparam byte JMP_D = 8'h2D, JMP_I = 8'h3D, JSR_D = 8'h2E, JSR_I = 8'h3E, RTS = 8'h6F;
  localparam byte BRA = 8'h70, BRN = 8'h71, BSR = 8'h72, BCC = 8'h73, BCS = 8'h75,
                  BVC = 8'h77, BVS = 8'h79, BEQ = 8'h7B, BNE = 8'h7D, BLT = 8'h0A,
                  BGE = 8'h0C, BGT = 8'h0E, BLE = 8'h1A;

  // codes whose micro-address holds the second step of a conditional branch
  function automatic bit reserved(input byte op);
    byte o;
    o = op & 8'h7F;
    return o inside {8'h0B, 8'h0D, 8'h0F, 8'h1B, 8'h74, 8'h76, 8'h78, 8'h7A, 8'h7C, 8'h7E};
  endfunction

  // does this mode/offset pair exist in the instruction set?
  function automatic bit exists(input byte mode, input byte i);
    case (mode)
      IMM:  return i <= LDS;
      DIR, IND: return i <= STS;
      IDX:  return i <= STS && i != LDX && i != STX;
      IDXI: return i <= STS && i != STX;
      STK:  return i <= STX && i != LDS;
      default: return 0;
    endcase
  endfunction

  class cisc_model;
    logic [7:0] acc, x, s, pc;
    bit         c, v, n, z;
    logic [7:0] mem [256];
    int         n_instr, n_inh, n_alu, n_load, n_store, n_jmp, n_jsr, n_rts,
                n_bra, n_taken, n_not_taken, n_nop;
    int         n_mode [8];

    function new();
      acc = 0; x = 0; s = 0; pc = 0; {c, v, n, z} = 4'b0000;
      foreach (mem[k]) mem[k] = 8'h00;
      n_instr = 0; n_inh = 0; n_alu = 0; n_load = 0; n_store = 0; n_jmp = 0;
      n_jsr = 0; n_rts = 0; n_bra = 0; n_taken = 0; n_not_taken = 0; n_nop = 0;
      foreach (n_mode[k]) n_mode[k] = 0;
    endfunction

    function logic [3:0] flags();
      return {c, v, n, z};
    endfunction

    function void nz(input logic [7:0] r);
      n = r[7];
      z = (r == 8'h00);
    endfunction

    function void push(input logic [7:0] d);
      s = s - 8'd1;
      mem[s] = d;
    endfunction

    // two-operand ALU operation on ACC
    function void alu(input byte i, input logic [7:0] b);
      logic [8:0] t;
      logic [7:0] r;
      case (i)
        ADD, ADC: begin
          t = {1'b0, acc} + {1'b0, b} + ((i == ADC) ? {8'h00, c} : 9'h000);
          r = t[7:0];
          c = t[8];
          v = (acc[7] == b[7]) && (r[7] != acc[7]);
        end
        SUB, SBC: begin
          t = {1'b0, acc} - {1'b0, b} - ((i == SBC) ? {8'h00, c} : 9'h000);
          r = t[7:0];
          c = t[8];
          v = (acc[7] != b[7]) && (r[7] != acc[7]);
        end
        AND_: r = acc & b;
        OR_:  r = acc | b;
        default: r = acc ^ b;
      endcase
      acc = r;
      nz(r);
    endfunction

    function bit cond(input byte op);
      case (op)
        BCC: return !c;
        BCS: return c;
        BVC: return !v;
        BVS: return v;
        BEQ: return z;
        BNE: return !z;
        BLT: return n ^ v;
        BGE: return !(n ^ v);
        BGT: return !z && !(n ^ v);
        default: return z || (n ^ v);   // BLE
      endcase
    endfunction

    // Executes one instruction; returns its cycle count, or 0 for a
    // reserved code (the caller stops there).
    function int step();
      byte        op, mode, i;
      logic [7:0] opd, ea, r, ret;
      int         cyc;
      op = byte'(mem[pc]) & 8'h7F;
      if (reserved(op)) return 0;
      n_instr++;
      pc = pc + 8'd1;
      opd = mem[pc];
      mode = op & 8'h70;
      i = op & 8'h0F;
      if (op <= ROR) begin
        n_inh++;
        case (op)
          CLR: begin r = 0; c = 0; v = 0; end
          INC: begin r = acc + 8'd1; v = (acc == 8'h7F); end
          DEC: begin r = acc - 8'd1; v = (acc == 8'h80); end
          NEG: begin r = -acc; c = (acc != 0); v = (acc == 8'h80); end
          COM: r = ~acc;
          LSL: begin r = acc << 1; c = acc[7]; end
          LSR: begin r = acc >> 1; c = acc[0]; end
          ASR: begin r = {acc[7], acc[7:1]}; c = acc[0]; end
          ROL: begin r = {acc[6:0], c}; c = acc[7]; end
          default: begin r = {c, acc[7:1]}; c = acc[0]; end
        endcase
        acc = r;
        nz(r);
        return 2;
      end
      if (op inside {BCC, BCS, BVC, BVS, BEQ, BNE, BLT, BGE, BGT, BLE}) begin
        pc = pc + 8'd1;
        if (cond(op)) begin
          pc = pc + opd;
          n_taken++;
          return 3;
        end
        n_not_taken++;
        return 2;
      end
      case (op)
        BRA: begin n_bra++; pc = pc + 8'd1 + opd; return 2; end
        BRN: begin n_bra++; pc = pc + 8'd1; return 2; end
        BSR: begin
          n_jsr++;
          ret = pc + 8'd1;
          push(ret);
          pc = ret + mem[ret - 8'd1];
          return 4;
        end
        JMP_D: begin n_jmp++; pc = opd; return 2; end
        JMP_I: begin n_jmp++; pc = mem[opd]; return 3; end
        JSR_D: begin
          n_jsr++;
          ret = pc + 8'd1;
          push(ret);
          pc = mem[ret - 8'd1];
          return 4;
        end
        JSR_I: begin
          n_jsr++;
          ret = pc + 8'd1;
          push(ret);
          pc = mem[mem[ret - 8'd1]];
          return 5;
        end
        RTS: begin
          n_rts++;
          pc = mem[s];
          s = s + 8'd1;
          return 4;
        end
        default: ;
      endcase
      if (!exists(mode, i)) begin
        n_nop++;
        return 2;
      end
      n_mode[mode >> 4]++;
      // effective address (stores use ea; immediate uses the operand)
      case (mode)
        IMM:  begin pc = pc + 8'd1; ea = pc - 8'd1; cyc = 2; end
        DIR:  begin pc = pc + 8'd1; ea = opd; cyc = 3; end
        IND:  begin pc = pc + 8'd1; ea = mem[opd]; cyc = 4; end
        IDX:  begin pc = pc + 8'd1; ea = x + opd; cyc = 3; end
        IDXI: begin pc = pc + 8'd1; ea = mem[8'(x + opd)]; cyc = 4; end
        default: begin                        // stack
          if (i >= STA) begin s = s - 8'd1; ea = s; cyc = 3; end
          else begin ea = s; s = s + 8'd1; cyc = 4; end
        end
      endcase
      if (i <= EOR) begin
        n_alu++;
        alu(i, mem[ea]);
      end else if (i <= LDS) begin
        n_load++;
        r = mem[ea];
        nz(r);
        case (i)
          LDA: acc = r;
          LDX: x = r;
          default: s = r;
        endcase
      end else begin
        n_store++;
        mem[ea] = (i == STA) ? acc : (i == STX) ? x : s;
      end
      return cyc;
    endfunction
  endclass

  // A random program: valid instructions with random operands filling code
  // space [0, 0x7E), then BRA to itself.  Data space [0x80, 0x100) gets
  // random bytes that are not reserved codes, so a jump into data keeps
  // running.
  function automatic void random_program(ref logic [7:0] img [256]);
    int  a;
    byte mode, i, op;
    int  kind;
    foreach (img[k]) begin
      do img[k] = 8'($urandom); while (reserved(byte'(img[k])));
    end
    a = 0;
    while (a < 'h7E) begin
      kind = $urandom_range(0, 19);
      if (kind < 3) op = byte'($urandom_range(0, 9));
      else if (kind < 15) begin
        do begin
          mode = byte'($urandom_range(1, 6)) << 4;
          i = byte'($urandom_range(0, 12));
        end while (!exists(mode, i));
        op = mode | i;
      end else if (kind < 18) begin
        case ($urandom_range(0, 9))
          0: op = BCC; 1: op = BCS; 2: op = BVC; 3: op = BVS; 4: op = BEQ;
          5: op = BNE; 6: op = BLT; 7: op = BGE; 8: op = BGT; default: op = BLE;
        endcase
      end else begin
        case ($urandom_range(0, 7))
          0: op = BRA; 1: op = BRN; 2: op = BSR; 3: op = JMP_D; 4: op = JMP_I;
          5: op = JSR_D; 6: op = JSR_I; default: op = RTS;
        endcase
      end
      img[a] = op;
      if (op <= ROR || (op & 8'h70) == STK) a += 1;
      else begin
        img[a + 1] = 8'($urandom);
        a += 2;
      end
    end
    img[8'h7E] = BRA;
    img[8'h7F] = 8'hFE;
  endfunction

endpackage
