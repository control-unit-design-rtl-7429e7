// Test support for the SPARC-subset processor: instruction encoders (a small
// assembler) and an instruction-level reference model with its own register
// file, flags and memory, written from the instruction definitions and not
// from the RTL.  The model also counts the cycles each instruction should take
// (3 for ALU, shift, SETHI and unknown, 2 for Bicc, 4 for LD/ST, 3 for CALL
// and JMPL).
package risc_tb_pkg;

  localparam int unsigned MEMW = 1 << 12;   // words the model keeps (16 KByte)

  // ---- encoders -------------------------------------------------------------
  function automatic logic [31:0] alu_r(input logic [5:0] op3, input int rd, rs1, rs2);
    return {2'b10, 5'(rd), op3, 5'(rs1), 1'b0, 8'b0, 5'(rs2)};
  endfunction
  function automatic logic [31:0] alu_i(input logic [5:0] op3, input int rd, rs1, simm);
    return {2'b10, 5'(rd), op3, 5'(rs1), 1'b1, 13'(simm)};
  endfunction
  function automatic logic [31:0] ld_i(input int rd, rs1, simm);
    return {2'b11, 5'(rd), 6'b000000, 5'(rs1), 1'b1, 13'(simm)};
  endfunction
  function automatic logic [31:0] ld_r(input int rd, rs1, rs2);
    return {2'b11, 5'(rd), 6'b000000, 5'(rs1), 1'b0, 8'b0, 5'(rs2)};
  endfunction
  function automatic logic [31:0] st_i(input int rd, rs1, simm);
    return {2'b11, 5'(rd), 6'b000100, 5'(rs1), 1'b1, 13'(simm)};
  endfunction
  function automatic logic [31:0] sethi(input int rd, input logic [21:0] imm22);
    return {2'b00, 5'(rd), 3'b100, imm22};
  endfunction
  function automatic logic [31:0] bicc(input logic [3:0] cond, input int disp_words);
    return {2'b00, 1'b0, cond, 3'b010, 22'(disp_words)};
  endfunction
  function automatic logic [31:0] call(input int disp_words);
    return {2'b01, 30'(disp_words)};
  endfunction
  function automatic logic [31:0] jmpl_i(input int rd, rs1, simm);
    return {2'b10, 5'(rd), 6'b111000, 5'(rs1), 1'b1, 13'(simm)};
  endfunction

  localparam logic [31:0] HALT = {2'b00, 1'b0, 4'b1000, 3'b010, 22'd0};  // BA .

  // ---- reference model ------------------------------------------------------
  class risc_model;
    logic [31:0] r [32];
    logic [31:0] mem [MEMW];
    logic [31:0] pc;
    logic        c, v, n, z;
    longint      cycles;
    int          n_alu, n_cc, n_shift, n_sethi, n_ld, n_st, n_call, n_jmpl,
                 n_br_taken, n_br_not, n_addx, n_r0_dest;

    function new();
      foreach (r[i]) r[i] = 0;
      foreach (mem[i]) mem[i] = 0;
      pc = 0; {c, v, n, z} = 0; cycles = 0;
      n_alu = 0; n_cc = 0; n_shift = 0; n_sethi = 0; n_ld = 0; n_st = 0; n_call = 0;
      n_jmpl = 0; n_br_taken = 0; n_br_not = 0; n_addx = 0; n_r0_dest = 0;
    endfunction

    function void wr(input logic [4:0] a, input logic [31:0] d);
      if (a != 0) r[a] = d;
    endfunction

    function logic cond_true(input logic [3:0] cd);
      logic t;
      case (cd[2:0])
        3'd0: t = 0;
        3'd1: t = z;
        3'd2: t = z || (n != v);
        3'd3: t = (n != v);
        3'd4: t = c || z;
        3'd5: t = c;
        3'd6: t = n;
        default: t = v;
      endcase
      return cd[3] ? !t : t;
    endfunction

    // run one instruction; returns 1 when it is the halt loop
    function bit step();
      logic [31:0] ir, a, b, res, addr;
      logic [4:0]  rd;
      logic [5:0]  op3;
      ir  = mem[pc[13:2]];
      if (ir == HALT) return 1;
      rd  = ir[29:25];
      op3 = ir[24:19];
      a   = r[ir[18:14]];
      b   = ir[13] ? {{19{ir[12]}}, ir[12:0]} : r[ir[4:0]];
      case (ir[31:30])
        2'b00: begin
          if (ir[24:22] == 3'b010) begin
            cycles += 2;
            if (cond_true(ir[28:25])) begin
              n_br_taken++;
              pc = pc + ({{10{ir[21]}}, ir[21:0]} << 2);
            end else begin
              n_br_not++;
              pc = pc + 4;
            end
            return 0;
          end else if (ir[24:22] == 3'b100) begin
            n_sethi++;
            wr(rd, {ir[21:0], 10'b0});
          end
          cycles += 3; pc = pc + 4;
        end
        2'b01: begin
          n_call++;
          cycles += 3;
          wr(5'd15, pc);
          pc = pc + {ir[29:0], 2'b00};
          return 0;
        end
        2'b10: begin
          if (op3[5] == 0) begin
            logic [32:0] w; logic cin, co, vo;
            cin = op3[3] ? c : 1'b0;
            co = 0; vo = 0;
            n_alu++;
            if (op3[3]) n_addx++;
            if (rd == 0) n_r0_dest++;
            case (op3[2:0])
              3'b000: begin w = 33'(a) + 33'(b) + 33'(cin); res = w[31:0]; co = w[32];
                            vo = (a[31] == b[31]) && (res[31] != a[31]); end
              3'b100: begin res = a - b - 32'(cin); co = (33'(a) < 33'(b) + 33'(cin));
                            vo = (a[31] != b[31]) && (res[31] != a[31]); end
              3'b001: res = a & b;
              3'b010: res = a | b;
              3'b011: res = a ^ b;
              3'b101: res = a & ~b;
              3'b110: res = a | ~b;
              default: res = a ^ ~b;
            endcase
            if (op3[4]) begin
              n_cc++;
              c = co; v = vo; n = res[31]; z = (res == 0);
            end
            wr(rd, res);
            cycles += 3; pc = pc + 4;
          end else if (op3[5:2] == 4'b1001 && op3[1:0] != 0) begin
            n_shift++;
            case (op3[1:0])
              2'b01: res = a << b[4:0];
              2'b10: res = a >> b[4:0];
              default: res = 32'($signed(a) >>> b[4:0]);
            endcase
            wr(rd, res);
            cycles += 3; pc = pc + 4;
          end else if (op3 == 6'b111000) begin
            n_jmpl++;
            cycles += 3;
            wr(rd, pc);
            pc = a + b;
          end else begin
            cycles += 3; pc = pc + 4;
          end
        end
        default: begin
          addr = a + b;
          if (op3 == 6'b000000) begin
            n_ld++;
            wr(rd, mem[addr[13:2]]);
            cycles += 4;
          end else if (op3 == 6'b000100) begin
            n_st++;
            mem[addr[13:2]] = r[rd];
            cycles += 4;
          end else begin
            cycles += 3;
          end
          pc = pc + 4;
        end
      endcase
      return 0;
    endfunction
  endclass

  // A random program of about n_instr instructions in words 0..511: ALU and
  // shift operations on random registers and immediates, SETHI, loads and
  // stores to the data area (bytes 0x800..0xFFC), short forward branches and
  // CALLs on random conditions, ending in HALT words.
  function automatic void random_program(ref logic [31:0] img [MEMW], input int n_instr);
    logic [5:0] alu_ops [10] = '{6'b000000, 6'b000001, 6'b000010, 6'b000011, 6'b000100,
                                 6'b000101, 6'b000110, 6'b000111, 6'b001000, 6'b001100};
    int i;
    for (int k = 0; k < MEMW; k++) img[k] = (k >= 512 && k < 1024) ? $urandom : 32'h0;
    i = 0;
    while (i < n_instr) begin
      int kind, rd, rs1, rs2;
      logic [5:0] op;
      kind = $urandom_range(99);
      rd   = $urandom_range(31);
      rs1  = $urandom_range(31);
      rs2  = $urandom_range(31);
      if (kind < 45) begin
        op = alu_ops[$urandom_range(9)] | ($urandom_range(1) ? 6'b010000 : 6'b0);
        img[i] = $urandom_range(1) ? alu_r(op, rd, rs1, rs2)
                                   : alu_i(op, rd, rs1, int'($urandom_range(8191)) - 4096);
      end else if (kind < 55) begin
        op = {4'b1001, 2'($urandom_range(2) + 1)};
        img[i] = $urandom_range(1) ? alu_r(op, rd, rs1, rs2) : alu_i(op, rd, rs1, $urandom_range(31));
      end else if (kind < 62) begin
        img[i] = sethi(rd, 22'($urandom));
      end else if (kind < 72) begin
        img[i] = ld_i(rd, 0, 2048 + 4 * $urandom_range(511));
      end else if (kind < 82) begin
        img[i] = st_i(rd, 0, 2048 + 4 * $urandom_range(511));
      end else if (kind < 96) begin
        img[i] = bicc(4'($urandom_range(15)), $urandom_range(3) + 1);
      end else begin
        img[i] = call($urandom_range(3) + 1);
      end
      i++;
    end
    for (int k = i; k < i + 8; k++) img[k] = HALT;
  endfunction

endpackage
