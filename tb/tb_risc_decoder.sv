// Self-checking test of risc_decoder: random instructions of every class in
// every sequencer state, with the branch condition both ways.  Each cycle's
// control word is checked against the register-transfer it must perform
// (which unit drives S1, S2 and Dest, which register addresses are used,
// which of register/PC/MAR/IR load, RAM OE/WR, and the ALU function).
module tb_risc_decoder;
  import risc_pkg::*;
  import risc_tb_pkg::*;

  logic [31:0] ir;
  seq_state_e  state;
  logic        taken;
  ctrl_t       ctl, e;
  int checks = 0, failures = 0;

  risc_decoder dut (.ir, .state, .taken, .ctl);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the fields that matter in a cycle; the rest must be don't-care
  function automatic bit same(input ctrl_t a, b);
    if (a.reg_we != b.reg_we || a.pc_load != b.pc_load || a.mar_load != b.mar_load ||
        a.ir_load != b.ir_load || a.mem_oe != b.mem_oe || a.mem_wr != b.mem_wr) return 0;
    if (a.alu_f[4] != b.alu_f[4]) return 0;                       // flags written
    if (a.reg_we && a.wa != b.wa) return 0;
    if (a.reg_we || a.pc_load || a.mar_load || a.ir_load || a.mem_wr) begin
      if (a.dest_sel != b.dest_sel) return 0;
      if (a.dest_sel == DEST_ALU || a.dest_sel == DEST_SHIFT) begin
        if (a.s1_sel != b.s1_sel || a.s2_is_imm != b.s2_is_imm) return 0;
        if (a.s1_sel == S1_REG && a.ra1 != b.ra1) return 0;
        if (a.s2_is_imm && a.imm_sel != b.imm_sel) return 0;
        if (!a.s2_is_imm && a.ra2 != b.ra2) return 0;
        if (a.dest_sel == DEST_ALU && a.alu_f != b.alu_f) return 0;
        if (a.dest_sel == DEST_SHIFT && a.shift_op != b.shift_op) return 0;
      end
    end
    return 1;
  endfunction

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int k;
      logic [4:0] rd, rs1, rs2;
      logic       i;
      k = $urandom_range(8);
      rd = 5'($urandom); rs1 = 5'($urandom); rs2 = 5'($urandom);
      i = 1'($urandom);
      case (k)
        0: ir = {2'b10, rd, 1'b0, 5'($urandom), rs1, i, 8'($urandom), rs2};     // ALU
        1: ir = {2'b10, rd, 4'b1001, 2'($urandom_range(2) + 1), rs1, i, 8'($urandom), rs2};
        2: ir = {2'b00, rd, 3'b100, 22'($urandom)};                              // SETHI
        3: ir = {2'b00, 1'b0, 4'($urandom), 3'b010, 22'($urandom)};              // Bicc
        4: ir = {2'b01, 30'($urandom)};                                          // CALL
        5: ir = {2'b10, rd, 6'b111000, rs1, i, 8'($urandom), rs2};               // JMPL
        6: ir = {2'b11, rd, 6'b000000, rs1, i, 8'($urandom), rs2};               // LD
        7: ir = {2'b11, rd, 6'b000100, rs1, i, 8'($urandom), rs2};               // ST
        default: ir = {2'b11, rd, 6'b111111, rs1, i, 8'($urandom), rs2};         // unknown
      endcase
      state = seq_state_e'($urandom_range(3));
      taken = 1'($urandom);
      e = '0;
      e.alu_f = F_ADD; e.dest_sel = DEST_ALU; e.s1_sel = S1_REG;
      e.ra1 = rs1; e.ra2 = rs2; e.wa = rd; e.s2_is_imm = i; e.imm_sel = IMM_SIMM13;
      case (state)
        ST_NEXT:  begin e.s1_sel = S1_PC; e.s2_is_imm = 1; e.imm_sel = IMM_FOUR;
                        e.pc_load = 1; e.mar_load = 1; end
        ST_FETCH: begin e.dest_sel = DEST_MEM; e.mem_oe = 1; e.ir_load = 1; end
        ST_EX1: case (k)
          0: begin e.alu_f = ir[23:19]; e.reg_we = 1; end
          1: begin e.dest_sel = DEST_SHIFT; e.shift_op = ir[20:19]; e.reg_we = 1; end
          2: begin e.ra1 = 0; e.s2_is_imm = 1; e.imm_sel = IMM_HI22; e.reg_we = 1; end
          3: begin e.s1_sel = S1_PC; e.s2_is_imm = 1; e.imm_sel = taken ? IMM_DISP22 : IMM_FOUR;
                   e.pc_load = 1; e.mar_load = 1; end
          4: begin e.s1_sel = S1_PC; e.s2_is_imm = 1; e.imm_sel = IMM_ZERO; e.reg_we = 1; e.wa = 15; end
          5: begin e.s1_sel = S1_PC; e.s2_is_imm = 1; e.imm_sel = IMM_ZERO; e.reg_we = 1; end
          6, 7: e.mar_load = 1;
          default: ;
        endcase
        default: case (k)
          6: begin e.dest_sel = DEST_MEM; e.mem_oe = 1; e.reg_we = 1; end
          7: begin e.ra1 = 0; e.ra2 = rd; e.s2_is_imm = 0; e.alu_f = F_OR; e.mem_wr = 1; end
          4: begin e.s1_sel = S1_PC; e.s2_is_imm = 1; e.imm_sel = IMM_DISP30; e.pc_load = 1; e.mar_load = 1; end
          5: begin e.pc_load = 1; e.mar_load = 1; end
          default: ;
        endcase
      endcase
      #1;
      checks++;
      if (!same(ctl, e) || !same(e, ctl)) begin
        failures++;
        if (failures < 10) $display("class %0d state %0d ir %h: got %p exp %p", k, state, ir, ctl, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
