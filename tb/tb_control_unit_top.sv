// End-to-end test of control_unit_top at its default sizes.
//
// RISC side: programs are loaded through the RAM load port while in reset and
// run to their halt loop: a subroutine loop using CALL, JMPL, SUBCC and BNE,
// the arithmetic examples (SUBX, negation through R0, SETHI, a compare into
// R0, shifts) and random programs.  Registers, flags, the data area and the
// cycle count are compared with the reference model in risc_tb_pkg.
// Accumulator-machine side: after the control stores are loaded, a summing
// loop, a subroutine program and random programs run; at every fetch step the
// registers and flags, and each instruction's cycle count, are compared with
// the reference model in cisc_tb_pkg, and memory is compared at the end.
// Every mechanism (RISC: each instruction class, branch taken and not taken,
// flag updates, extended add/subtract, writes to R0; accumulator machine: each
// instruction class and addressing mode, branch taken and not taken; micro-PC:
// dispatch, jump, conditional jump taken and not taken) is counted and must
// occur.
module tb_control_unit_top;
  import risc_pkg::*;
  import ucode_pkg::*;
  import risc_tb_pkg::*;
  import cisc_tb_pkg::cisc_model, cisc_tb_pkg::BRA;

  logic        clk = 0, rst_n = 0;
  logic        load_we = 0;
  logic [27:0] load_addr = 0;
  logic [31:0] load_data = 0, risc_pc, risc_ir;
  logic [3:0]  risc_flags;
  seq_state_e  risc_state;
  logic        mc_load_we = 0, mc_booting;
  logic [7:0]  mc_load_addr = 0, mc_load_data = 0;
  logic [7:0]  mc_acc, mc_x, mc_s, mc_pc, mc_ir, mc_upc;
  logic [3:0]  mc_flags;
  cisc_ctl_t   mc_ctl;

  int checks = 0, failures = 0;
  int n_alu = 0, n_cc = 0, n_addx = 0, n_shift = 0, n_sethi = 0, n_ld = 0, n_st = 0,
      n_call = 0, n_jmpl = 0, n_bt = 0, n_bn = 0, n_r0 = 0;
  int u_disp = 0, u_jump = 0, u_cj_t = 0, u_cj_n = 0;
  int c_inh = 0, c_alu = 0, c_load = 0, c_store = 0, c_jmp = 0, c_jsr = 0, c_rts = 0,
      c_bra = 0, c_taken = 0, c_not = 0;
  int c_mode [8] = '{default: 0};
  logic [31:0] img [MEMW];
  logic [7:0]  cimg [256];

  control_unit_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_program(input string name);
    risc_model m = new();
    longint cyc;
    rst_n = 0;
    @(negedge clk);
    for (int k = 0; k < MEMW; k++) begin
      load_we = 1; load_addr = 28'(k); load_data = img[k]; m.mem[k] = img[k];
      @(negedge clk);
    end
    load_we = 0;
    while (!m.step()) ;
    rst_n = 1;
    cyc = 0;
    while (!(risc_state == ST_EX1 && risc_ir == HALT) && cyc < 100000) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == m.cycles + 1, $sformatf("%s cycles %0d exp %0d", name, cyc, m.cycles + 1));
    check(risc_pc == m.pc, $sformatf("%s pc", name));
    check(risc_flags == {m.c, m.v, m.n, m.z}, $sformatf("%s flags", name));
    for (int k = 0; k < 32; k++)
      check(dut.u_cpu.u_rf.regs[k] == m.r[k], $sformatf("%s R%0d", name, k));
    for (int k = 512; k < 1024; k++)
      check(dut.u_ram.mem[k] == m.mem[k], $sformatf("%s mem[%0d]", name, k));
    n_alu += m.n_alu; n_cc += m.n_cc; n_addx += m.n_addx; n_shift += m.n_shift;
    n_sethi += m.n_sethi; n_ld += m.n_ld; n_st += m.n_st; n_call += m.n_call;
    n_jmpl += m.n_jmpl; n_bt += m.n_br_taken; n_bn += m.n_br_not; n_r0 += m.n_r0_dest;
    $display("%s: %0d cycles", name, cyc);
  endtask

  // ---- accumulator machine ----
  task automatic run_cisc(input string name, input int max_instr);
    cisc_model m = new();
    int cyc, exp_cyc;
    logic [7:0] prev_upc;
    ucond_e     prev_cond;
    rst_n = 0;
    @(negedge clk);
    for (int k = 0; k < 256; k++) begin
      mc_load_we = 1; mc_load_addr = 8'(k); mc_load_data = cimg[k]; m.mem[k] = cimg[k];
      @(negedge clk);
    end
    mc_load_we = 0;
    rst_n = 1;
    while (mc_booting) @(negedge clk);
    exp_cyc = -1;
    cyc = 0;
    forever begin
      if (mc_upc == 0) begin
        if (exp_cyc >= 0)
          check(cyc == exp_cyc, $sformatf("%s: instr %0d took %0d cycles, expected %0d",
                                          name, m.n_instr, cyc, exp_cyc));
        check({mc_acc, mc_x, mc_s, mc_pc, mc_flags} == {m.acc, m.x, m.s, m.pc, m.flags()},
              $sformatf("%s: state after %0d instructions", name, m.n_instr));
        if (m.mem[m.pc] == BRA && m.mem[8'(m.pc + 1)] == 8'hFE) break;
        if (m.n_instr >= max_instr) break;
        exp_cyc = m.step();
        if (exp_cyc == 0) break;
        cyc = 0;
      end
      prev_upc = mc_upc;
      prev_cond = dut.u_mc.u_mc.uw.cond;
      @(negedge clk);
      cyc++;
      // classify the micro-PC step just taken
      if (prev_upc == 0) u_disp++;
      else if (prev_cond == UC_JUMP) u_jump++;
      if (prev_upc != 0 && prev_cond inside {[UC_JC:UC_JLE]}) begin
        if (mc_upc == 0) u_cj_t++;
        else u_cj_n++;
      end
    end
    for (int k = 0; k < 256; k++)
      check(dut.u_mc.u_ram.mem[k] == m.mem[k], $sformatf("%s: mem[%h]", name, k));
    c_inh += m.n_inh; c_alu += m.n_alu; c_load += m.n_load; c_store += m.n_store;
    c_jmp += m.n_jmp; c_jsr += m.n_jsr; c_rts += m.n_rts; c_bra += m.n_bra;
    c_taken += m.n_taken; c_not += m.n_not_taken;
    foreach (c_mode[k]) c_mode[k] += m.n_mode[k];
    $display("%s: %0d instructions", name, m.n_instr);
  endtask

  initial begin
    foreach (img[k]) img[k] = 0;
    img[0]  = alu_i(6'b000000, 2, 0, 10);
    img[1]  = alu_i(6'b000000, 3, 0, 0);
    img[2]  = call(6);
    img[3]  = alu_i(6'b010100, 2, 2, 1);
    img[4]  = bicc(4'b1001, -2);
    img[5]  = st_i(3, 0, 12'h800);
    img[6]  = ld_i(9, 0, 12'h800);
    img[7]  = HALT;
    img[8]  = alu_r(6'b000000, 3, 3, 2);
    img[9]  = jmpl_i(0, 15, 4);
    run_program("subroutine loop");
    check(dut.u_ram.mem[512] == 32'd55 && dut.u_cpu.u_rf.regs[9] == 32'd55, "sum of 10..1");

    foreach (img[k]) img[k] = 0;
    img[0]  = alu_i(6'b000000, 3, 0, 100);
    img[1]  = alu_i(6'b000000, 7, 0, 30);
    img[2]  = alu_r(6'b001100, 5, 3, 7);
    img[3]  = alu_r(6'b000100, 2, 0, 7);
    img[4]  = sethi(6, 22'h3ffff);
    img[5]  = alu_i(6'b010100, 0, 5, 201);
    img[6]  = alu_i(6'b100111, 4, 2, 4);
    img[7]  = HALT;
    run_program("examples");

    for (int t = 0; t < 4; t++) begin
      random_program(img, 450);
      run_program($sformatf("random%0d", t));
    end

    // accumulator machine: sum of 10..1, then a subroutine program
    foreach (cimg[k]) cimg[k] = 8'h00;
    cimg[8'h00:8'h18] = '{8'h17, 8'h00, 8'h2A, 8'h81, 8'h17, 8'd10, 8'h2A, 8'h80,
                          8'h27, 8'h81, 8'h20, 8'h80, 8'h2A, 8'h81, 8'h27, 8'h80,
                          8'h02, 8'h2A, 8'h80, 8'h7D, 8'hF3, 8'h70, 8'hFE, 8'h00, 8'h00};
    run_cisc("acc sum", 1000);
    check(dut.u_mc.u_ram.mem[8'h81] == 8'd55, "acc sum of 10..1");
    foreach (cimg[k]) cimg[k] = 8'h00;
    cimg[8'h00:8'h0F] = '{8'h19, 8'hF0, 8'h18, 8'h90, 8'h17, 8'h05, 8'h2E, 8'h20,
                          8'h4A, 8'h03, 8'h72, 8'h18, 8'h3A, 8'hA0, 8'h3E, 8'hA1};
    cimg[8'h10:8'h16] = '{8'h6A, 8'h17, 8'h00, 8'h60, 8'h5A, 8'h11, 8'h70};
    cimg[8'h17] = 8'hFE;
    cimg[8'h20:8'h23] = '{8'h05, 8'h10, 8'h01, 8'h6F};
    cimg[8'h24:8'h25] = '{8'h03, 8'h6F};
    cimg[8'hA0] = 8'hB0;
    cimg[8'hA1] = 8'h20;
    run_cisc("acc subroutines", 1000);
    check(mc_acc == 8'hEB && dut.u_mc.u_ram.mem[8'hB0] == 8'hF5, "acc subroutine results");
    for (int t = 0; t < 20; t++) begin
      cisc_tb_pkg::random_program(cimg);
      run_cisc($sformatf("acc random%0d", t), 400);
    end

    $display("risc: alu %0d cc %0d addx %0d shift %0d sethi %0d ld %0d st %0d call %0d jmpl %0d taken %0d not-taken %0d r0-dest %0d",
             n_alu, n_cc, n_addx, n_shift, n_sethi, n_ld, n_st, n_call, n_jmpl, n_bt, n_bn, n_r0);
    $display("acc machine: inherent %0d alu %0d load %0d store %0d jmp %0d jsr/bsr %0d rts %0d bra/brn %0d taken %0d not-taken %0d",
             c_inh, c_alu, c_load, c_store, c_jmp, c_jsr, c_rts, c_bra, c_taken, c_not);
    $display("acc modes: imm %0d dir %0d ind %0d idx %0d idxind %0d stack %0d",
             c_mode[1], c_mode[2], c_mode[3], c_mode[4], c_mode[5], c_mode[6]);
    $display("micro-PC: dispatch %0d jump %0d cond-taken %0d cond-not %0d",
             u_disp, u_jump, u_cj_t, u_cj_n);
    check(n_alu > 0 && n_cc > 0 && n_addx > 0 && n_shift > 0 && n_sethi > 0 && n_ld > 0 &&
          n_st > 0 && n_call > 0 && n_jmpl > 0 && n_bt > 0 && n_bn > 0 && n_r0 > 0, "every RISC mechanism occurred");
    check(c_inh > 0 && c_alu > 0 && c_load > 0 && c_store > 0 && c_jmp > 0 && c_jsr > 0 &&
          c_rts > 0 && c_bra > 0 && c_taken > 0 && c_not > 0, "every accumulator instruction class occurred");
    for (int k = 1; k <= 6; k++) check(c_mode[k] > 0, $sformatf("addressing mode %0d occurred", k));
    check(u_jump > 0 && u_disp > 0 && u_cj_t > 0 && u_cj_n > 0, "every micro-PC mechanism occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
