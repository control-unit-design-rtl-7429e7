// Self-checking test of the microprogrammed accumulator machine.  For each
// program the bench fills memory, releases reset, waits for the boot loader
// to fill the control stores, then checks at every fetch step (micro-PC 0)
// that ACC, X, S, PC and the flags equal the reference model in cisc_tb_pkg
// and that the previous instruction took the number of cycles the model
// expects.  A run stops at the BRA-to-itself halt loop, at a reserved code
// or after an instruction limit; then all 256 memory bytes are compared.
// Programs: a loop summing 10..1, a subroutine / stack / addressing-mode
// program, and random programs.  Finally every mechanism counter must be
// non-zero.
module tb_cisc_machine;
  import ucode_pkg::*;
  import cisc_tb_pkg::*;

  logic            clk = 0, rst_n = 0;
  logic            load_we = 0;
  logic [7:0]      load_addr = 0, load_data = 0;
  logic            booting;
  logic [7:0]      acc, x, s, pc, ir;
  logic [3:0]      flags;
  logic [UA_W-1:0] upc;
  cisc_ctl_t       ctl;
  int checks = 0, failures = 0;
  logic [7:0] img [256];
  int tot_instr = 0, tot_inh = 0, tot_alu = 0, tot_load = 0, tot_store = 0, tot_jmp = 0,
      tot_jsr = 0, tot_rts = 0, tot_bra = 0, tot_taken = 0, tot_not_taken = 0, tot_nop = 0;
  int tot_mode [8] = '{default: 0};

  cisc_machine dut (.clk, .rst_n, .load_we, .load_addr, .load_data, .booting,
                    .acc, .x, .s, .pc, .ir, .flags, .upc, .ctl);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic run_program(input string name, input int max_instr);
    cisc_model m = new();
    int cyc, exp_cyc, boot;
    rst_n = 0;
    @(negedge clk);
    for (int k = 0; k < 256; k++) begin
      load_we = 1; load_addr = 8'(k); load_data = img[k]; m.mem[k] = img[k];
      @(negedge clk);
    end
    load_we = 0;
    rst_n = 1;
    boot = 0;
    while (booting) begin
      @(negedge clk);
      boot++;
    end
    check(boot == 320, $sformatf("%s: boot took %0d cycles", name, boot));
    exp_cyc = -1;
    cyc = 0;
    forever begin
      if (upc == 0) begin
        if (exp_cyc >= 0)
          check(cyc == exp_cyc, $sformatf("%s: instr %0d took %0d cycles, expected %0d",
                                          name, m.n_instr, cyc, exp_cyc));
        check({acc, x, s, pc, flags} == {m.acc, m.x, m.s, m.pc, m.flags()},
              $sformatf("%s: after %0d instr ACC %h X %h S %h PC %h F %b, expected %h %h %h %h %b",
                        name, m.n_instr, acc, x, s, pc, flags, m.acc, m.x, m.s, m.pc, m.flags()));
        if (m.mem[m.pc] == BRA && m.mem[8'(m.pc + 1)] == 8'hFE) break;
        if (m.n_instr >= max_instr) break;
        exp_cyc = m.step();
        if (exp_cyc == 0) break;
        cyc = 0;
      end
      @(negedge clk);
      cyc++;
    end
    for (int k = 0; k < 256; k++)
      check(dut.u_ram.mem[k] == m.mem[k],
            $sformatf("%s: mem[%h] = %h, expected %h", name, k, dut.u_ram.mem[k], m.mem[k]));
    tot_instr += m.n_instr; tot_inh += m.n_inh; tot_alu += m.n_alu; tot_load += m.n_load;
    tot_store += m.n_store; tot_jmp += m.n_jmp; tot_jsr += m.n_jsr; tot_rts += m.n_rts;
    tot_bra += m.n_bra; tot_taken += m.n_taken; tot_not_taken += m.n_not_taken; tot_nop += m.n_nop;
    foreach (tot_mode[k]) tot_mode[k] += m.n_mode[k];
  endtask

  task automatic put(input int a, input byte b []);
    foreach (b[k]) img[a + k] = b[k];
  endtask

  initial begin
    // sum of 10..1 kept in memory byte 0x81
    foreach (img[k]) img[k] = 8'h00;
    put(8'h00, '{IMM|LDA, 8'h00, DIR|STA, 8'h81, IMM|LDA, 8'd10, DIR|STA, 8'h80,
                 DIR|LDA, 8'h81, IMM|ADD, 8'h00, DIR|ADD, 8'h80, DIR|STA, 8'h81,
                 DIR|LDA, 8'h80, DEC, DIR|STA, 8'h80, BNE, 8'hF1, BRA, 8'hFE});
    run_program("sum", 1000);
    check(dut.u_ram.mem[8'h81] == 8'd55, "sum: result");

    // subroutines, stack and addressing modes
    foreach (img[k]) img[k] = 8'h00;
    put(8'h00, '{IMM|LDS, 8'hF0, IMM|LDX, 8'h90, IMM|LDA, 8'h05,
                 JSR_D, 8'h20,             // ACC = 2*ACC + 1 = 11
                 IDX|STA, 8'h03,           // mem[0x93] = 11
                 BSR, 8'h18,               // to 0x24: ACC = -ACC
                 IND|STA, 8'hA0,           // mem[mem[0xA0]] = mem[0xB0] = -11
                 JSR_I, 8'hA1,             // to mem[0xA1] = 0x20: ACC = -21
                 STK|STA,                  // push
                 IMM|LDA, 8'h00,
                 STK|ADD,                  // pull and add
                 IDXI|STA, 8'h11,          // mem[mem[0xA1]] = mem[0x20]
                 BRA, 8'hFE});
    put(8'h20, '{LSL, IMM|ADD, 8'h01, RTS});
    put(8'h24, '{NEG, RTS});
    img[8'hA0] = 8'hB0;
    img[8'hA1] = 8'h20;
    run_program("subroutines", 1000);
    check(dut.u_ram.mem[8'h93] == 8'd11, "subroutines: indexed store");
    check(dut.u_ram.mem[8'hB0] == 8'hF5, "subroutines: indirect store");
    check(acc == 8'hEB, "subroutines: final ACC");

    for (int r = 0; r < 300; r++) begin
      random_program(img);
      run_program($sformatf("random %0d", r), 400);
    end

    $display("instructions %0d: inherent %0d alu %0d load %0d store %0d jmp %0d jsr/bsr %0d rts %0d",
             tot_instr, tot_inh, tot_alu, tot_load, tot_store, tot_jmp, tot_jsr, tot_rts);
    $display("bra/brn %0d taken %0d not-taken %0d unused %0d; modes imm %0d dir %0d ind %0d idx %0d idxind %0d stack %0d",
             tot_bra, tot_taken, tot_not_taken, tot_nop, tot_mode[1], tot_mode[2], tot_mode[3],
             tot_mode[4], tot_mode[5], tot_mode[6]);
    check(tot_inh > 0 && tot_alu > 0 && tot_load > 0 && tot_store > 0 && tot_jmp > 0 &&
          tot_jsr > 0 && tot_rts > 0 && tot_bra > 0 && tot_taken > 0 && tot_not_taken > 0,
          "every instruction class ran");
    for (int k = 1; k <= 6; k++) check(tot_mode[k] > 0, $sformatf("mode %0d ran", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
