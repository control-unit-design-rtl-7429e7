// Self-checking test of risc_cpu with a RAM: a directed program (a loop that
// calls a subroutine through CALL and returns through JMPL, summing 10..1),
// then random programs.  After each program reaches its halt loop the test
// compares every register, the flags, the data area of memory and the cycle
// count with the instruction-level reference model in risc_tb_pkg.
module tb_risc_cpu;
  import risc_pkg::*;
  import risc_tb_pkg::*;

  localparam int unsigned AW = 12;

  logic        clk = 0, rst_n = 0;
  logic [31:0] mem_addr, mem_wdata, mem_rdata, pc, ir;
  logic        mem_oe, mem_wr, load_we = 0;
  logic [AW-1:0] load_addr = 0;
  logic [31:0] load_data = 0;
  logic [3:0]  flags;
  seq_state_e  state;
  int checks = 0, failures = 0;
  logic [31:0] img [MEMW];

  risc_cpu dut (.clk, .rst_n, .mem_addr, .mem_oe, .mem_wr, .mem_wdata, .mem_rdata,
                .pc, .ir, .flags, .state);
  ram #(.WIDTH(32), .ADDR_W(AW)) u_ram (.clk, .addr(mem_addr[AW+1:2]), .oe(mem_oe), .wr(mem_wr),
                .wdata(mem_wdata), .rdata(mem_rdata), .load_we, .load_addr, .load_data);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_program(input string name);
    risc_model m = new();
    longint cyc;
    // load while in reset
    rst_n = 0;
    @(negedge clk);
    for (int k = 0; k < MEMW; k++) begin
      load_we = 1; load_addr = AW'(k); load_data = img[k]; m.mem[k] = img[k];
      @(negedge clk);
    end
    load_we = 0;
    while (!m.step()) ;
    rst_n = 1;
    cyc = 0;
    while (!(state == ST_EX1 && ir == HALT)) begin
      @(negedge clk);
      cyc++;
      if (cyc > 100000) break;
    end
    check(cyc == m.cycles + 1, $sformatf("%s cycles %0d exp %0d", name, cyc, m.cycles + 1));
    check(pc == m.pc, $sformatf("%s pc %h exp %h", name, pc, m.pc));
    check(flags == {m.c, m.v, m.n, m.z}, $sformatf("%s flags %b exp %b", name, flags, {m.c, m.v, m.n, m.z}));
    for (int k = 0; k < 32; k++)
      check(dut.u_rf.regs[k] == m.r[k], $sformatf("%s R%0d %h exp %h", name, k, dut.u_rf.regs[k], m.r[k]));
    for (int k = 512; k < 1024; k++)
      check(u_ram.mem[k] == m.mem[k], $sformatf("%s mem[%0d] %h exp %h", name, k, u_ram.mem[k], m.mem[k]));
    $display("%s: %0d cycles, alu %0d cc %0d addx %0d shift %0d sethi %0d ld %0d st %0d call %0d jmpl %0d br %0d/%0d",
             name, cyc, m.n_alu, m.n_cc, m.n_addx, m.n_shift, m.n_sethi, m.n_ld, m.n_st, m.n_call, m.n_jmpl,
             m.n_br_taken, m.n_br_not);
  endtask

  initial begin
    // directed: R3 = 10 + 9 + ... + 1 via a subroutine, stored at 0x800
    foreach (img[k]) img[k] = 0;
    img[0]  = alu_i(6'b000000, 2, 0, 10);        // ADD R0,10,R2
    img[1]  = alu_i(6'b000000, 3, 0, 0);         // ADD R0,0,R3
    img[2]  = call(6);                           // loop: CALL addsub (word 8)
    img[3]  = alu_i(6'b010100, 2, 2, 1);         // SUBCC R2,1,R2
    img[4]  = bicc(4'b1001, -2);                 // BNE loop
    img[5]  = st_i(3, 0, 12'h800);               // ST R3,[R0+0x800]
    img[6]  = HALT;
    img[8]  = alu_r(6'b000000, 3, 3, 2);         // addsub: ADD R3,R2,R3
    img[9]  = jmpl_i(0, 15, 4);                  // JMPL R15+4,R0
    run_program("directed");
    check(u_ram.mem[512] == 32'd55, $sformatf("sum %0d exp 55", u_ram.mem[512]));
    check(dut.u_rf.regs[15] == 32'd8, "R15 holds the CALL address");

    // document examples: SUBX, ADD immediate, negate, SETHI + OR, side-effect only
    foreach (img[k]) img[k] = 0;
    img[0]  = alu_i(6'b000000, 3, 0, 100);       // ADD R0,100,R3
    img[1]  = alu_i(6'b000000, 7, 0, 30);        // ADD R0,30,R7
    img[2]  = alu_r(6'b001100, 5, 3, 7);         // SUBX R3,R7,R5
    img[3]  = alu_i(6'b000000, 1, 4, 5);         // ADD R4,5,R1
    img[4]  = alu_r(6'b000100, 2, 0, 7);         // SUB R0,R7,R2 (negate into R2)
    img[5]  = sethi(6, 22'h3ffff);               // SETHI
    img[6]  = alu_i(6'b000010, 6, 6, 12'h3ff);   // OR low bits
    img[7]  = alu_i(6'b010100, 0, 5, 201);       // SUBCC R5,201,R0
    img[8]  = alu_i(6'b100111, 4, 2, 4);         // SRA R2,4,R4
    img[9]  = HALT;
    run_program("examples");
    check(dut.u_rf.regs[5] == 32'd70, "SUBX result");
    check(dut.u_rf.regs[2] == -32'sd30, "negate");
    check(dut.u_rf.regs[6] == 32'h0fff_ffff, "SETHI + OR");
    check(dut.u_rf.regs[0] == 0, "R0 stays zero");

    for (int t = 0; t < 6; t++) begin
      random_program(img, 400);
      run_program($sformatf("random%0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
