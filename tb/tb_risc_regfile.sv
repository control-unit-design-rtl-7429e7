// Self-checking test of risc_regfile: random writes and two-port reads
// against a reference array; checks that R0 always reads zero and that a
// write shows on the read ports only after the clock edge.
module tb_risc_regfile;
  logic        clk = 0, rst_n = 0;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic        we;
  logic [31:0] ref_regs [32];
  int checks = 0, failures = 0, r0_writes = 0;

  risc_regfile dut (.clk, .rst_n, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) ref_regs[i] = '0;
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      we  = $urandom_range(1);
      wa  = 5'($urandom_range(31));
      wd  = $urandom;
      ra1 = (i % 4 == 0) ? wa : 5'($urandom_range(31));
      ra2 = (i % 7 == 0) ? 5'd0 : 5'($urandom_range(31));
      #1;
      checks += 2;
      if (rd1 !== ref_regs[ra1]) begin failures++; $display("rd1 R%0d got %h exp %h", ra1, rd1, ref_regs[ra1]); end
      if (rd2 !== ref_regs[ra2]) begin failures++; $display("rd2 R%0d got %h exp %h", ra2, rd2, ref_regs[ra2]); end
      @(posedge clk);
      if (we && wa != 0) ref_regs[wa] = wd;
      if (we && wa == 0) r0_writes++;
    end
    checks++;
    if (r0_writes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
