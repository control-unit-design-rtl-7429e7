// Self-checking test of useq: random Cond fields, jump addresses, operation
// codes and flags; the next micro-PC must be uPC+1, the jump address when the
// named flag condition holds (or always for JUMP), or {1, opcode} for
// DISPATCH.  Each kind of step is counted and must occur.
module tb_useq;
  import ucode_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic [6:0]  opcode;
  ucond_e      cond;
  logic [7:0]  jump_addr, upc, exp_v;
  logic [3:0]  flags;
  int checks = 0, failures = 0, n_next = 0, n_jump = 0, n_disp = 0, n_cj_taken = 0, n_cj_not = 0;

  useq dut (.clk, .rst_n, .opcode, .cond, .jump_addr, .flags, .upc);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opcode = 0; cond = UC_NEXT; jump_addr = 0; flags = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (upc !== 8'd0) failures++;
    rst_n = 1;
    for (int t = 0; t < 10000; t++) begin
      logic c, v, n, z, j;
      @(negedge clk);
      opcode = 7'($urandom); jump_addr = 8'($urandom); flags = 4'($urandom);
      cond = ucond_e'($urandom_range(15));
      {c, v, n, z} = flags;
      case (cond)
        UC_JC: j = c;  UC_JNC: j = !c;  UC_JV: j = v;  UC_JNV: j = !v;
        UC_JN: j = n;  UC_JNN: j = !n;  UC_JZ: j = z;  UC_JNZ: j = !z;
        UC_JLT: j = n != v;  UC_JGE: j = n == v;  UC_JGT: j = !z && n == v;  UC_JLE: j = z || n != v;
        default: j = 0;
      endcase
      if (cond == UC_DISPATCH)  begin exp_v = 8'd128 + 8'(opcode); n_disp++; end
      else if (cond == UC_JUMP) begin exp_v = jump_addr; n_jump++; end
      else if (cond == UC_NEXT) begin exp_v = upc + 8'd1; n_next++; end
      else if (j)               begin exp_v = jump_addr; n_cj_taken++; end
      else                      begin exp_v = upc + 8'd1; n_cj_not++; end
      @(posedge clk); #1;
      checks++;
      if (upc !== exp_v) begin
        failures++;
        $display("cond %0d flags %b got %h exp %h", cond, flags, upc, exp_v);
      end
    end
    checks++;
    if (n_next == 0 || n_jump == 0 || n_disp == 0 || n_cj_taken == 0 || n_cj_not == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
