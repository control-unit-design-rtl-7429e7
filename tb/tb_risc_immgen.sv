// Self-checking test of risc_immgen: random instruction words through each
// selection, compared with the value worked out arithmetically (signed
// field values times the scale factor).
module tb_risc_immgen;
  import risc_pkg::*;
  logic [31:0] ir, imm, exp_v;
  imm_sel_e    sel;
  int checks = 0, failures = 0;

  risc_immgen dut (.ir, .sel, .imm);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      ir  = $urandom;
      sel = imm_sel_e'($urandom_range(5));
      #1;
      case (sel)
        IMM_ZERO:   exp_v = 0;
        IMM_FOUR:   exp_v = 4;
        IMM_SIMM13: exp_v = 32'(int'(ir[12:0]) - (ir[12] ? 8192 : 0));
        IMM_DISP30: exp_v = 32'(ir[29:0]) * 4;
        IMM_DISP22: exp_v = 32'((longint'(ir[21:0]) - (ir[21] ? 64'(4194304) : 64'(0))) * 4);
        default:    exp_v = 32'(ir[21:0]) * 1024;
      endcase
      checks++;
      if (imm !== exp_v) begin
        failures++;
        $display("sel=%0d ir=%h got %h exp %h", sel, ir, imm, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
