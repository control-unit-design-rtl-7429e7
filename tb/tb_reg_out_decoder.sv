// Self-checking test of reg_out_decoder: each of the four codes must raise
// exactly the enable the field-encoding table gives it.
module tb_reg_out_decoder;
  import ucode_pkg::*;
  logic [1:0] field;
  reg_out_t   en;
  logic [3:0] exp_v [4] = '{4'b0001, 4'b0010, 4'b0100, 4'b1000};  // ACC, X, S, PC
  int checks = 0, failures = 0;

  reg_out_decoder dut (.field, .en);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      for (int k = 0; k < 4; k++) begin
        field = 2'(k);
        #1;
        checks++;
        if (4'(en) !== exp_v[k] || $countones(en) != 1) begin
          failures++;
          $display("field %b got %b exp %b", field, en, exp_v[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
