// Self-checking test of risc_shifter: every shift count 0..31 for SLL, SRL
// and SRA with random data, plus the pass-through code, against a reference
// built bit by bit.
module tb_risc_shifter;
  logic [1:0]  op;
  logic [31:0] s1, s2, dest, exp_v;
  int checks = 0, failures = 0;

  risc_shifter dut (.op, .s1, .s2, .dest);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      op = 2'($urandom_range(3));
      s1 = (i % 3 == 0) ? (32'h8000_0000 | $urandom) : $urandom;
      s2 = {$urandom_range(32'h07ff_ffff), 5'(i)};
      #1;
      for (int b = 0; b < 32; b++) begin
        int src;
        case (op)
          2'b01: begin src = b - int'(s2[4:0]); exp_v[b] = (src >= 0) ? s1[src] : 1'b0; end
          2'b10: begin src = b + int'(s2[4:0]); exp_v[b] = (src <= 31) ? s1[src] : 1'b0; end
          2'b11: begin src = b + int'(s2[4:0]); exp_v[b] = (src <= 31) ? s1[src] : s1[31]; end
          default: exp_v[b] = s1[b];
        endcase
      end
      checks++;
      if (dest !== exp_v) begin
        failures++;
        $display("op=%b s1=%h n=%0d got %h exp %h", op, s1, s2[4:0], dest, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
