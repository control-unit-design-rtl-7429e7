// Self-checking test of risc_branch_cond: all 16 conditions against all 16
// flag combinations, compared with the meaning of each branch name worked out
// on signed and unsigned comparisons.
module tb_risc_branch_cond;
  logic [3:0] cond, flags;
  logic       taken, e;
  logic       c, v, n, z;
  int checks = 0, failures = 0;

  risc_branch_cond dut (.cond, .flags, .taken);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      for (int fl = 0; fl < 16; fl++) begin
        cond = 4'(k); flags = 4'(fl);
        {c, v, n, z} = flags;
        #1;
        case (cond)
          4'b0000: e = 0;                        // BN
          4'b0001: e = z;                        // BE
          4'b0010: e = z || (n != v);            // BLE
          4'b0011: e = (n != v);                 // BL
          4'b0100: e = c || z;                   // BLEU
          4'b0101: e = c;                        // BCS
          4'b0110: e = n;                        // BNEG
          4'b0111: e = v;                        // BVS
          4'b1000: e = 1;                        // BA
          4'b1001: e = !z;                       // BNE
          4'b1010: e = !z && (n == v);           // BG
          4'b1011: e = (n == v);                 // BGE
          4'b1100: e = !c && !z;                 // BGU
          4'b1101: e = !c;                       // BCC
          4'b1110: e = !n;                       // BPOS
          default: e = !v;                       // BVC
        endcase
        checks++;
        if (taken !== e) begin
          failures++;
          $display("cond=%b flags=%b got %b exp %b", cond, flags, taken, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
