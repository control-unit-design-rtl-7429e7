// Self-checking test of the accumulator machine's ALU and flags register.
// Random operands, function codes (including unused ones), modifier bits and
// update masks are applied; the result is checked in the same cycle and the
// flags after the clock edge, against a reference written from the function
// table.  Corner operands (0x00, 0x7F, 0x80, 0xFF) are used often.
module tb_cisc_alu;
  import cisc_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic [5:0] f;
  logic       mw, p1, as;
  logic [3:0] upd, flags;
  logic [7:0] a, b, y;
  int checks = 0, failures = 0;

  cisc_alu dut (.clk, .rst_n, .f, .multiword(mw), .plus_1(p1), .arithmetic_shift(as),
                .upd, .a, .b, .y, .flags);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pick();
    case ($urandom_range(0, 7))
      0: return 8'h00;
      1: return 8'h7F;
      2: return 8'h80;
      3: return 8'hFF;
      default: return 8'($urandom);
    endcase
  endfunction

  // reference: returns {C, V, result}
  function automatic logic [9:0] ref_alu(input logic [5:0] fn, input logic [7:0] x, yb,
                                         input logic m, p, s, c);
    int t, cin;
    logic [7:0] r;
    logic co, vo;
    co = 0; vo = 0;
    case (fn)
      ALU_ADD: begin
        cin = p ? 1 : (m ? c : 0);
        t = x + yb + cin; r = 8'(t); co = t > 255;
        vo = ($signed(x) + $signed(yb) + cin) > 127 || ($signed(x) + $signed(yb) + cin) < -128;
      end
      ALU_SUB: begin
        cin = p ? 1 : (m ? !c : 0);       // carry-in 1 means no borrow
        t = x - yb - (1 - cin); r = 8'(t); co = t < 0;
        vo = ($signed(x) - $signed(yb) - (1 - cin)) > 127 || ($signed(x) - $signed(yb) - (1 - cin)) < -128;
      end
      ALU_PASSA: begin
        cin = p ? 1 : (m ? c : 0);
        t = x + cin; r = 8'(t); co = t > 255; vo = ($signed(x) + cin) > 127;
      end
      ALU_DECA: begin
        cin = p ? 1 : (m ? !c : 0);
        t = x - (1 - cin); r = 8'(t); co = t < 0; vo = ($signed(x) - (1 - cin)) < -128;
      end
      ALU_NEG: begin
        cin = p ? 1 : (m ? !c : 0);
        r = 8'(~x + cin); co = x != 0; vo = x == 8'h80;
      end
      ALU_AND:   r = x & yb;
      ALU_OR:    r = x | yb;
      ALU_EOR:   r = x ^ yb;
      ALU_PASSB: r = yb;
      ALU_COM:   r = ~x;
      ALU_SHL: begin r = {x[6:0], m & c}; co = x[7]; end
      ALU_SHR: begin r = {s ? x[7] : (m & c), x[7:1]}; co = x[0]; end
      default: r = 0;
    endcase
    return {co, vo, r};
  endfunction

  initial begin
    logic [9:0] e;
    logic [3:0] prev, expf;
    f = 0; mw = 0; p1 = 0; as = 0; upd = 0; a = 0; b = 0;
    repeat (2) @(negedge clk);
    check_reset: begin
      checks++;
      if (flags !== 4'b0000) begin failures++; $display("FAIL flags not reset"); end
    end
    rst_n = 1;
    for (int k = 0; k < 200000; k++) begin
      f = 6'($urandom_range(0, 14)); a = pick(); b = pick();
      {mw, p1, as} = 3'($urandom);
      if (f inside {ALU_SHL, ALU_SHR} && $urandom_range(0, 1)) p1 = 0;
      upd = 4'($urandom);
      #1;
      e = ref_alu(f, a, b, mw, p1, as, flags[3]);
      checks++;
      if (y !== e[7:0]) begin
        failures++;
        if (failures < 10) $display("FAIL f=%h a=%h b=%h mw%b p1%b as%b c%b: y=%h exp %h",
                                    f, a, b, mw, p1, as, flags[3], y, e[7:0]);
      end
      prev = flags;
      expf = {upd[3] ? e[9] : prev[3], upd[2] ? e[8] : prev[2],
              upd[1] ? e[7] : prev[1], upd[0] ? (e[7:0] == 0) : prev[0]};
      @(negedge clk);
      checks++;
      if (flags !== expf) begin
        failures++;
        if (failures < 10) $display("FAIL flags f=%h a=%h b=%h: %b exp %b", f, a, b, flags, expf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
