// Self-checking test of risc_alu: random operands through every function of
// the ALU table (ADD, AND, OR, XOR, SUB, ANDN, ORN, XNOR, ADDX, SUBX, each
// with and without CC), against an arithmetic reference model of the results
// and of the C, V, N, Z updates.
module tb_risc_alu;
  logic        clk = 0, rst_n = 0;
  logic [4:0]  f;
  logic [31:0] s1, s2, dest;
  logic [3:0]  flags;
  int checks = 0, failures = 0;

  risc_alu dut (.clk, .rst_n, .f, .s1, .s2, .dest, .flags);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [4:0] codes [14] = '{5'b00000, 5'b00001, 5'b00010, 5'b00011, 5'b00100, 5'b00101,
                             5'b00110, 5'b00111, 5'b01000, 5'b01100, 5'b10000, 5'b10100,
                             5'b11000, 5'b11100};
  logic c_m, v_m, n_m, z_m;

  task automatic model(input logic [4:0] fn, input logic [31:0] a, b,
                       output logic [31:0] r, output logic c, v);
    logic [32:0] w;
    logic        cin;
    cin = fn[3] ? c_m : 1'b0;
    c = 0; v = 0;
    case (fn[2:0])
      3'b000: begin w = 33'(a) + 33'(b) + 33'(cin); r = w[31:0]; c = w[32];
                    v = (a[31] == b[31]) && (r[31] != a[31]); end
      3'b100: begin r = a - b - 32'(cin); c = (33'(a) < 33'(b) + 33'(cin));
                    v = (a[31] != b[31]) && (r[31] != a[31]); end
      3'b001: r = a & b;
      3'b010: r = a | b;
      3'b011: r = a ^ b;
      3'b101: r = a & ~b;
      3'b110: r = a | ~b;
      default: r = ~(a ^ b);
    endcase
  endtask

  initial begin
    logic [31:0] r; logic c, v;
    {c_m, v_m, n_m, z_m} = '0;
    f = 0; s1 = 0; s2 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      f  = codes[$urandom_range(13)];
      if (f[1:0] == 0 && $urandom_range(1)) f[3] = 1'b1;  // ADDX/SUBX and their CC forms
      case ($urandom_range(4))
        0: begin s1 = $urandom; s2 = s1; end                 // zero results
        1: begin s1 = 32'h7fff_ffff; s2 = $urandom_range(3); end
        2: begin s1 = 32'h8000_0000; s2 = 32'hffff_fff0 + $urandom_range(15); end
        default: begin s1 = $urandom; s2 = $urandom; end
      endcase
      #1;
      model(f, s1, s2, r, c, v);
      checks++;
      if (dest !== r) begin
        failures++;
        $display("dest f=%b s1=%h s2=%h got %h exp %h", f, s1, s2, dest, r);
      end
      if (f[4]) begin c_m = c; v_m = v; n_m = r[31]; z_m = (r == 0); end
      @(posedge clk); #1;
      checks++;
      if (flags !== {c_m, v_m, n_m, z_m}) begin
        failures++;
        $display("flags f=%b s1=%h s2=%h got %b exp %b", f, s1, s2, flags, {c_m, v_m, n_m, z_m});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
