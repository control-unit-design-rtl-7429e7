// ALU of the SPARC-subset processor, with the C, V, N, Z condition codes.
//
// The structure is the gate-level one of the processor's ALU drawing:
// S2 passes through an XOR with F2, so F2 turns ADD into SUB and AND/OR/XOR
// into ANDN/ORN/XNOR.  The adder's carry-in is (F3 AND C) XOR F2, which gives
// ADDX (a+b+C), SUB (a+~b+1) and SUBX (a+~b+~C = a-b-C).  F1:F0 pick the
// adder, AND, OR or XOR result for Dest.  The carry-out is XORed with F2 so
// that C holds a borrow after a subtraction.
//
// Flags: each of C, V, N, Z is a flip-flop that loads only when F4 is set
// (the ..CC instructions) and otherwise keeps its value.  C and V are forced
// to 0 by logic functions (their input is ANDed with NOR(F1,F0)); Z is the NOR
// of Dest and N is Dest[31].  V is the adder's two's-complement overflow.
//
// Interface: f = F4:F0, s1/s2 the source buses, dest the combinational result;
// flags = {C,V,N,Z} change at the clock edge ending a cycle with F4 = 1.
// Reset clears the flags (a choice of this design).
module risc_alu #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [4:0]       f,
  input  logic [WIDTH-1:0] s1,
  input  logic [WIDTH-1:0] s2,
  output logic [WIDTH-1:0] dest,
  output logic [3:0]       flags   // {C, V, N, Z}
);

  logic             c_q, v_q, n_q, z_q;
  logic [WIDTH-1:0] b;
  logic [WIDTH:0]   sum;
  logic             cin, co, vo, arith;

  always_comb begin
    b     = s2 ^ {WIDTH{f[2]}};
    cin   = (f[3] & c_q) ^ f[2];
    sum   = {1'b0, s1} + {1'b0, b} + {{WIDTH{1'b0}}, cin};
    co    = sum[WIDTH] ^ f[2];
    vo    = (s1[WIDTH-1] == b[WIDTH-1]) && (sum[WIDTH-1] != s1[WIDTH-1]);
    arith = ~(f[1] | f[0]);
    unique case (f[1:0])
      2'b00: dest = sum[WIDTH-1:0];
      2'b01: dest = s1 & b;
      2'b10: dest = s1 | b;
      default: dest = s1 ^ b;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {c_q, v_q, n_q, z_q} <= '0;
    end else if (f[4]) begin
      c_q <= co & arith;
      v_q <= vo & arith;
      n_q <= dest[WIDTH-1];
      z_q <= ~|dest;
    end
  end

  assign flags = {c_q, v_q, n_q, z_q};

endmodule
