// Microinstruction sequencer: the micro-PC and its address select logic.
//
// Every cycle the micro-PC is loaded with one of three addresses:
//   uPC + 1       the next microinstruction (default),
//   operation     {1, opcode}: start the macroinstruction just fetched, the
//   code          operation code serving directly as a micro-address,
//   jump address  from the microinstruction, always or only when the named
//                 ALU flag (C, V, N or Z, or its complement) is set.
// The microinstruction's Cond field (ucond_e) chooses; its encoding and the
// placement of opcode entry points in the upper half of the micro-address
// space are this design's choices.  The signed comparisons (LT, GE, GT, LE)
// combine N, V and Z.  Code 15 acts as UC_NEXT.
// upc is registered; reset (asynchronous, active low) sets it to 0.
module useq
  import ucode_pkg::*;
#(
  parameter int unsigned ADDR_W = ucode_pkg::UA_W,
  parameter int unsigned OPC_W = ucode_pkg::OP_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [OPC_W-1:0] opcode,
  input  ucond_e          cond,
  input  logic [ADDR_W-1:0] jump_addr,
  input  logic [3:0]      flags,     // {C, V, N, Z}
  output logic [ADDR_W-1:0] upc
);

  logic [ADDR_W-1:0] nxt;
  logic            c, v, n, z, jump;

  always_comb begin
    {c, v, n, z} = flags;
    unique case (cond)
      UC_JUMP: jump = 1'b1;
      UC_JC:   jump = c;
      UC_JNC:  jump = ~c;
      UC_JV:   jump = v;
      UC_JNV:  jump = ~v;
      UC_JN:   jump = n;
      UC_JNN:  jump = ~n;
      UC_JZ:   jump = z;
      UC_JNZ:  jump = ~z;
      UC_JLT:  jump = n ^ v;
      UC_JGE:  jump = ~(n ^ v);
      UC_JGT:  jump = ~z & ~(n ^ v);
      UC_JLE:  jump = z | (n ^ v);
      default: jump = 1'b0;
    endcase
    if (cond == UC_DISPATCH) nxt = ADDR_W'({1'b1, opcode});
    else if (jump)           nxt = jump_addr;
    else                     nxt = upc + ADDR_W'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) upc <= '0;
    else        upc <= nxt;
  end

endmodule
