// Branch condition evaluation for the Bicc instructions.
//
// cond is IR[28:25].  The 16 codes and their names are the processor's:
// 0000 BN, 0001 BE, 0010 BLE, 0011 BL, 0100 BLEU, 0101 BCS, 0110 BNEG,
// 0111 BVS, 1000 BA, and 1xxx is the negation of 0xxx (BNE, BG, BGE, BGU,
// BCC, BPOS, BVC).  The tests behind the names (e.g. BLE = Z or (N xor V))
// are the usual SPARC ones.  The annul bit is not used.  Combinational.
module risc_branch_cond
  import risc_pkg::*;
(
  input  logic [3:0] cond,
  input  logic [3:0] flags,   // {C, V, N, Z}
  output logic       taken
);

  logic c, v, n, z, t;

  always_comb begin
    c = flags[FLAG_C];
    v = flags[FLAG_V];
    n = flags[FLAG_N];
    z = flags[FLAG_Z];
    unique case (cond[2:0])
      3'b000: t = 1'b0;            // BN
      3'b001: t = z;               // BE
      3'b010: t = z | (n ^ v);     // BLE
      3'b011: t = n ^ v;           // BL
      3'b100: t = c | z;           // BLEU
      3'b101: t = c;               // BCS
      3'b110: t = n;               // BNEG
      default: t = v;              // BVS
    endcase
    taken = t ^ cond[3];
  end

endmodule
