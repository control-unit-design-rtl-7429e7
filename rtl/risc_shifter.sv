// Barrel shifter of the SPARC-subset processor.
//
// Shifts S1 by the count in S2[4:0]: op 01 = SLL (zeros in), 10 = SRL (zeros
// in), 11 = SRA (copies of the sign bit in).  The op is the low two bits of
// the shift instructions' function code 1001xx; op 00 is not a shift and
// passes S1 unchanged.  Taking the count from S2[4:0] follows SPARC; the
// shifter's inner structure is this design's (a plain combinational shift).
// Purely combinational; its result drives Dest when the decoder selects it.
module risc_shifter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [1:0]       op,
  input  logic [WIDTH-1:0] s1,
  input  logic [WIDTH-1:0] s2,
  output logic [WIDTH-1:0] dest
);

  localparam int unsigned SH_W = $clog2(WIDTH);
  logic [SH_W-1:0] amt;

  always_comb begin
    amt = s2[SH_W-1:0];
    unique case (op)
      2'b01:   dest = s1 << amt;
      2'b10:   dest = s1 >> amt;
      2'b11:   dest = WIDTH'($signed(s1) >>> amt);
      default: dest = s1;
    endcase
  end

endmodule
