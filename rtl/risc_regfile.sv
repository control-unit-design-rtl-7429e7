// General register file of the SPARC-subset processor.
//
// Two combinational read ports drive the S1 and S2 source buses; one write
// port loads from the Dest bus at the clock edge.  R0 is the pseudo register
// that always reads zero; writes to it are discarded, so an instruction can
// be run only for its side effects (e.g. SUBCC ... R0).  The number of
// registers is a parameter; 32 makes every 5-bit register field a real
// register (including R15, which CALL uses for the return address).
// Reset clears every register (a choice of this design).
module risc_regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [4:0]       ra1,
  input  logic [4:0]       ra2,
  output logic [WIDTH-1:0] rd1,
  output logic [WIDTH-1:0] rd2,
  input  logic             we,
  input  logic [4:0]       wa,
  input  logic [WIDTH-1:0] wd
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0 && 32'(wa) < NREGS) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == 5'd0 || 32'(ra1) >= NREGS) ? '0 : regs[ra1];
  assign rd2 = (ra2 == 5'd0 || 32'(ra2) >= NREGS) ? '0 : regs[ra2];

endmodule
