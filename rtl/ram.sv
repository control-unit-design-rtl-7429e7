// Word-wide RAM for the processor's memory bus.
//
// The memory is enabled on the low half of every clock (ME = not CLK), so an
// access completes inside one processor cycle and needs no wait states.  At
// the cycle level that is: with OE set, rdata shows mem[addr] in the same
// cycle; with WR set, wdata is written at the clock edge that ends the cycle.
// The control inputs ME, WR and OE and the Address/Data pins follow the
// processor's drawings; the depth is 2**ADDR_W words.  The full 4 GByte space
// of a 32-bit byte address would be ADDR_W = 30; the default is 28 (1 GByte),
// the largest array verilator accepts.  A second write port (load_*) fills
// the memory, e.g. with a program while the processor is held in reset; it is
// this design's addition and has priority over WR.  Contents are not reset.
module ram #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned ADDR_W = 28
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              oe,
  input  logic              wr,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata,
  input  logic              load_we,
  input  logic [ADDR_W-1:0] load_addr,
  input  logic [WIDTH-1:0]  load_data
);

  logic [WIDTH-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (load_we)  mem[load_addr] <= load_data;
    else if (wr)  mem[addr]      <= wdata;
  end

  assign rdata = oe ? mem[addr] : '0;

endmodule
