// Datapath of the 8-bit accumulator machine, steered by the 28 signals of
// the control unit.
//
// Registers ACC, X, S, PC, MAR (8 bits) and IR.  Enable_ACC/X/S/PC put one
// register on the register output bus, which feeds ALU input A and, when
// Enable_Reg is set, the memory bus.  The memory bus carries the memory's
// read data when OE is set; it feeds ALU input B, the IR and the memory
// write data.  The ALU result can load ACC, X, S, PC and MAR.  Inc_PC adds
// one to PC with its own incrementer (Load_PC takes priority).  The memory
// address is PC when Sel_PC is set and MAR otherwise; WR writes the memory
// bus at the clock edge.  Load_IR loads IR from the memory bus.
//
// opcode goes to the microsequencer: during the fetch cycle (Load_IR set)
// it is the byte arriving on the memory bus, so the dispatch to the
// instruction's first step happens in that same cycle; otherwise it is the
// IR contents.  All registers load at the rising edge and are cleared by the
// asynchronous active-low reset.
//
// The register set, buses and signal names follow the document; the widths
// (8-bit data and addresses), the bus priority, and taking the opcode from
// the memory bus in the fetch cycle are this design's choices.
module cisc_datapath
  import ucode_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  cisc_ctl_t       ctl,
  output logic [7:0]      mem_addr,
  output logic            mem_oe,
  output logic            mem_wr,
  output logic [7:0]      mem_wdata,
  input  logic [7:0]      mem_rdata,
  output logic [OP_W-1:0] opcode,
  output logic [3:0]      flags,
  output logic [7:0]      acc,
  output logic [7:0]      x,
  output logic [7:0]      s,
  output logic [7:0]      pc,
  output logic [7:0]      mar,
  output logic [7:0]      ir
);

  logic [7:0] reg_bus, mem_bus, y;

  always_comb begin
    reg_bus = 8'h00;
    if (ctl.reg_out.enable_acc) reg_bus = acc;
    if (ctl.reg_out.enable_x)   reg_bus = x;
    if (ctl.reg_out.enable_s)   reg_bus = s;
    if (ctl.reg_out.enable_pc)  reg_bus = pc;
  end

  assign mem_bus   = ctl.mem.oe ? mem_rdata : (ctl.mem.enable_reg ? reg_bus : 8'h00);
  assign mem_addr  = ctl.mem.sel_pc ? pc : mar;
  assign mem_oe    = ctl.mem.oe;
  assign mem_wr    = ctl.mem.wr;
  assign mem_wdata = mem_bus;
  assign opcode    = ctl.mem.load_ir ? mem_bus[OP_W-1:0] : ir[OP_W-1:0];

  cisc_alu u_alu (
    .clk, .rst_n,
    .f(ctl.alu.f), .multiword(ctl.alu.multiword), .plus_1(ctl.alu.plus_1),
    .arithmetic_shift(ctl.alu.arithmetic_shift),
    .upd({ctl.upd.update_c, ctl.upd.update_v, ctl.upd.update_n, ctl.upd.update_z}),
    .a(reg_bus), .b(mem_bus), .y, .flags
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      acc <= '0; x <= '0; s <= '0; pc <= '0; mar <= '0; ir <= '0;
    end else begin
      if (ctl.reg_in.load_acc) acc <= y;
      if (ctl.reg_in.load_x)   x   <= y;
      if (ctl.reg_in.load_s)   s   <= y;
      if (ctl.reg_in.load_mar) mar <= y;
      if (ctl.reg_in.load_pc)      pc <= y;
      else if (ctl.reg_in.inc_pc)  pc <= pc + 8'd1;
      if (ctl.mem.load_ir) ir <= mem_bus;
    end

  // one driver on the memory bus, and no write while the memory drives it
  a_bus_excl: assert property (@(posedge clk) disable iff (!rst_n)
                               !(ctl.mem.oe && (ctl.mem.enable_reg || ctl.mem.wr)));
  a_one_reg:  assert property (@(posedge clk) disable iff (!rst_n) $onehot(ctl.reg_out));

endmodule
