// SPARC-subset processor: datapath plus separated sequencer and decoder.
//
// A 32-bit register-register machine built around three buses.  Two source
// buses, S1 and S2, feed the ALU and the barrel shifter; the register file
// drives both, the PC can drive S1 and the instruction register drives S2
// through the immediate unit.  The destination bus Dest carries the ALU
// result, the shifter result or the RAM data, and loads a register, PC, MAR or
// IR.  The RAM is addressed only by MAR, and its data port sits on Dest, so
// every memory access is preceded by a cycle that loads MAR.  The buses are
// multiplexers here, standing for the tri-state lines of a bus drawing.
//
// Control is split as for a high clock rate design: the sequencer only counts
// the cycles of an instruction (see risc_sequencer for the cycle plan, 2 to 4
// cycles) and the decoder turns IR, the sequencer state and the branch
// condition into the cycle's controls.  There are no delay slots or register
// windows.  During execution PC holds the address of the current
// instruction, so CALL and JMPL save that address and a return is
// JMPL R15+4, R0.
//
// Memory interface: mem_addr = MAR (byte address), mem_oe/mem_wr are the RAM's
// OE and WR for this cycle, mem_wdata is Dest, mem_rdata returns in the same
// cycle.  Reset (asynchronous, active low) clears PC, MAR, IR, registers and
// flags and starts with a fetch from address 0.
module risc_cpu
  import risc_pkg::*;
#(
  parameter int unsigned NREGS = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [31:0] mem_addr,
  output logic        mem_oe,
  output logic        mem_wr,
  output logic [31:0] mem_wdata,
  input  logic [31:0] mem_rdata,
  output logic [31:0] pc,
  output logic [31:0] ir,
  output logic [3:0]  flags,
  output seq_state_e  state
);

  ctrl_t       ctl;
  logic        taken;
  logic [31:0] s1, s2, dest, rd1, rd2, imm, alu_y, sh_y, mar;

  risc_sequencer u_seq (.clk, .rst_n, .ir, .state);

  risc_branch_cond u_cond (.cond(ir[28:25]), .flags, .taken);

  risc_decoder u_dec (.ir, .state, .taken, .ctl);

  risc_regfile #(.NREGS(NREGS), .WIDTH(32)) u_rf (
    .clk, .rst_n,
    .ra1(ctl.ra1), .ra2(ctl.ra2), .rd1, .rd2,
    .we(ctl.reg_we), .wa(ctl.wa), .wd(dest)
  );

  risc_immgen u_imm (.ir, .sel(ctl.imm_sel), .imm);

  assign s1 = (ctl.s1_sel == S1_PC) ? pc : rd1;
  assign s2 = ctl.s2_is_imm ? imm : rd2;

  risc_alu #(.WIDTH(32)) u_alu (.clk, .rst_n, .f(ctl.alu_f), .s1, .s2, .dest(alu_y), .flags);

  risc_shifter #(.WIDTH(32)) u_sh (.op(ctl.shift_op), .s1, .s2, .dest(sh_y));

  always_comb begin
    unique case (ctl.dest_sel)
      DEST_SHIFT: dest = sh_y;
      DEST_MEM:   dest = mem_rdata;
      default:    dest = alu_y;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc  <= '0;
      mar <= '0;
      ir  <= '0;
    end else begin
      if (ctl.pc_load)  pc  <= dest;
      if (ctl.mar_load) mar <= dest;
      if (ctl.ir_load)  ir  <= dest;
    end
  end

  assign mem_addr  = mar;
  assign mem_oe    = ctl.mem_oe;
  assign mem_wr    = ctl.mem_wr;
  assign mem_wdata = dest;

  // a cycle never both reads and writes the RAM, and never loads IR from
  // anything but the RAM
  a_mem_excl: assert property (@(posedge clk) disable iff (!rst_n) !(mem_oe && mem_wr));
  a_ir_src:   assert property (@(posedge clk) disable iff (!rst_n) ctl.ir_load |-> ctl.dest_sel == DEST_MEM);

endmodule
