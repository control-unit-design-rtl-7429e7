// Top level: two control units side by side.
//
// 1. The SPARC-subset RISC processor (risc_cpu) with its word-wide RAM.  The
//    RAM's address comes from the processor's MAR (word address = MAR bits
//    ADDR_W+1..2) and its data port is the processor's Dest bus.  Programs are
//    placed in RAM through the load port, normally while rst_n is low; the
//    processor then starts at address 0.  pc, ir, flags and state are brought
//    out for observation.
// 2. The 8-bit accumulator machine with the two-level (micro/nano) control
//    unit, its datapath and a 256-byte memory (cisc_machine).  After reset it
//    spends 320 cycles loading its control stores (mc_booting = 1), then
//    runs from address 0.  Its memory has its own load port (mc_load_*); its
//    registers, flags, micro-PC and 28 control signals are brought out.
// Both share clk and the asynchronous active-low reset.
module control_unit_top
  import risc_pkg::*;
  import ucode_pkg::*;
#(
  parameter int unsigned RAM_ADDR_W = 28
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // RISC processor system
  input  logic                    load_we,
  input  logic [RAM_ADDR_W-1:0]   load_addr,
  input  logic [31:0]             load_data,
  output logic [31:0]             risc_pc,
  output logic [31:0]             risc_ir,
  output logic [3:0]              risc_flags,
  output seq_state_e              risc_state,
  // microprogrammed accumulator machine
  input  logic                    mc_load_we,
  input  logic [7:0]              mc_load_addr,
  input  logic [7:0]              mc_load_data,
  output logic                    mc_booting,
  output logic [7:0]              mc_acc,
  output logic [7:0]              mc_x,
  output logic [7:0]              mc_s,
  output logic [7:0]              mc_pc,
  output logic [7:0]              mc_ir,
  output logic [3:0]              mc_flags,
  output logic [UA_W-1:0]         mc_upc,
  output cisc_ctl_t               mc_ctl
);

  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic        mem_oe, mem_wr;

  risc_cpu u_cpu (
    .clk, .rst_n,
    .mem_addr, .mem_oe, .mem_wr, .mem_wdata, .mem_rdata,
    .pc(risc_pc), .ir(risc_ir), .flags(risc_flags), .state(risc_state)
  );

  ram #(.WIDTH(32), .ADDR_W(RAM_ADDR_W)) u_ram (
    .clk,
    .addr(mem_addr[RAM_ADDR_W+1:2]), .oe(mem_oe), .wr(mem_wr),
    .wdata(mem_wdata), .rdata(mem_rdata),
    .load_we, .load_addr, .load_data
  );

  cisc_machine u_mc (
    .clk, .rst_n,
    .load_we(mc_load_we), .load_addr(mc_load_addr), .load_data(mc_load_data),
    .booting(mc_booting), .acc(mc_acc), .x(mc_x), .s(mc_s), .pc(mc_pc), .ir(mc_ir),
    .flags(mc_flags), .upc(mc_upc), .ctl(mc_ctl)
  );

endmodule
