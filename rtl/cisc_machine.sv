// Complete microprogrammed accumulator machine: the two-level control unit
// (ucode_ctrl), the datapath (cisc_datapath) and a 256-byte memory (ram).
//
// After the asynchronous active-low reset is released, a boot loader copies
// the microprogram image built by cisc_pkg::build_image into the writable
// control stores: 256 microwords, one per cycle, then 64 nanowords.  During
// those 320 cycles booting = 1 and the control unit and datapath are held in
// reset.  In the cycle after the last nanoword the machine starts with the
// fetch step at micro-address 0 and PC = 0.  The memory can be written at
// any time through the load port (load_we, load_addr, load_data), which the
// test bench uses to place a program before or during boot.
//
// Observation outputs show the registers, flags {C, V, N, Z}, micro-PC and
// the 28 control signals of the current cycle.
//
// The document describes a control store in ROM; loading it from a
// constant at start-up through write ports is this design's choice, which
// keeps the stores identical to the writable ones of ucode_ctrl.
module cisc_machine
  import ucode_pkg::*;
  import cisc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load_we,
  input  logic [7:0]      load_addr,
  input  logic [7:0]      load_data,
  output logic            booting,
  output logic [7:0]      acc,
  output logic [7:0]      x,
  output logic [7:0]      s,
  output logic [7:0]      pc,
  output logic [7:0]      ir,
  output logic [3:0]      flags,
  output logic [UA_W-1:0] upc,
  output cisc_ctl_t       ctl
);

  localparam logic [IMG_W-1:0] IMG = build_image();
  localparam int unsigned N_UW = 1 << UA_W;
  localparam int unsigned N_NW = 1 << NA_W;

  logic [9:0]        boot_cnt;
  logic              core_rst_n;
  logic              uwe, nwe;
  logic [UW_W-1:0]   uwdata;
  nano_word_t        nwdata;
  logic [7:0]        mem_addr, mem_wdata, mem_rdata;
  logic              mem_oe, mem_wr;
  logic [OP_W-1:0]   opcode;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) boot_cnt <= '0;
    else if (booting) boot_cnt <= boot_cnt + 10'd1;

  assign booting    = (boot_cnt < 10'(N_UW + N_NW));
  assign core_rst_n = rst_n & ~booting;
  assign uwe        = rst_n && (boot_cnt < 10'(N_UW));
  assign nwe        = rst_n && booting && !uwe;
  assign uwdata     = IMG[boot_cnt[UA_W-1:0] * UW_W +: UW_W];
  assign nwdata     = nano_word_t'(IMG[N_UW * UW_W + boot_cnt[NA_W-1:0] * NW_W +: NW_W]);

  ucode_ctrl #(.NA_W(NA_W)) u_mc (
    .clk, .rst_n(core_rst_n), .opcode, .flags,
    .uwe, .uwaddr(boot_cnt[UA_W-1:0]), .uwdata,
    .nwe, .nwaddr(boot_cnt[NA_W-1:0]), .nwdata,
    .ctl, .upc
  );

  cisc_datapath u_dp (
    .clk, .rst_n(core_rst_n), .ctl,
    .mem_addr, .mem_oe, .mem_wr, .mem_wdata, .mem_rdata,
    .opcode, .flags, .acc, .x, .s, .pc, .mar(), .ir
  );

  ram #(.WIDTH(8), .ADDR_W(8)) u_ram (
    .clk, .addr(mem_addr), .oe(mem_oe), .wr(mem_wr & core_rst_n),
    .wdata(mem_wdata), .rdata(mem_rdata),
    .load_we, .load_addr, .load_data
  );

endmodule
