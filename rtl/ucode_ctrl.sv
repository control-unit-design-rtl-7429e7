// Two-level (microcode / nanocode) control unit for the accumulator machine.
//
// The micro-PC (useq) addresses a microcode memory of narrow words, each
// holding a nanocode address, a jump address and a Cond field.  The jump
// address and Cond go back to the address select logic; the nanocode address
// selects one wide nanoinstruction, which holds the control signals for the
// cycle.  Microinstructions that need the same control signals share one
// nanoinstruction, so the wide memory stays small.  The nanoword keeps the
// register-output group as a 2-bit code, which reg_out_decoder expands, so
// ctl carries all 28 named signals.
//
// A new microinstruction executes every cycle: both memories are read
// combinationally from the registered micro-PC, and ctl is valid in the same
// cycle.  Neither memory's contents is fixed by the machine description, so
// both are writable control stores filled through their write ports (uwe,
// nwe) while the unit is held in reset or idles; writes land at the clock
// edge.  Word layouts: microword = {nano address, jump address, Cond};
// nanoword = nano_word_t.  Memory contents are not reset.
module ucode_ctrl
  import ucode_pkg::*;
#(
  parameter int unsigned NA_W = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [OP_W-1:0]         opcode,
  input  logic [3:0]              flags,    // {C, V, N, Z} from the ALU
  input  logic                    uwe,
  input  logic [UA_W-1:0]         uwaddr,
  input  logic [NA_W+UA_W+3:0]    uwdata,
  input  logic                    nwe,
  input  logic [NA_W-1:0]         nwaddr,
  input  nano_word_t              nwdata,
  output cisc_ctl_t               ctl,
  output logic [UA_W-1:0]         upc
);

  typedef struct packed {
    logic [NA_W-1:0] nano_addr;
    logic [UA_W-1:0] jump_addr;
    ucond_e          cond;
  } micro_word_t;

  micro_word_t ustore [2**UA_W];
  nano_word_t  nstore [2**NA_W];
  micro_word_t uw;
  nano_word_t  nw;
  reg_out_t    reg_out;

  always_ff @(posedge clk) begin
    if (uwe) ustore[uwaddr] <= micro_word_t'(uwdata);
    if (nwe) nstore[nwaddr] <= nwdata;
  end

  assign uw = ustore[upc];
  assign nw = nstore[uw.nano_addr];

  useq #(.ADDR_W(UA_W), .OPC_W(OP_W)) u_seq (
    .clk, .rst_n, .opcode, .cond(uw.cond), .jump_addr(uw.jump_addr), .flags, .upc
  );

  reg_out_decoder u_rod (.field(nw.reg_out), .en(reg_out));

  assign ctl = '{mem: nw.mem, reg_out: reg_out, reg_in: nw.reg_in, alu: nw.alu, upd: nw.upd};

endmodule
