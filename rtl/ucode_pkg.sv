// Types of the microcoded control unit for the accumulator machine.
//
// The 28 control signals are grouped as the machine's buses and units use
// them: memory bus, register output bus, register input bus, ALU, and
// condition-code updates.  In the stored (nanocode) form the register output
// group is encoded from four one-hot enables down to two bits, because only
// one register may drive that bus at a time.
package ucode_pkg;

  localparam int unsigned UA_W   = 8;   // micro-address: 8-bit state
  localparam int unsigned OP_W   = 7;   // 7-bit operation code

  // sequencing field ("Cond") of a microinstruction
  typedef enum logic [3:0] {
    UC_NEXT     = 4'd0,   // uPC + 1
    UC_JUMP     = 4'd1,   // jump address
    UC_DISPATCH = 4'd2,   // operation code
    UC_JC       = 4'd3,   // jump if C
    UC_JNC      = 4'd4,
    UC_JV       = 4'd5,
    UC_JNV      = 4'd6,
    UC_JN       = 4'd7,
    UC_JNN      = 4'd8,
    UC_JZ       = 4'd9,
    UC_JNZ      = 4'd10,
    UC_JLT      = 4'd11,  // jump if N xor V
    UC_JGE      = 4'd12,
    UC_JGT      = 4'd13,  // jump if not Z and not (N xor V)
    UC_JLE      = 4'd14
  } ucond_e;

  typedef struct packed {
    logic enable_reg;
    logic oe;
    logic load_ir;
    logic wr;
    logic sel_pc;
  } mem_ctl_t;

  typedef struct packed {
    logic load_acc;
    logic load_x;
    logic load_s;
    logic load_pc;
    logic inc_pc;
    logic load_mar;
  } reg_in_t;

  typedef struct packed {
    logic [5:0] f;           // F5..F0, ALU function
    logic       multiword;
    logic       plus_1;
    logic       arithmetic_shift;
  } alu_ctl_t;

  typedef struct packed {
    logic update_c;
    logic update_v;
    logic update_n;
    logic update_z;
  } upd_t;

  // Reg O/P enables, one-hot; bit 0 Enable_ACC .. bit 3 Enable_PC
  typedef struct packed {
    logic enable_pc;
    logic enable_s;
    logic enable_x;
    logic enable_acc;
  } reg_out_t;

  // the 28 control signals as they leave the control unit
  typedef struct packed {
    mem_ctl_t mem;
    reg_out_t reg_out;
    reg_in_t  reg_in;
    alu_ctl_t alu;
    upd_t     upd;
  } cisc_ctl_t;

  // stored form: Reg O/P encoded 00 ACC, 01 X, 10 S, 11 PC
  typedef struct packed {
    mem_ctl_t   mem;
    logic [1:0] reg_out;
    reg_in_t    reg_in;
    alu_ctl_t   alu;
    upd_t       upd;
  } nano_word_t;

endpackage
