// Decoder for the encoded register-output field of a control word.
//
// Only one register may drive the register output bus, so the control store
// keeps that choice as a 2-bit code and this decoder turns it back into the
// four enables: 00 Enable_ACC, 01 Enable_X, 10 Enable_S, 11 Enable_PC.
// Exactly one enable is always active.  Combinational.
module reg_out_decoder
  import ucode_pkg::*;
(
  input  logic [1:0] field,
  output reg_out_t   en
);

  always_comb begin
    en = '0;
    unique case (field)
      2'b00: en.enable_acc = 1'b1;
      2'b01: en.enable_x   = 1'b1;
      2'b10: en.enable_s   = 1'b1;
      default: en.enable_pc = 1'b1;
    endcase
  end

endmodule
