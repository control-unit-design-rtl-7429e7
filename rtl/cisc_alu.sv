// 8-bit ALU and condition-code register of the accumulator machine.
//
// Combinational result y = f(a, b) from the function code f (the encoding is
// listed in cisc_pkg) and the three modifier signals of the control word:
//   plus_1            forces the carry-in to 1 (INC, SUB, NEG, S <- S + 1)
//   multiword         carry-in from the C flag (ADC, SBC) or C shifted in (ROL, ROR)
//   arithmetic_shift  SHR keeps the sign bit (ASR)
// For the subtracting functions the carry flag means "borrow", so SBC uses
// ~C as its carry-in.  a is the register output bus, b the memory bus.
//
// The flags register {C, V, N, Z} loads each flag on its own Update_* signal
// at the rising clock edge, and is cleared by the asynchronous active-low
// reset.  N = y[7], Z = (y == 0); V is two's-complement overflow for the
// add/subtract functions and 0 otherwise; C is the carry out, the borrow, or
// the bit shifted out.
//
// The document names the signals (F0-F5, Multiword, Plus_1,
// Arithmetic_Shift, Update_C/V/N/Z) but not their encoding; the function
// table and flag rules are this design's.
module cisc_alu
  import cisc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] f,
  input  logic       multiword,
  input  logic       plus_1,
  input  logic       arithmetic_shift,
  input  logic [3:0] upd,          // {Update_C, Update_V, Update_N, Update_Z}
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [7:0] y,
  output logic [3:0] flags         // {C, V, N, Z}
);

  logic       c, sub, cin, co, vo;
  logic [7:0] bb;
  logic [8:0] sum;

  assign c = flags[3];

  always_comb begin
    sub = (f == ALU_SUB) || (f == ALU_DECA) || (f == ALU_NEG);
    cin = plus_1 ? 1'b1 : (multiword ? (sub ? ~c : c) : 1'b0);
    unique case (f)
      ALU_ADD:  bb = b;
      ALU_SUB:  bb = ~b;
      ALU_DECA: bb = 8'hFF;
      default:  bb = 8'h00;
    endcase
    if (f == ALU_NEG) sum = {1'b0, ~a} + {8'h00, cin};
    else              sum = {1'b0, a} + {1'b0, bb} + {8'h00, cin};
    co = 1'b0;
    vo = 1'b0;
    case (f)
      ALU_ADD, ALU_SUB, ALU_PASSA, ALU_DECA: begin
        y  = sum[7:0];
        co = sub ? ~sum[8] : sum[8];
        vo = (a[7] == bb[7]) && (y[7] != a[7]);
      end
      ALU_NEG: begin
        y  = sum[7:0];
        co = (a != 8'h00);
        vo = (a == 8'h80);
      end
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_EOR:   y = a ^ b;
      ALU_PASSB: y = b;
      ALU_COM:   y = ~a;
      ALU_SHL: begin
        y  = {a[6:0], multiword ? c : 1'b0};
        co = a[7];
      end
      ALU_SHR: begin
        y  = {arithmetic_shift ? a[7] : (multiword ? c : 1'b0), a[7:1]};
        co = a[0];
      end
      default:   y = 8'h00;       // ALU_CLR and unused codes
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) flags <= 4'b0000;
    else begin
      if (upd[3]) flags[3] <= co;
      if (upd[2]) flags[2] <= vo;
      if (upd[1]) flags[1] <= y[7];
      if (upd[0]) flags[0] <= (y == 8'h00);
    end

endmodule
