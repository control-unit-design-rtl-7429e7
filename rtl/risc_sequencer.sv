// Sequencer of the SPARC-subset processor.
//
// With sequencing separated from decoding, the sequencer only keeps track of
// where the current instruction is in its execution; the instruction register
// holds the rest of the controller state.  Its state is one of
//   FETCH  IR <- mem(MAR)
//   EX1    first execute cycle
//   EX2    second execute cycle (LD, ST, CALL, JMPL)
//   NEXT   PC, MAR <- PC + 4
// and its next state depends on the operation code only, never on the flags:
//   ALU, shift, SETHI, unknown:  FETCH EX1 NEXT        (3 cycles)
//   Bicc:                        FETCH EX1             (2 cycles; EX1 writes
//                                                       PC+disp or PC+4)
//   LD, ST:                      FETCH EX1 EX2 NEXT    (4 cycles)
//   CALL, JMPL:                  FETCH EX1 EX2         (3 cycles)
// The cycle counts are this design's.  Reset enters FETCH (PC and MAR reset
// to 0 in the datapath), so the first instruction is read from address 0.
module risc_sequencer
  import risc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [31:0] ir,
  output seq_state_e state
);

  seq_state_e nxt;
  iclass_e    ic;

  always_comb begin
    ic  = classify(ir);
    nxt = ST_FETCH;
    unique case (state)
      ST_NEXT:  nxt = ST_FETCH;
      ST_FETCH: nxt = ST_EX1;
      ST_EX1: begin
        unique case (ic)
          IC_BICC:                        nxt = ST_FETCH;
          IC_LD, IC_ST, IC_CALL, IC_JMPL: nxt = ST_EX2;
          default:                        nxt = ST_NEXT;
        endcase
      end
      default: nxt = (ic == IC_LD || ic == IC_ST) ? ST_NEXT : ST_FETCH;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ST_FETCH;
    else        state <= nxt;
  end

endmodule
