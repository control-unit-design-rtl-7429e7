// Self-checking test of risc_sequencer: for an instruction of every class the
// state sequence from one FETCH to the next must be the planned one
// (ALU/shift/SETHI/unknown FETCH EX1 NEXT, Bicc FETCH EX1, LD/ST FETCH EX1
// EX2 NEXT, CALL/JMPL FETCH EX1 EX2), which also fixes the cycle count.
module tb_risc_sequencer;
  import risc_pkg::*;
  import risc_tb_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [31:0] ir;
  seq_state_e  state;
  int checks = 0, failures = 0;

  risc_sequencer dut (.clk, .rst_n, .ir, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [31:0] instr, input string seq, input string name);
    string got;
    got = "";
    // state is FETCH here
    ir = 32'h0;            // IR still holds the previous instruction during FETCH
    do begin
      got = {got, (state == ST_FETCH) ? "F" : (state == ST_EX1) ? "1" : (state == ST_EX2) ? "2" : "N"};
      @(negedge clk);
      if (state == ST_EX1) ir = instr;   // loaded at the end of FETCH
    end while (state != ST_FETCH && got.len() < 8);
    checks++;
    if (got != seq) begin
      failures++;
      $display("%s: got %s exp %s", name, got, seq);
    end
  endtask

  initial begin
    ir = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (state != ST_FETCH) failures++;
    rst_n = 1;
    for (int rep = 0; rep < 20; rep++) begin
      one(alu_r(6'b000000, 1, 2, 3), "F1N", "ADD");
      one(alu_i(6'b100101, 1, 2, 3), "F1N", "SLL");
      one(sethi(3, 22'h1), "F1N", "SETHI");
      one(bicc(4'b1000, 3), "F1", "BA");
      one(bicc(4'b0000, 3), "F1", "BN");
      one(ld_i(1, 0, 8), "F12N", "LD");
      one(st_i(1, 0, 8), "F12N", "ST");
      one(call(5), "F12", "CALL");
      one(jmpl_i(0, 15, 4), "F12", "JMPL");
      one({2'b10, 5'd1, 6'b111111, 19'd0}, "F1N", "unknown");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
