// Self-checking test of ucode_ctrl.  Both control stores are filled through
// their write ports with random words (so every Cond code and every nanoword
// bit is exercised), then the unit runs with random operation codes and flags.
// A reference model in the test follows the micro-PC and looks up both levels
// itself; every cycle the 28 control signals and the micro-PC are compared.
// A second phase loads a short fetch/dispatch microprogram in which two
// microinstructions share one nanoword and checks the resulting sequence.
module tb_ucode_ctrl;
  import ucode_pkg::*;
  localparam int unsigned NA = 6;

  logic            clk = 0, rst_n = 0;
  logic [6:0]      opcode;
  logic [3:0]      flags;
  logic            uwe = 0, nwe = 0;
  logic [7:0]      uwaddr = 0;
  logic [NA+11:0]  uwdata = 0;
  logic [NA-1:0]   nwaddr = 0;
  nano_word_t      nwdata = '0;
  cisc_ctl_t       ctl, e;
  logic [7:0]      upc, mupc;
  logic [NA+11:0]  uref [256];
  nano_word_t      nref [2**NA];
  int checks = 0, failures = 0, n_taken = 0;

  ucode_ctrl #(.NA_W(NA)) dut (.clk, .rst_n, .opcode, .flags, .uwe, .uwaddr, .uwdata,
                               .nwe, .nwaddr, .nwdata, .ctl, .upc);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cisc_ctl_t expand(input nano_word_t w);
    cisc_ctl_t r;
    r.mem = w.mem; r.reg_in = w.reg_in; r.alu = w.alu; r.upd = w.upd;
    r.reg_out = reg_out_t'(4'b0001 << w.reg_out);
    return r;
  endfunction

  function automatic logic [7:0] next_upc(input logic [7:0] cur, input logic [NA+11:0] uw,
                                          input logic [6:0] op, input logic [3:0] fl);
    logic [3:0] cd = uw[3:0];
    logic [7:0] ja = uw[11:4];
    logic c = fl[3], v = fl[2], n = fl[1], z = fl[0], j;
    case (cd)
      4'd1: j = 1;  4'd3: j = c;  4'd4: j = !c;  4'd5: j = v;  4'd6: j = !v;
      4'd7: j = n;  4'd8: j = !n; 4'd9: j = z;  4'd10: j = !z;
      4'd11: j = n != v; 4'd12: j = n == v; 4'd13: j = !z && n == v; 4'd14: j = z || n != v;
      default: j = 0;
    endcase
    if (cd == 4'd2) return {1'b1, op};
    if (j) return ja;
    return cur + 1;
  endfunction

  task automatic write_stores();
    rst_n = 0;
    for (int k = 0; k < 256; k++) begin
      @(negedge clk); uwe = 1; uwaddr = 8'(k); uwdata = uref[k];
    end
    @(negedge clk); uwe = 0;
    for (int k = 0; k < 2**NA; k++) begin
      @(negedge clk); nwe = 1; nwaddr = NA'(k); nwdata = nref[k];
    end
    @(negedge clk); nwe = 0;
    rst_n = 1;
    mupc = 0;
  endtask

  task automatic cycle_check(input string tag);
    #1;
    e = expand(nref[uref[mupc][NA+11:12]]);
    checks += 2;
    if (upc !== mupc) begin failures++; $display("%s upc %h exp %h", tag, upc, mupc); end
    if (ctl !== e) begin failures++; $display("%s ctl %h exp %h at %h", tag, ctl, e, mupc); end
  endtask

  initial begin
    opcode = 0; flags = 0;
    // phase 1: random stores
    for (int k = 0; k < 256; k++) uref[k] = {NA'($urandom), 8'($urandom), 4'($urandom)};
    for (int k = 0; k < 2**NA; k++) nref[k] = nano_word_t'($urandom);
    write_stores();
    for (int t = 0; t < 20000; t++) begin
      opcode = 7'($urandom); flags = 4'($urandom);
      cycle_check("random");
      mupc = next_upc(mupc, uref[mupc], opcode, flags);
      @(negedge clk);
    end

    // phase 2: fetch (0) -> dispatch; opcode 5 -> 133: ALU op, jump-if-Z, back to fetch
    foreach (uref[k]) uref[k] = {NA'(0), 8'd0, 4'd1};            // default: nano 0, jump 0
    foreach (nref[k]) nref[k] = '0;
    nref[1] = '0; nref[1].mem.oe = 1; nref[1].mem.load_ir = 1; nref[1].mem.sel_pc = 1;
    nref[1].reg_in.inc_pc = 1;                                   // fetch word
    nref[2] = '0; nref[2].reg_out = 2'b01; nref[2].alu.f = 6'h21; nref[2].upd = 4'hf;
    nref[2].reg_in.load_acc = 1;                                 // ALU op on X into ACC
    uref[0]   = {NA'(1), 8'd0,   4'd2};                          // fetch, dispatch
    uref[133] = {NA'(2), 8'd0,   4'd0};                          // ALU, next
    uref[134] = {NA'(2), 8'd140, 4'd9};                          // same nanoword, jump 140 if Z
    uref[135] = {NA'(0), 8'd0,   4'd1};                          // back to fetch
    uref[140] = {NA'(1), 8'd0,   4'd1};                          // fetch word again, jump 0
    write_stores();
    opcode = 7'd5;
    for (int t = 0; t < 40; t++) begin
      flags = (t % 7 == 3) ? 4'b0001 : 4'b0000;
      cycle_check("program");
      if (mupc == 8'd134 && flags[0]) n_taken++;
      mupc = next_upc(mupc, uref[mupc], opcode, flags);
      @(negedge clk);
    end
    checks++;
    if (n_taken == 0) failures++;
    checks++;
    if (!(ctl.reg_out.enable_acc ^ ctl.reg_out.enable_x ^ ctl.reg_out.enable_s ^ ctl.reg_out.enable_pc))
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
