// Self-checking test of ram: random reads, writes and load-port writes
// against a reference array.  Read data must appear in the same cycle as OE
// (no wait states); a write must be visible from the next cycle on; the load
// port must win over WR at the same address.
module tb_ram;
  localparam int unsigned AW = 8;
  logic          clk = 0, oe, wr, load_we;
  logic [AW-1:0] addr, load_addr;
  logic [31:0]   wdata, rdata, load_data;
  logic [31:0]   ref_mem [2**AW];
  int checks = 0, failures = 0;

  ram #(.WIDTH(32), .ADDR_W(AW)) dut (.clk, .addr, .oe, .wr, .wdata, .rdata, .load_we, .load_addr, .load_data);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    oe = 0; wr = 0; load_we = 0; addr = 0; wdata = 0; load_addr = 0; load_data = 0;
    // fill through the load port
    for (int k = 0; k < 2**AW; k++) begin
      @(negedge clk);
      load_we = 1; load_addr = AW'(k); load_data = $urandom; ref_mem[k] = load_data;
    end
    @(negedge clk);
    load_we = 0;
    for (int t = 0; t < 10000; t++) begin
      @(negedge clk);
      addr  = AW'($urandom);
      oe    = 1'($urandom);
      wr    = !oe && $urandom_range(1);
      wdata = $urandom;
      load_we   = (t % 17 == 0);
      load_addr = (t % 34 == 0) ? addr : AW'($urandom);
      load_data = $urandom;
      #1;
      checks++;
      if (rdata !== (oe ? ref_mem[addr] : 32'h0)) begin
        failures++;
        $display("read %h got %h exp %h", addr, rdata, ref_mem[addr]);
      end
      @(posedge clk);
      if (load_we)  ref_mem[load_addr] = load_data;
      else if (wr)  ref_mem[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
