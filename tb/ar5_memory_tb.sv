// ar5_memory_tb: self-checking test of the 256-byte memory.
//
// Fills all 256 bytes through the host port, reads them back through both
// read ports, then mixes random processor writes, host writes (including both
// in the same cycle, where the host wins) and reads against an array model.
module ar5_memory_tb;
  logic clk = 0, we = 0, host_we = 0;
  logic [7:0] addr = '0, wdata = '0, host_addr = '0, host_wdata = '0, dbg_addr = '0;
  logic [7:0] rdata, dbg_rdata;
  logic [7:0] m [256];
  int checks = 0, failures = 0;

  ar5_memory #(.AW(8), .DW(8)) dut (.clk, .addr, .rdata, .we, .wdata, .host_we, .host_addr,
                                    .host_wdata, .dbg_addr, .dbg_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); host_we = 1; host_addr = 8'(a); host_wdata = 8'(a * 7 + 3); m[a] = 8'(a * 7 + 3);
    end
    @(negedge clk); host_we = 0;
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a); dbg_addr = 8'(255 - a); #1;
      checks++;
      if (rdata !== m[a] || dbg_rdata !== m[255 - a]) begin
        failures++; $display("FAIL fill a=%0d rdata=%h dbg=%h", a, rdata, dbg_rdata);
      end
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom); host_we = ($urandom % 4) == 0;
      addr = 8'($urandom % 16); wdata = 8'($urandom);
      host_addr = ($urandom % 2) ? addr : 8'($urandom % 16); host_wdata = 8'($urandom);
      dbg_addr = 8'($urandom % 16);
      #1 checks++;
      if (rdata !== m[addr] || dbg_rdata !== m[dbg_addr]) begin
        failures++; $display("FAIL read addr=%h rdata=%h expected %h", addr, rdata, m[addr]);
      end
      @(posedge clk);
      if (host_we) m[host_addr] = host_wdata;
      else if (we) m[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
