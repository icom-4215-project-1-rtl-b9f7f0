// ar5_io_tb: self-checking test of the memory-mapped keyboard and display.
//
// Sweeps all 256 addresses checking the decode (only 250..255 selected),
// reads the keyboard word at 250 (high byte) and 251 (low byte), writes
// each display byte and checks the display outputs, the one-cycle strobes,
// read-back, and that stores to the keyboard addresses change nothing.
module ar5_io_tb;
  logic clk = 0, rst_n = 0, we = 0, sel;
  logic [7:0] addr = '0, wdata = '0, rdata;
  logic [15:0] kbd_in = 16'h4D21;
  logic [3:0][7:0] display, ed;
  logic [3:0] disp_strobe;
  int checks = 0, failures = 0;

  ar5_io dut (.clk, .rst_n, .addr, .we, .wdata, .kbd_in, .sel, .rdata, .display, .disp_strobe);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; ed = '0;
    @(negedge clk);
    chk(display === '0 && disp_strobe === '0, "reset");
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a); #1;
      chk(sel === (a >= 250), $sformatf("decode %0d", a));
    end
    for (int i = 0; i < 200; i++) begin
      kbd_in = 16'($urandom);
      addr = 8'd250; #1 chk(rdata === kbd_in[15:8], "kbd high byte");
      addr = 8'd251; #1 chk(rdata === kbd_in[7:0], "kbd low byte");
    end
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      addr = 8'(250 + $urandom % 6); wdata = 8'($urandom); we = 1;
      @(posedge clk); #1;
      if (addr >= 252) begin
        ed[addr - 252] = wdata;
        chk(disp_strobe === 4'(1 << (addr - 252)), "strobe");
      end else chk(disp_strobe === 4'b0, "no strobe on keyboard store");
      chk(display === ed, $sformatf("display after store to %0d", addr));
      @(negedge clk); we = 0;
      @(posedge clk); #1;
      chk(disp_strobe === 4'b0, "strobe lasts one cycle");
      for (int k = 0; k < 4; k++) begin
        addr = 8'(252 + k); #1 chk(rdata === ed[k], "display read-back");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
