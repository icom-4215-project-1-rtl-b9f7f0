// ar5_regfile_tb: self-checking test of the register file.
//
// Checks that all eight registers reset to zero, then performs random writes
// and reads against an array model, checking the register-f read port, the
// dedicated R7 port and the observation outputs every cycle.
module ar5_regfile_tb;
  logic clk = 0, rst_n = 0, we = 0;
  logic [2:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata, r7;
  logic [7:0][7:0] regs;
  logic [7:0] m [8];
  int checks = 0, failures = 0;

  ar5_regfile #(.NREGS(8), .W(8)) dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata, .r7, .regs);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (rdata !== m[raddr] || r7 !== m[7]) begin
      failures++; $display("FAIL raddr=%0d rdata=%h r7=%h expected %h %h", raddr, rdata, r7, m[raddr], m[7]);
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (regs[k] !== m[k]) begin failures++; $display("FAIL regs[%0d]=%h expected %h", k, regs[k], m[k]); end
    end
  endtask

  initial begin
    we = 1; wdata = 8'hFF;
    repeat (2) @(posedge clk);
    rst_n = 1; we = 0;
    foreach (m[k]) m[k] = 8'h00;
    @(negedge clk); compare();
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 3'($urandom); wdata = 8'($urandom); raddr = 3'($urandom);
      #1 compare();                       // read is combinational, write not yet done
      @(posedge clk); #1;
      if (we) m[waddr] = wdata;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
