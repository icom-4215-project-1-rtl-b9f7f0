// ar5_ir_tb: self-checking test of the instruction register.
//
// Loads random instruction words as two bytes, high byte first, and checks
// the assembled word and the opcode (15..11), register f (10..8) and operand
// (7..0) fields, and that each byte load leaves the other byte alone.
module ar5_ir_tb;
  import ar5_pkg::*;
  logic clk = 0, rst_n = 0, load_hi = 0, load_lo = 0;
  logic [7:0]  byte_in = '0, operand;
  logic [15:0] ir, w;
  logic [2:0]  rf;
  opcode_t     opcode;
  int checks = 0, failures = 0;

  ar5_ir dut (.clk, .rst_n, .load_hi, .load_lo, .byte_in, .ir, .opcode, .rf, .operand);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++;
    if (ir !== 16'h0) begin failures++; $display("FAIL reset ir=%h", ir); end
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      w = 16'($urandom);
      if (i == 0) w = 16'h6880;          // STA 0x80 from the example program
      @(negedge clk); load_hi = 1; byte_in = w[15:8];
      @(negedge clk); load_hi = 0; load_lo = 1; byte_in = w[7:0];
      @(negedge clk); load_lo = 0; byte_in = 8'($urandom);
      checks++;
      if (ir !== w || opcode !== opcode_t'(w[15:11]) || rf !== w[10:8] || operand !== w[7:0]) begin
        failures++;
        $display("FAIL ir=%h op=%b rf=%0d operand=%h, expected %h", ir, opcode, rf, operand, w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
