// ar5_pc_tb: self-checking test of the program counter.
//
// Checks reset to 0, increment by one, load (which has priority over
// increment), hold, and the wrap from 255 to 0.
module ar5_pc_tb;
  logic clk = 0, rst_n = 0, inc = 0, load = 0;
  logic [7:0] d = '0, q, e;
  int checks = 0, failures = 0;

  ar5_pc #(.W(8)) dut (.clk, .rst_n, .inc, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inc = 1;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (q !== 8'd0) begin failures++; $display("FAIL reset q=%0d", q); end
    rst_n = 1; e = 0;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      inc = ($urandom % 4) != 0; load = ($urandom % 8) == 0; d = 8'($urandom);
      if (load) e = d; else if (inc) e = e + 8'd1;
      @(posedge clk); #1;
      checks++;
      if (q !== e) begin failures++; $display("FAIL inc=%b load=%b d=%0d q=%0d expected %0d", inc, load, d, q, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
