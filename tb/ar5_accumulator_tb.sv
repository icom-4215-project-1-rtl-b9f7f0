// ar5_accumulator_tb: self-checking test of the accumulator register.
//
// Checks the reset value, that the register holds while load is low and takes
// d at the clock edge when load is high, with random data.
module ar5_accumulator_tb;
  logic clk = 0, rst_n = 0, load = 0;
  logic [7:0] d = '0, q, expect_q;
  int checks = 0, failures = 0;

  ar5_accumulator #(.W(8)) dut (.clk, .rst_n, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1; d = 8'hA5;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (q !== 8'h00) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1; expect_q = 8'h00;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      load = 1'($urandom); d = 8'($urandom);
      if (load) expect_q = d;
      @(posedge clk); #1;
      checks++;
      if (q !== expect_q) begin failures++; $display("FAIL q=%h expected %h", q, expect_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
