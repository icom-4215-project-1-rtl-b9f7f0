// ar5_sr_tb: self-checking test of the status register.
//
// Checks reset to zero and that each flag bit changes only when its write
// mask bit is set, with random masks and data.
module ar5_sr_tb;
  import ar5_pkg::*;
  logic clk = 0, rst_n = 0;
  flags_t upd = '1, d = '1, q;
  logic [3:0] e;
  int checks = 0, failures = 0;

  ar5_sr dut (.clk, .rst_n, .upd, .d, .q);

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
    if (q !== 4'b0000) begin failures++; $display("FAIL reset q=%b", q); end
    rst_n = 1; e = 4'b0000;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      upd = 4'($urandom); d = 4'($urandom);
      for (int k = 0; k < 4; k++) if (upd[k]) e[k] = d[k];
      @(posedge clk); #1;
      checks++;
      if (q !== e) begin failures++; $display("FAIL upd=%b d=%b q=%b expected %b", upd, d, q, e); end
    end
    // Named fields sit at the documented positions: O N C Z = bits 3..0.
    @(negedge clk); upd = '1; d = '{o: 1'b1, n: 1'b0, c: 1'b0, z: 1'b0};
    @(posedge clk); #1 checks++;
    if (q !== 4'b1000) begin failures++; $display("FAIL O position q=%b", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
