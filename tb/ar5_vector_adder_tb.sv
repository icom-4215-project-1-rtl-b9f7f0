// ar5_vector_adder_tb: self-checking test of the two-lane vector adder.
//
// Drives random and corner vectors and checks each lane's sum, carry and
// signed overflow against integer arithmetic, and that lanes stay
// independent (no carry from lane 0 into lane 1).
module ar5_vector_adder_tb;
  logic [1:0][7:0] x, y, sum;
  logic [1:0]      cout, ovf;
  int checks = 0, failures = 0;

  ar5_vector_adder dut (.x, .y, .sum, .cout, .ovf);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [15:0] ix, logic [15:0] iy);
    int s, ss;
    x = ix; y = iy;
    #1;
    for (int l = 0; l < 2; l++) begin
      s  = int'(ix[l*8 +: 8]) + int'(iy[l*8 +: 8]);
      ss = int'($signed(ix[l*8 +: 8])) + int'($signed(iy[l*8 +: 8]));
      checks++;
      if (sum[l] !== s[7:0] || cout[l] !== (s > 255) || ovf[l] !== (ss > 127 || ss < -128)) begin
        failures++;
        $display("FAIL lane %0d x=%h y=%h: sum=%h c=%b v=%b", l, ix, iy, sum[l], cout[l], ovf[l]);
      end
    end
  endtask

  initial begin
    check_one(16'h00FF, 16'h0001);   // lane 0 carries, lane 1 must stay 0
    check_one(16'h7F7F, 16'h0101);   // both lanes overflow
    check_one(16'h8080, 16'h8080);
    check_one(16'h1234, 16'h4321);
    repeat (2000) check_one(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
