// ar5_vstack_tb: self-checking test of the vector stack.
//
// Runs random pushes and pops against a queue kept in the testbench and
// checks TOS, SOS and the count after every cycle, including pushes on a full
// stack (bottom entry dropped), pops of an empty stack, simultaneous push and
// pop, and reset.
module ar5_vstack_tb;
  localparam int DEPTH = 2;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [15:0] din = '0, tos, sos;
  logic [1:0]  count;
  int checks = 0, failures = 0;
  logic [15:0] model [$];

  ar5_vstack #(.DEPTH(DEPTH), .W(16)) dut (.clk, .rst_n, .push, .pop, .din, .tos, .sos, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    logic [15:0] et, es;
    et = (model.size() > 0) ? model[0] : 16'h0;
    es = (model.size() > 1) ? model[1] : 16'h0;
    checks++;
    if (tos !== et || sos !== es || count !== 2'(model.size())) begin
      failures++;
      $display("FAIL tos=%h sos=%h count=%0d, expected %h %h %0d", tos, sos, count, et, es, model.size());
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); compare();
    for (int i = 0; i < 1500; i++) begin
      push = 1'($urandom); pop = 1'($urandom); din = 16'($urandom);
      @(posedge clk); #1;
      if (push && pop) begin
        if (model.size() > 0) model[0] = din; else model.push_front(din);
      end else if (push) begin
        model.push_front(din);
        if (model.size() > DEPTH) void'(model.pop_back());
      end else if (pop && model.size() > 0) void'(model.pop_front());
      push = 0; pop = 0;
      @(negedge clk); compare();
    end
    rst_n = 0; @(posedge clk); #1; rst_n = 1; model.delete();
    @(negedge clk); compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
