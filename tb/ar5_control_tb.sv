// ar5_control_tb: self-checking test of the control unit.
//
// Step mode: each start pulse must produce exactly FETCH_HI, FETCH_LO, EXEC
// and a return to IDLE, with the fetch control bits set in the two fetch
// cycles. In EXEC the control word for every one of the 32 opcode values is
// compared with an expected table written here from the instruction set,
// with every combination of status flags for the branches. Run mode must
// fetch back to back (three cycles per instruction) until run_mode drops or
// STOP arrives; STOP must hold HALT until reset.
module ar5_control_tb;
  import ar5_pkg::*;
  logic    clk = 0, rst_n = 0, run_mode = 0, start = 0;
  opcode_t opcode = OP_NOP;
  flags_t  sr = '0;
  ctrl_t   ctrl;
  state_t  state;
  logic    halted, busy, instr_done;
  int checks = 0, failures = 0;

  ar5_control dut (.clk, .rst_n, .run_mode, .start, .opcode, .sr, .ctrl, .state, .halted, .busy, .instr_done);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (state=%s)", what, state.name()); end
  endtask

  // Expected EXEC control word, from the instruction table.
  function automatic ctrl_t expect_exec(logic [4:0] op, flags_t f);
    ctrl_t c = '0;
    c.addr_sel = ADDR_PC; c.alu_op = ALU_PASSB; c.b_sel = B_REG;
    case (op)
      5'b00000: begin c.alu_op = ALU_AND;  c.acc_load = 1; c.sr_alu = 1; end
      5'b00001: begin c.alu_op = ALU_OR;   c.acc_load = 1; c.sr_alu = 1; end
      5'b00010: begin c.alu_op = ALU_XOR;  c.acc_load = 1; c.sr_alu = 1; end
      5'b00011: begin c.alu_op = ALU_ADDC; c.acc_load = 1; c.sr_alu = 1; end
      5'b00100: begin c.alu_op = ALU_SUB;  c.acc_load = 1; c.sr_alu = 1; end
      5'b00101: begin c.acc_load = 1; c.acc_vadd = 1; c.sr_vadd = 1; c.vbuf_load = 1; end
      5'b00110: begin c.alu_op = ALU_NEG;  c.acc_load = 1; c.sr_alu = 1; end
      5'b00111: begin c.alu_op = ALU_NOT;  c.acc_load = 1; c.sr_alu = 1; end
      5'b01000: begin c.alu_op = ALU_RLC;  c.acc_load = 1; c.sr_alu = 1; end
      5'b01001: begin c.alu_op = ALU_RRC;  c.acc_load = 1; c.sr_alu = 1; end
      5'b01010: c.acc_load = 1;
      5'b01011: c.rf_we = 1;
      5'b01100: begin c.addr_sel = ADDR_IR; c.b_sel = B_MEM; c.acc_load = 1; end
      5'b01101: begin c.addr_sel = ADDR_IR; c.mem_we = 1; end
      5'b01110: begin c.b_sel = B_IMM; c.acc_load = 1; end
      5'b10000: c.pc_load = f.z;
      5'b10001: c.pc_load = f.c;
      5'b10010: c.pc_load = f.n;
      5'b10011: c.pc_load = f.o;
      default: ;
    endcase
    return c;
  endfunction

  task automatic pulse_start();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(state == S_IDLE && !busy && !halted, "idle after reset");
    repeat (3) @(negedge clk);
    chk(state == S_IDLE, "stays idle without start");

    // Step mode: every opcode value, every flag combination.
    run_mode = 0;
    for (int op = 0; op < 32; op++) begin
      if (op == 5'b11111) continue;
      for (int f = 0; f < 16; f++) begin
        if (op[4:2] != 3'b100 && f != 0) continue;
        opcode = opcode_t'(5'(op)); sr = flags_t'(4'(f));
        @(negedge clk); start = 1;
        @(posedge clk); #1 start = 0;
        chk(state == S_FETCH_HI && ctrl.ir_load_hi && ctrl.pc_inc && ctrl.addr_sel == ADDR_PC
            && !ctrl.ir_load_lo && busy, "fetch high");
        @(posedge clk); #1;
        chk(state == S_FETCH_LO && ctrl.ir_load_lo && ctrl.pc_inc && ctrl.addr_sel == ADDR_PC
            && !ctrl.ir_load_hi, "fetch low");
        @(posedge clk); #1;
        chk(state == S_EXEC && instr_done, "exec");
        chk(ctrl == expect_exec(5'(op), sr), $sformatf("exec control word op=%05b sr=%04b got %h expected %h",
            op, f, ctrl, expect_exec(5'(op), sr)));
        @(posedge clk); #1;
        chk(state == S_IDLE && !instr_done && ctrl == expect_exec(5'b11000, '0), "step returns to idle");
      end
    end

    // Run mode: ten instructions back to back, three cycles each.
    begin
      int done_cnt = 0, cycles = 0;
      run_mode = 1; opcode = OP_NOP;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (done_cnt < 10) begin
        @(posedge clk); #1 cycles++;
        if (instr_done) done_cnt++;
      end
      chk(cycles == 29, $sformatf("run mode 10 instructions in %0d cycles, expected 29", cycles));
      // Dropping run_mode stops at the next boundary.
      @(negedge clk); run_mode = 0;
      while (!instr_done) @(negedge clk);
      @(negedge clk);
      chk(state == S_IDLE, "run mode paused at instruction boundary");
      repeat (4) @(negedge clk);
      chk(state == S_IDLE, "paused stays idle");
    end

    // STOP in run mode halts until reset.
    run_mode = 1; opcode = OP_NOP;
    pulse_start();
    repeat (5) @(negedge clk);
    opcode = OP_STOP;
    repeat (4) @(negedge clk);
    chk(state == S_HALT && halted && !busy, "STOP halts");
    @(negedge clk); start = 1; opcode = OP_NOP;
    repeat (6) @(negedge clk);
    start = 0;
    chk(state == S_HALT, "halt ignores start");
    rst_n = 0; @(negedge clk); rst_n = 1;
    chk(state == S_IDLE && !halted, "reset leaves halt");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
