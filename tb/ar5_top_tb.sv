// ar5_top_tb: end-to-end test of the RISC AR5 processor at its default size.
//
// A reference model of the instruction set, written here from the
// instruction table independently of the RTL, runs the same programs as the
// processor:
//   1. The example program of the processor's definition (LDI/STA rf/
//      STA addr/ADDC/STOP), read from tb/ar5_example_program.hex with one
//      instruction word per line, in run mode: final registers, memory, A, SR and
//      the cycle count (3 cycles per instruction) are checked.
//   2. A program that copies the keyboard word to the display and performs a
//      VADD, in run mode, checking display, strobes, A and VBuffer.
//   3. Random programs filling the 128-byte program area, in step mode: after
//      every instruction PC, IR, A, SR, VBuffer, R0..R7, the vector stack and
//      the display are compared with the model, and the whole memory at the
//      end. Vectors are pushed onto the vector stack between steps.
//   4. A run-mode pause (run_mode lowered mid-program) and resume.
// The mechanisms the design has (run mode, step mode, pause, STOP/halt,
// each of the 21 instructions, each branch taken and not taken, keyboard
// read, display write, vector push, carry and overflow) are counted; one
// that never happens counts as a failure.
module ar5_top_tb;
  import ar5_pkg::*;

  logic clk = 0, rst_n = 0, run_mode = 0, start = 0;
  logic host_we = 0, vs_push = 0, vs_pop = 0;
  logic [7:0]  host_addr = '0, host_wdata = '0, dbg_addr = '0, dbg_rdata;
  logic [15:0] kbd_in = 16'h4F4B, vs_data = '0;
  logic [3:0][7:0] display;
  logic [3:0]  disp_strobe;
  dbg_t        dbg;
  logic        halted, busy, instr_done;

  int checks = 0, failures = 0;

  ar5_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------------
  // Reference model
  // ------------------------------------------------------------------
  logic [7:0]  m_mem [256];
  logic [7:0]  m_r [8];
  logic [7:0]  m_pc, m_a, m_vbuff;
  logic [3:0]  m_sr;                 // O N C Z
  logic [15:0] m_ir;
  logic [7:0]  m_disp [4];
  logic [15:0] m_vs [$];
  bit          m_halt;

  // coverage
  int cov_op [32];
  int cov_br_taken, cov_br_not, cov_kbd, cov_disp, cov_push, cov_carry, cov_ovf;
  int cov_step, cov_run, cov_pause, cov_halt;

  function automatic logic [7:0] m_read(logic [7:0] ad);
    if (ad == 8'd250) begin cov_kbd++; return kbd_in[15:8]; end
    if (ad == 8'd251) begin cov_kbd++; return kbd_in[7:0]; end
    if (ad >= 8'd252) return m_disp[ad - 8'd252];
    return m_mem[ad];
  endfunction

  function automatic void m_reset();
    m_pc = 0; m_a = 0; m_vbuff = 0; m_sr = 0; m_ir = 0; m_halt = 0;
    foreach (m_r[k]) m_r[k] = 0;
    foreach (m_disp[k]) m_disp[k] = 0;
    m_vs.delete();
  endfunction

  function automatic void m_push(logic [15:0] v);
    m_vs.push_front(v);
    if (m_vs.size() > 2) void'(m_vs.pop_back());
  endfunction

  function automatic void set_nz(logic [7:0] v);
    m_sr[2] = v[7];
    m_sr[0] = (v == 0);
  endfunction

  function automatic void m_step();
    logic [4:0] op;
    logic [2:0] f;
    logic [7:0] x, tl, sl, th, shh;
    int s, ss;
    bit cond;
    m_ir = {m_mem[m_pc], m_mem[8'(m_pc + 1)]};
    m_pc = m_pc + 8'd2;
    op = m_ir[15:11]; f = m_ir[10:8]; x = m_ir[7:0];
    cov_op[op]++;
    case (op)
      5'b00000: begin m_a = m_a & m_r[f]; set_nz(m_a); end
      5'b00001: begin m_a = m_a | m_r[f]; set_nz(m_a); end
      5'b00010: begin m_a = m_a ^ m_r[f]; set_nz(m_a); end
      5'b00011: begin
        s  = int'(m_a) + int'(m_r[f]) + int'(m_sr[1]);
        ss = int'($signed(m_a)) + int'($signed(m_r[f])) + int'(m_sr[1]);
        m_a = s[7:0]; set_nz(m_a); m_sr[1] = s > 255; m_sr[3] = ss > 127 || ss < -128;
      end
      5'b00100: begin
        ss = int'($signed(m_a)) - int'($signed(m_r[f]));
        m_sr[1] = m_a < m_r[f]; m_a = m_a - m_r[f]; set_nz(m_a); m_sr[3] = ss > 127 || ss < -128;
      end
      5'b00101: begin
        tl = (m_vs.size() > 0) ? m_vs[0][7:0]  : 8'h0;
        th = (m_vs.size() > 0) ? m_vs[0][15:8] : 8'h0;
        sl = (m_vs.size() > 1) ? m_vs[1][7:0]  : 8'h0;
        shh = (m_vs.size() > 1) ? m_vs[1][15:8] : 8'h0;
        s  = int'(tl) + int'(sl);
        ss = int'($signed(tl)) + int'($signed(sl));
        m_a = s[7:0]; set_nz(m_a); m_sr[1] = s > 255; m_sr[3] = ss > 127 || ss < -128;
        m_vbuff = th + shh;
      end
      5'b00110: begin
        m_sr[3] = (m_a == 8'h80); m_sr[1] = (m_a != 0); m_a = 8'h00 - m_a; set_nz(m_a);
      end
      5'b00111: begin m_a = ~m_a; set_nz(m_a); end
      5'b01000: begin
        {m_sr[1], m_a} = {m_a, m_sr[1]}; set_nz(m_a);
      end
      5'b01001: begin
        {m_a, m_sr[1]} = {m_sr[1], m_a}; set_nz(m_a);
      end
      5'b01010: m_a = m_r[f];
      5'b01011: m_r[f] = m_a;
      5'b01100: m_a = m_read(x);
      5'b01101: begin
        if (x >= 8'd252) begin m_disp[x - 8'd252] = m_a; cov_disp++; end
        else if (x < 8'd250) m_mem[x] = m_a;
      end
      5'b01110: m_a = x;
      5'b10000, 5'b10001, 5'b10010, 5'b10011: begin
        case (op[1:0])
          2'd0: cond = m_sr[0];
          2'd1: cond = m_sr[1];
          2'd2: cond = m_sr[2];
          default: cond = m_sr[3];
        endcase
        if (cond) begin m_pc = m_r[7]; cov_br_taken++; end else cov_br_not++;
      end
      5'b11111: m_halt = 1;
      default: ;
    endcase
    if (m_sr[1]) cov_carry++;
    if (m_sr[3]) cov_ovf++;
  endfunction

  // ------------------------------------------------------------------
  // Driving the processor
  // ------------------------------------------------------------------
  function automatic logic [15:0] enc(logic [4:0] op, logic [2:0] f, logic [7:0] x);
    return {op, f, x};
  endfunction

  task automatic load_byte(logic [7:0] ad, logic [7:0] v);
    @(negedge clk); host_we = 1; host_addr = ad; host_wdata = v;
    m_mem[ad] = v;
    @(negedge clk); host_we = 0;
  endtask

  task automatic do_reset();
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    m_reset();
  endtask

  task automatic push_vec(logic [15:0] v);
    @(negedge clk); vs_push = 1; vs_data = v;
    @(negedge clk); vs_push = 0;
    m_push(v); cov_push++;
  endtask

  task automatic compare_state(string where);
    bit ok;
    ok = dbg.pc === m_pc && dbg.ir === m_ir && dbg.a === m_a && dbg.sr === m_sr && dbg.vbuff === m_vbuff;
    for (int k = 0; k < 8; k++) ok &= (dbg.regs[k] === m_r[k]);
    for (int k = 0; k < 4; k++) ok &= (display[k] === m_disp[k]);
    ok &= dbg.vs_tos === ((m_vs.size() > 0) ? m_vs[0] : 16'h0);
    ok &= dbg.vs_sos === ((m_vs.size() > 1) ? m_vs[1] : 16'h0);
    ok &= halted === m_halt;
    chk(ok, $sformatf("%s: pc=%h ir=%h a=%h sr=%b vb=%h | model pc=%h ir=%h a=%h sr=%b vb=%h",
        where, dbg.pc, dbg.ir, dbg.a, dbg.sr, dbg.vbuff, m_pc, m_ir, m_a, m_sr, m_vbuff));
  endtask

  task automatic compare_memory();
    for (int ad = 0; ad < 250; ad++) begin
      dbg_addr = 8'(ad); #1;
      chk(dbg_rdata === m_mem[ad], $sformatf("memory[%0d]=%h expected %h", ad, dbg_rdata, m_mem[ad]));
    end
  endtask

  // Run mode until STOP; returns the number of busy clock cycles.
  task automatic run_to_halt(output int cycles);
    int steps = 0, guard = 0;
    cycles = 0;
    @(negedge clk); run_mode = 1; start = 1;
    @(posedge clk); #1 start = 0;
    while (!halted && guard < 5000) begin
      if (busy) cycles++;
      @(posedge clk); #1 guard++;
    end
    while (!m_halt && steps < 2000) begin m_step(); steps++; end
    @(negedge clk);
    cov_run++;
    if (halted) cov_halt++;
  endtask

  // Step mode: one instruction.
  task automatic step_one();
    @(negedge clk); run_mode = 0; start = 1;
    @(negedge clk); start = 0;
    while (!instr_done) @(negedge clk);
    @(negedge clk);
    m_step();
    cov_step++;
  endtask

  // Random program generator: instructions 0..126, STOP at 126.
  function automatic logic [15:0] rand_instr();
    logic [4:0] ops [21] = '{5'b00000, 5'b00001, 5'b00010, 5'b00011, 5'b00100, 5'b00101, 5'b00110,
                             5'b00111, 5'b01000, 5'b01001, 5'b01010, 5'b01011, 5'b01100, 5'b01101,
                             5'b01110, 5'b10000, 5'b10001, 5'b10010, 5'b10011, 5'b11000, 5'b11010};
    logic [4:0] op;
    logic [7:0] x;
    logic [2:0] f;
    op = ops[$urandom % 21];
    x  = 8'($urandom);
    f  = 3'($urandom);
    if (op == 5'b01100) x = ($urandom % 3 == 0) ? 8'(250 + $urandom % 6) : 8'(128 + $urandom % 128);
    if (op == 5'b01101) x = ($urandom % 3 == 0) ? 8'(250 + $urandom % 6) : 8'(128 + $urandom % 128);
    // Keep R7 (the branch target) unchanged.
    if (op == 5'b01011 && f == 3'd7) begin op = 5'b01110; end
    return enc(op, f, x);
  endfunction

  initial begin
    int cycles;
    logic [15:0] ex [11];
    foreach (cov_op[k]) cov_op[k] = 0;
    cov_br_taken = 0; cov_br_not = 0; cov_kbd = 0; cov_disp = 0; cov_push = 0;
    cov_carry = 0; cov_ovf = 0; cov_step = 0; cov_run = 0; cov_pause = 0; cov_halt = 0;

    // ---------- 1. example program ----------
    // One 16-bit instruction per line, four hex digits, as a program file.
    $readmemh("tb/ar5_example_program.hex", ex);
    repeat (2) @(posedge clk);
    for (int ad = 0; ad < 256; ad++) load_byte(8'(ad), 8'h00);
    foreach (ex[i]) begin
      load_byte(8'(2 * i), ex[i][15:8]);
      load_byte(8'(2 * i + 1), ex[i][7:0]);
    end
    do_reset();
    run_to_halt(cycles);
    chk(cycles == 33, $sformatf("example program took %0d cycles, expected 11 x 3 = 33", cycles));
    chk(dbg.regs[1] == 8'h19 && dbg.regs[2] == 8'hF4 && dbg.regs[3] == 8'h02 && dbg.regs[7] == 8'h28,
        "example program registers");
    chk(dbg.a == 8'h41, $sformatf("example program A=%h, expected 28+19 = 41", dbg.a));
    compare_state("example program");
    compare_memory();

    // ---------- 2. keyboard to display, VADD ----------
    begin
      logic [15:0] p2 [8] = '{enc(5'b01100, 0, 8'd250), enc(5'b01101, 0, 8'd252),
                              enc(5'b01100, 0, 8'd251), enc(5'b01101, 0, 8'd253),
                              enc(5'b00101, 0, 8'd0),   enc(5'b01101, 0, 8'd254),
                              enc(5'b01100, 0, 8'd252), enc(5'b11111, 0, 8'd0)};
      int strobes = 0;
      foreach (p2[i]) begin
        load_byte(8'(2 * i), p2[i][15:8]);
        load_byte(8'(2 * i + 1), p2[i][7:0]);
      end
      do_reset();
      kbd_in = 16'h4849;                     // "HI"
      push_vec(16'h1020);
      push_vec(16'h0305);
      fork
        run_to_halt(cycles);
        while (!halted) begin @(posedge clk); #1 strobes += $countones(disp_strobe); end
      join
      chk(cycles == 24, $sformatf("I/O program took %0d cycles, expected 24", cycles));
      chk(display[0] == 8'h48 && display[1] == 8'h49 && display[2] == 8'h25,
          $sformatf("display %h %h %h", display[0], display[1], display[2]));
      chk(dbg.vbuff == 8'h13 && dbg.a == 8'h48, "VADD results and display read-back");
      chk(strobes == 3, $sformatf("%0d display strobes, expected 3", strobes));
      compare_state("I/O program");
    end

    // ---------- 3. random programs in step mode ----------
    for (int prog = 0; prog < 40; prog++) begin
      for (int ad = 0; ad < 256; ad++) load_byte(8'(ad), 8'($urandom));
      // R7, the branch target, is set once to an instruction inside the
      // program; the random instructions never overwrite it.
      begin
        logic [15:0] w0, w1;
        w0 = enc(5'b01110, 0, 8'(4 + 2 * ($urandom % 61)));
        w1 = enc(5'b01011, 3'd7, 8'h00);
        load_byte(8'd0, w0[15:8]); load_byte(8'd1, w0[7:0]);
        load_byte(8'd2, w1[15:8]); load_byte(8'd3, w1[7:0]);
      end
      for (int i = 2; i < 63; i++) begin
        logic [15:0] w;
        w = rand_instr();
        load_byte(8'(2 * i), w[15:8]);
        load_byte(8'(2 * i + 1), w[7:0]);
      end
      load_byte(8'd126, 8'hF8); load_byte(8'd127, 8'h00);
      do_reset();
      kbd_in = 16'($urandom);
      push_vec(16'($urandom));
      for (int s = 0; s < 150 && !m_halt; s++) begin
        if ($urandom % 10 == 0) push_vec(16'($urandom));
        if ($urandom % 20 == 0) kbd_in = 16'($urandom);
        step_one();
        compare_state($sformatf("program %0d step %0d", prog, s));
      end
      if (m_halt) cov_halt++;
      compare_memory();
    end

    // ---------- 4. pause and resume in run mode ----------
    for (int ad = 0; ad < 128; ad += 2) begin
      load_byte(8'(ad), 8'hC0); load_byte(8'(ad + 1), 8'h00);        // NOP
    end
    load_byte(8'd126, 8'hF8); load_byte(8'd127, 8'h00);
    do_reset();
    @(negedge clk); run_mode = 1; start = 1;
    @(negedge clk); start = 0;
    repeat (30) @(negedge clk);
    run_mode = 0;
    repeat (10) @(negedge clk);
    chk(!busy && !halted && dbg.state == S_IDLE, "paused");
    if (!busy) cov_pause++;
    begin
      logic [7:0] paused_pc;
      paused_pc = dbg.pc;
      repeat (10) @(negedge clk);
      chk(dbg.pc == paused_pc, "pc holds while paused");
      @(negedge clk); run_mode = 1; start = 1;
      @(negedge clk); start = 0;
      while (!halted) @(negedge clk);
      chk(dbg.pc == 8'd128, $sformatf("resumed program ends after STOP, pc=%0d", dbg.pc));
    end

    // ---------- coverage ----------
    begin
      logic [4:0] need [21] = '{5'b00000, 5'b00001, 5'b00010, 5'b00011, 5'b00100, 5'b00101, 5'b00110,
                                5'b00111, 5'b01000, 5'b01001, 5'b01010, 5'b01011, 5'b01100, 5'b01101,
                                5'b01110, 5'b10000, 5'b10001, 5'b10010, 5'b10011, 5'b11000, 5'b11111};
      foreach (need[i]) chk(cov_op[need[i]] > 0, $sformatf("opcode %05b never executed", need[i]));
      chk(cov_br_taken > 0 && cov_br_not > 0, "branches taken and not taken");
      chk(cov_kbd > 0 && cov_disp > 0 && cov_push > 0, "keyboard, display and vector push used");
      chk(cov_carry > 0 && cov_ovf > 0, "carry and overflow set");
      chk(cov_step > 0 && cov_run > 0 && cov_pause > 0 && cov_halt > 0, "step, run, pause, halt");
      $display("coverage: step=%0d run=%0d pause=%0d halt=%0d branch taken=%0d not=%0d kbd=%0d disp=%0d push=%0d carry=%0d ovf=%0d",
               cov_step, cov_run, cov_pause, cov_halt, cov_br_taken, cov_br_not, cov_kbd, cov_disp, cov_push, cov_carry, cov_ovf);
      foreach (need[i]) $display("  opcode %05b executed %0d times", need[i], cov_op[need[i]]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
