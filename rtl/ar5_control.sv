// ar5_control: the control unit (sequencer and decoder) of the RISC AR5.
//
// Every instruction runs in three cycles:
//   FETCH_HI  memory[PC]   -> IR[15:8], PC <- PC + 1
//   FETCH_LO  memory[PC]   -> IR[7:0],  PC <- PC + 1
//   EXEC      the opcode in IR[15:11] drives the datapath for one cycle
// In EXEC the unit issues the control word for the instruction: the ALU
// operation and its second operand (register f, memory at the direct address,
// or the immediate byte), the accumulator, status-register, vector-buffer,
// register-file and memory write enables, and for BRZ/BRC/BRN/BRO the PC load
// from R7 when the Z, C, N or O flag is set. Opcodes the instruction set does
// not define execute as NOP. STOP moves the unit to HALT, which only reset
// leaves.
//
// Run and step modes: after reset the unit waits in IDLE. A start pulse
// begins the next instruction. In run mode (run_mode = 1) it goes on fetching
// until STOP; in step mode it returns to IDLE after each instruction, so each
// start pulse executes exactly one. Lowering run_mode while running stops at
// the next instruction boundary. The opcodes and what each does are the
// processor's; the three-cycle sequence and the mode handshake are this
// design's.
//
// Interface: opcode and sr in; ctrl (the datapath control word), state,
// halted, busy and instr_done (one-cycle pulse in each EXEC) out. Moore-style
// except that the EXEC control word depends on opcode and sr. rst_n is
// synchronous and active low.
module ar5_control
  import ar5_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    run_mode,
  input  logic    start,
  input  opcode_t opcode,
  input  flags_t  sr,
  output ctrl_t   ctrl,
  output state_t  state,
  output logic    halted,
  output logic    busy,
  output logic    instr_done
);

  state_t next;

  always_ff @(posedge clk) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= next;
  end

  always_comb begin
    next = state;
    unique case (state)
      S_IDLE:     if (start) next = S_FETCH_HI;
      S_FETCH_HI: next = S_FETCH_LO;
      S_FETCH_LO: next = S_EXEC;
      S_EXEC: begin
        if (opcode == OP_STOP) next = S_HALT;
        else if (run_mode)     next = S_FETCH_HI;
        else                   next = S_IDLE;
      end
      S_HALT:     next = S_HALT;
      default:    next = S_IDLE;
    endcase
  end

  always_comb begin
    ctrl          = '0;
    ctrl.addr_sel = ADDR_PC;
    ctrl.alu_op   = ALU_PASSB;
    ctrl.b_sel    = B_REG;
    unique case (state)
      S_FETCH_HI: begin
        ctrl.ir_load_hi = 1'b1;
        ctrl.pc_inc     = 1'b1;
      end
      S_FETCH_LO: begin
        ctrl.ir_load_lo = 1'b1;
        ctrl.pc_inc     = 1'b1;
      end
      S_EXEC: begin
        unique case (opcode)
          OP_AND, OP_OR, OP_XOR, OP_ADDC, OP_SUB: begin
            unique case (opcode)
              OP_AND:  ctrl.alu_op = ALU_AND;
              OP_OR:   ctrl.alu_op = ALU_OR;
              OP_XOR:  ctrl.alu_op = ALU_XOR;
              OP_ADDC: ctrl.alu_op = ALU_ADDC;
              default: ctrl.alu_op = ALU_SUB;
            endcase
            ctrl.b_sel    = B_REG;
            ctrl.acc_load = 1'b1;
            ctrl.sr_alu   = 1'b1;
          end
          OP_NEG, OP_NOT, OP_RLC, OP_RRC: begin
            unique case (opcode)
              OP_NEG:  ctrl.alu_op = ALU_NEG;
              OP_NOT:  ctrl.alu_op = ALU_NOT;
              OP_RLC:  ctrl.alu_op = ALU_RLC;
              default: ctrl.alu_op = ALU_RRC;
            endcase
            ctrl.acc_load = 1'b1;
            ctrl.sr_alu   = 1'b1;
          end
          OP_VADD: begin
            ctrl.acc_load  = 1'b1;
            ctrl.acc_vadd  = 1'b1;
            ctrl.sr_vadd   = 1'b1;
            ctrl.vbuf_load = 1'b1;
          end
          OP_LDAR: begin
            ctrl.b_sel    = B_REG;
            ctrl.acc_load = 1'b1;
          end
          OP_STAR: ctrl.rf_we = 1'b1;
          OP_LDAM: begin
            ctrl.addr_sel = ADDR_IR;
            ctrl.b_sel    = B_MEM;
            ctrl.acc_load = 1'b1;
          end
          OP_STAM: begin
            ctrl.addr_sel = ADDR_IR;
            ctrl.mem_we   = 1'b1;
          end
          OP_LDI: begin
            ctrl.b_sel    = B_IMM;
            ctrl.acc_load = 1'b1;
          end
          OP_BRZ: ctrl.pc_load = sr.z;
          OP_BRC: ctrl.pc_load = sr.c;
          OP_BRN: ctrl.pc_load = sr.n;
          OP_BRO: ctrl.pc_load = sr.o;
          default: ;   // NOP, STOP and undefined opcodes
        endcase
      end
      default: ;
    endcase
  end

  assign halted     = (state == S_HALT);
  assign busy       = (state == S_FETCH_HI) || (state == S_FETCH_LO) || (state == S_EXEC);
  assign instr_done = (state == S_EXEC);

endmodule
