// ar5_top: the RISC AR5 processor.
//
// An 8-bit accumulator machine with a 16-bit instruction word. The blocks and
// their roles:
//   memory            256 bytes, program at 0..127 (two bytes per instruction,
//                     high byte first) plus data
//   io                keyboard word at 250/251, ASCII display at 252..255
//   register file     R0..R7; R7 is the branch target
//   accumulator A     destination of every operation, source of every store
//   ALU               logic, add with carry, subtract, negate, rotates
//   status register   O N C Z
//   PC, IR            fetch state; IR fields opcode/register f/operand
//   vector stack      16-bit vectors {V1,V0}; TOS and SOS feed the vector adder
//   vector adder      two byte lanes at once for VADD: lane 0 -> A,
//                     lane 1 -> vector buffer
//   control unit      3-cycle fetch/fetch/execute sequencer, run and step modes
// The instruction set, register set, memory size, address map and the blocks
// above are the processor's. The host ports are this design's: host_we/
// host_addr/host_wdata load a program while the processor is idle or halted,
// dbg_addr/dbg_rdata and dbg show everything a front panel needs, and
// vs_push/vs_pop/vs_data fill the vector stack, which no instruction writes.
//
// Operation: hold rst_n low, load the program, release rst_n, set run_mode
// and pulse start. In run mode the processor executes until STOP (halted
// goes high); in step mode each start pulse executes one instruction.
// instr_done pulses in the last cycle of every instruction; the new state is
// visible on the following cycle. rst_n is synchronous and active low.
module ar5_top
  import ar5_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run_mode,
  input  logic            start,
  input  logic            host_we,
  input  logic [7:0]      host_addr,
  input  logic [7:0]      host_wdata,
  input  logic [7:0]      dbg_addr,
  output logic [7:0]      dbg_rdata,
  input  logic [15:0]     kbd_in,
  output logic [3:0][7:0] display,
  output logic [3:0]      disp_strobe,
  input  logic            vs_push,
  input  logic            vs_pop,
  input  logic [15:0]     vs_data,
  output dbg_t            dbg,
  output logic            halted,
  output logic            busy,
  output logic            instr_done
);

  ctrl_t   ctrl;
  state_t  state;
  opcode_t opcode;
  flags_t  sr, alu_flags, alu_upd, sr_d, sr_upd;

  logic [7:0]  pc, operand, addr, mem_rdata, io_rdata, bus_rdata;
  logic [7:0]  acc, acc_d, alu_b, alu_y, rf_rdata, r7, vbuff;
  logic [2:0]  rf;
  logic [15:0] ir, vs_tos, vs_sos;
  logic [NREGS-1:0][7:0] regs;
  logic [1:0][7:0] vsum;
  logic [1:0]  vcout, vovf;
  logic        io_sel;
  logic [1:0]  vs_count;

  // ---------------- control ----------------
  ar5_control u_control (
    .clk, .rst_n, .run_mode, .start, .opcode, .sr,
    .ctrl, .state, .halted, .busy, .instr_done
  );

  // ---------------- fetch ----------------
  ar5_pc #(.W(8)) u_pc (
    .clk, .rst_n, .inc(ctrl.pc_inc), .load(ctrl.pc_load), .d(r7), .q(pc)
  );

  ar5_ir u_ir (
    .clk, .rst_n, .load_hi(ctrl.ir_load_hi), .load_lo(ctrl.ir_load_lo),
    .byte_in(bus_rdata), .ir, .opcode, .rf, .operand
  );

  // ---------------- memory and I/O ----------------
  assign addr = (ctrl.addr_sel == ADDR_IR) ? operand : pc;

  ar5_memory #(.AW(8), .DW(8)) u_memory (
    .clk, .addr, .rdata(mem_rdata), .we(ctrl.mem_we && !io_sel), .wdata(acc),
    .host_we, .host_addr, .host_wdata, .dbg_addr, .dbg_rdata
  );

  ar5_io u_io (
    .clk, .rst_n, .addr, .we(ctrl.mem_we), .wdata(acc), .kbd_in,
    .sel(io_sel), .rdata(io_rdata), .display, .disp_strobe
  );

  assign bus_rdata = io_sel ? io_rdata : mem_rdata;

  // ---------------- registers and ALU ----------------
  ar5_regfile #(.NREGS(NREGS), .W(8)) u_regfile (
    .clk, .rst_n, .we(ctrl.rf_we), .waddr(rf), .wdata(acc),
    .raddr(rf), .rdata(rf_rdata), .r7, .regs
  );

  always_comb begin
    unique case (ctrl.b_sel)
      B_MEM:   alu_b = bus_rdata;
      B_IMM:   alu_b = operand;
      default: alu_b = rf_rdata;
    endcase
  end

  ar5_alu #(.W(8)) u_alu (
    .op(ctrl.alu_op), .a(acc), .b(alu_b), .cin(sr.c),
    .y(alu_y), .flags(alu_flags), .upd(alu_upd)
  );

  assign acc_d = ctrl.acc_vadd ? vsum[0] : alu_y;

  ar5_accumulator #(.W(8)) u_acc (
    .clk, .rst_n, .load(ctrl.acc_load), .d(acc_d), .q(acc)
  );

  always_comb begin
    if (ctrl.sr_vadd) begin
      sr_d   = '{o: vovf[0], n: vsum[0][7], c: vcout[0], z: (vsum[0] == '0)};
      sr_upd = '1;
    end else begin
      sr_d   = alu_flags;
      sr_upd = ctrl.sr_alu ? alu_upd : '0;
    end
  end

  ar5_sr u_sr (.clk, .rst_n, .upd(sr_upd), .d(sr_d), .q(sr));

  // ---------------- vector unit ----------------
  ar5_vstack #(.DEPTH(2), .W(16)) u_vstack (
    .clk, .rst_n, .push(vs_push), .pop(vs_pop), .din(vs_data),
    .tos(vs_tos), .sos(vs_sos), .count(vs_count)
  );

  // Only lane 0's carry and overflow reach the status register; lane 1's
  // are left unused on purpose.
  ar5_vector_adder #(.LANES(2), .W(8)) u_vadd (
    .x(vs_tos), .y(vs_sos), .sum(vsum), .cout(vcout), .ovf(vovf)
  );

  ar5_vbuffer #(.W(8)) u_vbuf (
    .clk, .rst_n, .load(ctrl.vbuf_load), .d(vsum[1]), .q(vbuff)
  );

  // ---------------- host port rules ----------------
  // Programs are loaded only while no instruction is in progress.
  a_host_load_idle: assert property (@(posedge clk) disable iff (!rst_n) host_we |-> !busy)
    else $error("host memory write while an instruction is executing");

  // ---------------- observation ----------------
  assign dbg = '{pc: pc, ir: ir, a: acc, sr: sr, vbuff: vbuff, regs: regs,
                 vs_tos: vs_tos, vs_sos: vs_sos, vs_count: vs_count,
                 state: state};

endmodule
