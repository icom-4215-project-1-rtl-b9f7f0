// ar5_pkg: types and constants shared by the RISC AR5 processor.
//
// The opcode values, the instruction field positions (opcode in bits 15..11,
// register f in 10..8, immediate operand or direct address in 7..0), the
// status-register layout O N C Z and the I/O addresses 250..255 follow the
// processor's definition. The ALU operation encoding, the control word and the
// sequencer state encoding are this design's own.
package ar5_pkg;

  localparam int unsigned DW = 8;                 // data bus width
  localparam int unsigned AW = 8;                 // address width (256 bytes)
  localparam int unsigned IW = 16;                // instruction width
  localparam int unsigned NREGS = 8;              // R0..R7

  // Memory-mapped I/O.
  localparam logic [AW-1:0] KBD_BASE  = 8'd250;   // 250 (high byte), 251 (low byte)
  localparam logic [AW-1:0] DISP_BASE = 8'd252;   // 252..255, one ASCII byte each

  typedef enum logic [4:0] {
    OP_AND  = 5'b00_000,
    OP_OR   = 5'b00_001,
    OP_XOR  = 5'b00_010,
    OP_ADDC = 5'b00_011,
    OP_SUB  = 5'b00_100,
    OP_VADD = 5'b00_101,
    OP_NEG  = 5'b00_110,
    OP_NOT  = 5'b00_111,
    OP_RLC  = 5'b01_000,
    OP_RRC  = 5'b01_001,
    OP_LDAR = 5'b01_010,   // LDA rf
    OP_STAR = 5'b01_011,   // STA rf
    OP_LDAM = 5'b01_100,   // LDA addr
    OP_STAM = 5'b01_101,   // STA addr
    OP_LDI  = 5'b01_110,
    OP_BRZ  = 5'b10_000,
    OP_BRC  = 5'b10_001,
    OP_BRN  = 5'b10_010,
    OP_BRO  = 5'b10_011,
    OP_NOP  = 5'b11_000,
    OP_STOP = 5'b11_111
  } opcode_t;

  // Status register, bit 3 down to bit 0.
  typedef struct packed {
    logic o;   // overflow
    logic n;   // negative
    logic c;   // carry
    logic z;   // zero
  } flags_t;

  typedef enum logic [3:0] {
    ALU_AND, ALU_OR, ALU_XOR, ALU_ADDC, ALU_SUB,
    ALU_NEG, ALU_NOT, ALU_RLC, ALU_RRC, ALU_PASSB
  } alu_op_t;

  // Second ALU operand.
  typedef enum logic [1:0] { B_REG, B_MEM, B_IMM } bsel_t;

  // Memory address source.
  typedef enum logic { ADDR_PC, ADDR_IR } asel_t;

  typedef enum logic [2:0] {
    S_IDLE, S_FETCH_HI, S_FETCH_LO, S_EXEC, S_HALT
  } state_t;

  // Control word issued by the sequencer each cycle.
  typedef struct packed {
    asel_t   addr_sel;
    logic    pc_inc;
    logic    pc_load;
    logic    ir_load_hi;
    logic    ir_load_lo;
    alu_op_t alu_op;
    bsel_t   b_sel;
    logic    acc_load;     // A <- ALU result
    logic    acc_vadd;     // A <- vector lane 0 instead of ALU result
    logic    sr_alu;       // SR written with the ALU flags under its mask
    logic    sr_vadd;      // SR written with the lane-0 vector-add flags
    logic    vbuf_load;    // VBuffer <- vector lane 1
    logic    rf_we;        // R[f] <- A
    logic    mem_we;       // [addr] <- A
  } ctrl_t;

  // Everything a host front panel shows.
  typedef struct packed {
    logic [AW-1:0]             pc;
    logic [IW-1:0]             ir;
    logic [DW-1:0]             a;
    flags_t                    sr;
    logic [DW-1:0]             vbuff;
    logic [NREGS-1:0][DW-1:0]  regs;
    logic [2*DW-1:0]           vs_tos;
    logic [2*DW-1:0]           vs_sos;
    logic [1:0]                vs_count;
    state_t                    state;
  } dbg_t;

endpackage
