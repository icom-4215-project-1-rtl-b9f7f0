// ar5_ir: the 16-bit instruction register of the RISC AR5.
//
// Instructions are 16 bits, stored in memory most significant byte first.
// The IR is filled in two byte loads: load_hi writes bits 15..8 from the byte
// at PC, load_lo writes bits 7..0 from the byte at PC+1. It then presents the
// instruction fields of the four formats: the 5-bit opcode in bits 15..11,
// register f in bits 10..8, and the immediate operand or direct address in
// bits 7..0. The field positions are the processor's; the two-step fill is
// how this design fetches over the 8-bit bus.
//
// Interface: load_hi, load_lo, byte_in sampled at the rising clock edge.
// rst_n is synchronous and active low and clears the IR; the IR is always
// refilled by a fetch before it is executed.
module ar5_ir
  import ar5_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load_hi,
  input  logic        load_lo,
  input  logic [7:0]  byte_in,
  output logic [15:0] ir,
  output opcode_t     opcode,
  output logic [2:0]  rf,
  output logic [7:0]  operand
);

  always_ff @(posedge clk) begin
    if (!rst_n) ir <= '0;
    else begin
      if (load_hi) ir[15:8] <= byte_in;
      if (load_lo) ir[7:0]  <= byte_in;
    end
  end

  assign opcode  = opcode_t'(ir[15:11]);
  assign rf      = ir[10:8];
  assign operand = ir[7:0];

endmodule
