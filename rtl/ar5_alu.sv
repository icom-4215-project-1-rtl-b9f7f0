// ar5_alu: the 8-bit arithmetic and logic unit of the RISC AR5.
//
// Purely combinational. It performs the accumulator operations of the
// instruction set: AND, OR, XOR with register f, add with carry, subtract,
// two's-complement negate, bitwise NOT, rotate left and right through the
// carry flag, and a pass of operand b used by the load instructions. Next to
// the result y it gives the status flags O N C Z of that result and a mask upd
// of the flags the operation is allowed to change; the status register only
// takes the flags selected by the mask.
//
// The operations and the rotate-through-carry behaviour follow the instruction
// set. The flag policy is this design's choice: arithmetic operations (ADDC,
// SUB, NEG) write all four flags, rotates write C, N and Z, logic operations
// write N and Z, the pass operation writes none. After SUB and NEG the carry
// flag holds the borrow (1 when the unsigned subtraction wraps).
//
// Interface: op, a (accumulator), b (second operand), cin (carry flag) in;
// y, flags, upd out. No clock.
module ar5_alu
  import ar5_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  alu_op_t      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] y,
  output flags_t       flags,
  output flags_t       upd
);

  logic [W:0] wide;   // result with carry/borrow in the top bit
  logic       c_out;
  logic       v_out;

  always_comb begin
    wide  = '0;
    c_out = 1'b0;
    v_out = 1'b0;
    upd   = '{o: 1'b0, n: 1'b1, c: 1'b0, z: 1'b1};
    unique case (op)
      ALU_AND: wide = {1'b0, a & b};
      ALU_OR:  wide = {1'b0, a | b};
      ALU_XOR: wide = {1'b0, a ^ b};
      ALU_NOT: wide = {1'b0, ~a};
      ALU_ADDC: begin
        wide  = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
        c_out = wide[W];
        v_out = (a[W-1] == b[W-1]) && (wide[W-1] != a[W-1]);
        upd   = '1;
      end
      ALU_SUB: begin
        wide  = {1'b0, a} - {1'b0, b};
        c_out = wide[W];                          // borrow
        v_out = (a[W-1] != b[W-1]) && (wide[W-1] != a[W-1]);
        upd   = '1;
      end
      ALU_NEG: begin
        wide  = {(W+1){1'b0}} - {1'b0, a};
        c_out = wide[W];                          // borrow: set unless a == 0
        v_out = a[W-1] && (wide[W-1] == 1'b1);    // only for the most negative value
        upd   = '1;
      end
      ALU_RLC: begin
        wide  = {1'b0, a[W-2:0], cin};
        c_out = a[W-1];
        upd   = '{o: 1'b0, n: 1'b1, c: 1'b1, z: 1'b1};
      end
      ALU_RRC: begin
        wide  = {1'b0, cin, a[W-1:1]};
        c_out = a[0];
        upd   = '{o: 1'b0, n: 1'b1, c: 1'b1, z: 1'b1};
      end
      ALU_PASSB: begin
        wide = {1'b0, b};
        upd  = '0;
      end
      default: begin
        wide = {1'b0, a};
        upd  = '0;
      end
    endcase
  end

  assign y     = wide[W-1:0];
  assign flags = '{o: v_out, n: y[W-1], c: c_out, z: (y == '0)};

endmodule
