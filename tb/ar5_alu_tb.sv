// ar5_alu_tb: self-checking test of the ALU.
//
// Applies every operation to random and corner operands and compares the
// result, the O N C Z flags and the flag-write mask with a reference computed
// here in plain integer arithmetic (carry as bit 8 of a 9-bit sum, borrow as
// a < b, overflow from the signed values).
module ar5_alu_tb;
  import ar5_pkg::*;

  alu_op_t    op;
  logic [7:0] a, b, y;
  logic       cin;
  flags_t     flags, upd;
  int checks = 0, failures = 0;

  ar5_alu dut (.op, .a, .b, .cin, .y, .flags, .upd);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(alu_op_t o, logic [7:0] ia, logic [7:0] ib, logic ic);
    int sa, sb, r;
    logic [7:0] ey;
    logic ec, ev;
    flags_t eu;
    op = o; a = ia; b = ib; cin = ic;
    #1;
    sa = $signed(ia); sb = $signed(ib);
    ec = 0; ev = 0; eu = 4'b0101;
    case (o)
      ALU_AND: ey = ia & ib;
      ALU_OR:  ey = ia | ib;
      ALU_XOR: ey = ia ^ ib;
      ALU_NOT: ey = ~ia;
      ALU_ADDC: begin
        r = int'(ia) + int'(ib) + int'(ic); ey = r[7:0]; ec = r > 255;
        ev = (sa + sb + int'(ic) > 127) || (sa + sb + int'(ic) < -128); eu = 4'b1111;
      end
      ALU_SUB: begin
        ey = 8'(int'(ia) - int'(ib)); ec = ia < ib;
        ev = (sa - sb > 127) || (sa - sb < -128); eu = 4'b1111;
      end
      ALU_NEG: begin
        ey = 8'(-int'(ia)); ec = ia != 0; ev = (-sa > 127); eu = 4'b1111;
      end
      ALU_RLC: begin ey = {ia[6:0], ic}; ec = ia[7]; eu = 4'b0111; end
      ALU_RRC: begin ey = {ic, ia[7:1]}; ec = ia[0]; eu = 4'b0111; end
      default: begin ey = ib; eu = 4'b0000; end
    endcase
    checks++;
    if (y !== ey || (flags & eu) !== ({ev, ey[7], ec, ey == 0} & eu) || upd !== eu) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h c=%b: y=%h flags=%b upd=%b, expected y=%h flags=%b upd=%b",
               o.name(), ia, ib, ic, y, flags, upd, ey, {ev, ey[7], ec, ey == 0}, eu);
    end
  endtask

  initial begin
    alu_op_t ops [10] = '{ALU_AND, ALU_OR, ALU_XOR, ALU_ADDC, ALU_SUB,
                          ALU_NEG, ALU_NOT, ALU_RLC, ALU_RRC, ALU_PASSB};
    logic [7:0] corner [6] = '{8'h00, 8'h01, 8'h7F, 8'h80, 8'hFF, 8'h55};
    foreach (ops[i]) begin
      foreach (corner[j]) foreach (corner[k]) begin
        check_one(ops[i], corner[j], corner[k], 1'b0);
        check_one(ops[i], corner[j], corner[k], 1'b1);
      end
      repeat (300) check_one(ops[i], 8'($urandom), 8'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
