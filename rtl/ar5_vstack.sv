// ar5_vstack: the vector stack (VStack) feeding the vector adder.
//
// Holds up to DEPTH vectors of W bits; each vector is two bytes, V1 in bits
// 15..8 and V0 in bits 7..0. The top of stack (tos) and the entry below it
// (sos) are always visible and are the operands of VADD. The processor's
// definition names the stack and its TOS and SOS but not how it is filled or
// how deep it is: here it has a push and a pop port (driven from outside the
// processor), a default depth of two, entries that read as zero when empty,
// a push onto a full stack that drops the bottom entry, and a pop of an empty
// stack that does nothing. Push and pop in the same cycle replace the top.
//
// Timing: push and pop take effect at the rising clock edge; tos, sos and
// count are register outputs. rst_n (synchronous, active low) empties it.
module ar5_vstack #(
  parameter int unsigned DEPTH = 2,
  parameter int unsigned W     = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         push,
  input  logic                         pop,
  input  logic [W-1:0]                 din,
  output logic [W-1:0]                 tos,
  output logic [W-1:0]                 sos,
  output logic [$clog2(DEPTH+1)-1:0]   count
);

  localparam int unsigned CW = $clog2(DEPTH+1);

  // ent[0] is the top; entries below the count are zero.
  logic [DEPTH-1:0][W-1:0] ent;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ent   <= '0;
      count <= '0;
    end else if (push && pop) begin
      if (count != '0) ent[0] <= din;
      else begin
        ent[0] <= din;
        count  <= CW'(1);
      end
    end else if (push) begin
      for (int i = DEPTH-1; i > 0; i--) ent[i] <= ent[i-1];
      ent[0] <= din;
      if (count != CW'(DEPTH)) count <= count + CW'(1);
    end else if (pop && count != '0) begin
      for (int i = 0; i < DEPTH-1; i++) ent[i] <= ent[i+1];
      ent[DEPTH-1] <= '0;
      count <= count - CW'(1);
    end
  end

  assign tos = ent[0];
  assign sos = (DEPTH > 1) ? ent[DEPTH > 1 ? 1 : 0] : '0;

endmodule
