// ar5_vector_adder: the vector adder used by the VADD instruction.
//
// LANES independent W-bit adders, one per byte lane of a vector, all working
// in the same cycle. For VADD the two inputs are the top (x) and second (y)
// entries of the vector stack; lane 0's sum goes to the accumulator and lane
// 1's to the vector buffer. Each lane also reports its carry out and its
// two's-complement overflow. The lanes do not carry into each other and there
// is no carry in; two lanes of 8 bits are the processor's own numbers, the
// per-lane flags are this design's addition so that VADD can set the status
// register like the scalar add.
//
// Interface: x, y in (lane i in bits i*W +: W); sum, cout, ovf out.
// Combinational.
module ar5_vector_adder #(
  parameter int unsigned LANES = 2,
  parameter int unsigned W     = 8
) (
  input  logic [LANES-1:0][W-1:0] x,
  input  logic [LANES-1:0][W-1:0] y,
  output logic [LANES-1:0][W-1:0] sum,
  output logic [LANES-1:0]        cout,
  output logic [LANES-1:0]        ovf
);

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    logic [W:0] s;
    assign s       = {1'b0, x[i]} + {1'b0, y[i]};
    assign sum[i]  = s[W-1:0];
    assign cout[i] = s[W];
    assign ovf[i]  = (x[i][W-1] == y[i][W-1]) && (s[W-1] != x[i][W-1]);
  end

endmodule
