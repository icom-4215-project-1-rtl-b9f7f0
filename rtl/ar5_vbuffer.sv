// ar5_vbuffer: the vector buffer (VBuffer) of the RISC AR5.
//
// A W-bit register that keeps the lane-1 sum of the last VADD instruction,
// the part of the vector result that does not fit in the accumulator. It is
// only observed from outside (the front panel shows it as Vbuff); no
// instruction reads it back. Clearing it at reset is this design's choice.
//
// Interface: load captures d at the rising clock edge; q is the register.
// rst_n is synchronous and active low.
module ar5_vbuffer #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

endmodule
