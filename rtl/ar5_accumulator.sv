// ar5_accumulator: the accumulator A of the RISC AR5.
//
// A W-bit register that receives the result of every ALU operation, load and
// VADD (lane 0) and supplies the data for every store. It is also the ALU's
// first operand. Its width is the processor's; clearing it at reset is this
// design's choice.
//
// Interface: load captures d at the rising clock edge; q is the register.
// rst_n is synchronous and active low.
module ar5_accumulator #(
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
