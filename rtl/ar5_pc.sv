// ar5_pc: the 8-bit program counter of the RISC AR5.
//
// Reset puts the PC at 0, where every program starts. Instructions are two
// bytes, stored high byte first, and the sequencer fetches them one byte per
// cycle, so the PC steps by one for each byte fetched (two per instruction).
// A taken branch loads the PC with the contents of R7; a load wins over an
// increment. The byte-wise increment and the wrap from 255 to 0 are this
// design's choices.
//
// Interface: inc, load and d sampled at the rising clock edge; q is the PC.
// rst_n is synchronous and active low.
module ar5_pc #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         inc,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
    else if (inc)  q <= q + W'(1);
  end

endmodule
