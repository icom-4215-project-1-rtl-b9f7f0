// ar5_sr: the 4-bit status register SR of the RISC AR5.
//
// Holds the flags O (overflow, bit 3), N (negative, bit 2), C (carry, bit 1)
// and Z (zero, bit 0), in the order the processor's definition prints them.
// Each flag is written only when its bit in upd is set, so an operation can
// change some flags and keep the others (a rotate keeps O, a logic operation
// keeps C and O). The write mask and the reset value zero are this design's.
//
// Interface: upd and d sampled at the rising clock edge; q is the register.
// rst_n is synchronous and active low.
module ar5_sr
  import ar5_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  flags_t upd,
  input  flags_t d,
  output flags_t q
);

  always_ff @(posedge clk) begin
    if (!rst_n) q <= '0;
    else        q <= (d & upd) | (q & ~upd);
  end

endmodule
