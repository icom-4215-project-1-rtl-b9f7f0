// ar5_regfile: the general purpose registers R0..R7 of the RISC AR5.
//
// NREGS registers of W bits. Register-direct instructions read register f
// through raddr/rdata (a combinational read) and STA rf writes the
// accumulator through the write port at the clock edge. R7, which holds the
// target of every conditional branch, has its own read port so a branch needs
// no register field. All registers are also brought out on regs for
// observation. Eight registers of eight bits are the processor's numbers;
// clearing them at reset is this design's choice.
//
// Interface: we, waddr, wdata sampled at the rising clock edge; rdata, r7,
// regs reflect the registers. rst_n is synchronous and active low.
module ar5_regfile #(
  parameter int unsigned NREGS = 8,
  parameter int unsigned W     = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          we,
  input  logic [$clog2(NREGS)-1:0]      waddr,
  input  logic [W-1:0]                  wdata,
  input  logic [$clog2(NREGS)-1:0]      raddr,
  output logic [W-1:0]                  rdata,
  output logic [W-1:0]                  r7,
  output logic [NREGS-1:0][W-1:0]       regs
);

  always_ff @(posedge clk) begin
    if (!rst_n)  regs <= '0;
    else if (we) regs[waddr] <= wdata;
  end

  assign rdata = regs[raddr];
  assign r7    = regs[NREGS-1];

endmodule
