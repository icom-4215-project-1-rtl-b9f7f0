// ar5_memory: the 256-byte internal memory of the RISC AR5.
//
// One array of 2**AW bytes holds both the program (addresses 0..127, each
// instruction in two bytes, high byte first) and data written by STA addr.
// The processor reads it through a combinational port at addr and writes the
// accumulator with we. A second write port lets a host load a program before
// the processor runs; it has priority if both write in one cycle. A second
// read port (dbg_addr/dbg_rdata) lets a host show any part of the memory.
// The size is the processor's; the port arrangement, asynchronous read and
// host priority are this design's. Contents are not cleared by reset.
//
// Timing: writes at the rising clock edge, reads combinational.
module ar5_memory #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] rdata,
  input  logic          we,
  input  logic [DW-1:0] wdata,
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  logic [DW-1:0] host_wdata,
  input  logic [AW-1:0] dbg_addr,
  output logic [DW-1:0] dbg_rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (host_we)  mem[host_addr] <= host_wdata;
    else if (we)  mem[addr]      <= wdata;
  end

  assign rdata     = mem[addr];
  assign dbg_rdata = mem[dbg_addr];

endmodule
