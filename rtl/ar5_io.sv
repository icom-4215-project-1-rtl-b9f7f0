// ar5_io: memory-mapped keyboard and display ports of the RISC AR5.
//
// The top six memory addresses belong to two devices. Addresses 250 and 251
// read the 16-bit keyboard word (250 the high byte, 251 the low byte, in the
// same big-endian order as instructions). Addresses 252..255 are the four
// ASCII characters of the display: a store there updates that character and
// pulses its disp_strobe bit for one cycle; a load reads it back. sel tells
// the processor that addr lies in this range, so that the memory is neither
// read nor written there. The address map is the processor's; byte order,
// read-back, ignoring stores to the keyboard and clearing the display at
// reset are this design's choices.
//
// Timing: rdata and sel are combinational in addr; display and disp_strobe
// are registers updated at the rising clock edge. rst_n is synchronous and
// active low.
module ar5_io
#(
  parameter logic [7:0] KBD_BASE  = ar5_pkg::KBD_BASE,
  parameter logic [7:0] DISP_BASE = ar5_pkg::DISP_BASE
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [7:0]      addr,
  input  logic            we,
  input  logic [7:0]      wdata,
  input  logic [15:0]     kbd_in,
  output logic            sel,
  output logic [7:0]      rdata,
  output logic [3:0][7:0] display,
  output logic [3:0]      disp_strobe
);

  logic       kbd_hit, disp_hit;
  logic [7:0] disp_off;
  logic [1:0] disp_idx;

  assign kbd_hit  = (addr == KBD_BASE) || (addr == KBD_BASE + 8'd1);
  assign disp_off = addr - DISP_BASE;
  assign disp_hit = (disp_off < 8'd4);
  assign disp_idx = disp_off[1:0];
  assign sel      = kbd_hit || disp_hit;

  always_comb begin
    if (kbd_hit)       rdata = (addr == KBD_BASE) ? kbd_in[15:8] : kbd_in[7:0];
    else if (disp_hit) rdata = display[disp_idx];
    else               rdata = '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      display     <= '0;
      disp_strobe <= '0;
    end else begin
      disp_strobe <= '0;
      if (we && disp_hit) begin
        display[disp_idx]     <= wdata;
        disp_strobe[disp_idx] <= 1'b1;
      end
    end
  end

endmodule
