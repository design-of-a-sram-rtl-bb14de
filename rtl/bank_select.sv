// bank_select: chooses the one bank of the four that takes part in an access.
//
// In the full butterfly arrangement a row decoder sits between the left and
// right banks of each half (top and bottom) and an I/O block with the write
// drivers and sense amplifiers sits between the top and bottom banks of each
// side.  Address bit 5 chooses the row decoder: WL_EN is passed to
// WL_EN_TOP when it is low and to WL_EN_BOTTOM when it is high, through an
// inverter and two AND gates, as in the bank-enable schematic.  The document
// says the full butterfly version also selects only one array with extra AND
// gates on the write enable; here address bit 6 chooses the left or right
// I/O block in the same way for the write enable and for the sense enable.
// That use of bit 6 is this design's choice.
//
// Ports: wl_en, write_en, sense_en from the controller; bot (addr[5]) and
// side (addr[6]); wl_en_top / wl_en_bot to the two row decoders; we and sae
// per side (index 0 = left, 1 = right).  Purely combinational.
`timescale 1ps/1ps
module bank_select (
  input  logic       wl_en,
  input  logic       write_en,
  input  logic       sense_en,
  input  logic       bot,
  input  logic       side,
  output logic       wl_en_top,
  output logic       wl_en_bot,
  output logic [1:0] we,
  output logic [1:0] sae
);

  logic bot_b, side_b;

  assign bot_b     = ~bot;
  assign wl_en_top = bot_b & wl_en;
  assign wl_en_bot = bot   & wl_en;

  assign side_b = ~side;
  assign we[0]  = side_b & write_en;
  assign we[1]  = side   & write_en;
  assign sae[0] = side_b & sense_en;
  assign sae[1] = side   & sense_en;

endmodule
