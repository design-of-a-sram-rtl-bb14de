// data_latches: latches between the bidirectional data bus and the I/O block.
//
// The controller talks to the outside over one 8-bit bus whose direction is
// set by the read/write pin, so both directions are latched.  The write
// latches are transparent while RW is low and hold the written byte for the
// write drivers once RW rises.  The read latches are transparent while
// READ_EN = RW AND SENSE_EN, which is the half clock period in which the
// sense amplifiers are on, and hold the byte that was read for the rest of
// the read.  Both are level-sensitive latches on purpose, as in the bus-latch
// schematic; they are the only latches in the design.  The split of the pad
// into data_i, data_o and data_oe (drive the pad while RW is high) is this
// design's choice: the tri-state drivers themselves belong to the pads.
//
// Ports: rw, sense_en, data_i (bus into the chip), rd (sense amplifier
// outputs), wr (to the write drivers), data_o (bus out of the chip), data_oe.
`timescale 1ps/1ps
module data_latches #(
  parameter int unsigned W = 8
) (
  input  logic         rw,
  input  logic         sense_en,
  input  logic [W-1:0] data_i,
  input  logic [W-1:0] rd,
  output logic [W-1:0] wr,
  output logic [W-1:0] data_o,
  output logic         data_oe
);

  logic read_en;

  assign read_en = rw & sense_en;

  always_latch begin
    if (!rw) wr = data_i;
  end

  always_latch begin
    if (read_en) data_o = rd;
  end

  assign data_oe = rw;

endmodule
