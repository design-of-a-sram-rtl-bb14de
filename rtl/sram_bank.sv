// sram_bank: behavioural model of one 256-bit_cell SRAM bank and its column circuits.
//
// This is a behavioural model, not synthesizable logic: 6T cells, bit lines,
// the PMOS precharge and equaliser, the NMOS write driver, the N-type pass-gate
// column multiplexer and the current-mirror sense amplifier are analog
// circuits.  The model gives them two-valued behaviour that is enough to show
// whether the controller's pulses come in a workable order:
//
//   * while pchb is low both bit lines of every column are precharged high;
//   * while we is high the write driver of each selected column pulls BL or
//     BLB low according to its data bit, and every bit_cell on a raised word line
//     in that column takes the bit lines' value;
//   * otherwise a raised word line lets each bit_cell discharge the bit line on
//     its 0 side, as in a read; a bit line once low stays low until the next
//     precharge, so reading without a precharge before it returns garbage;
//   * while sae is high the sense amplifier of each selected column outputs 1
//     when BL is high and BLB low; while sae is low its output is 0.
//
// The array is ROWS x COLS cells; data bit j lives in column COL_MUX*j + col,
// so the column multiplexer interleaves the words of a row.  Cells power up
// at random values.  The 16 x 16 size and the 2:1 multiplexing follow the
// document; the interleaving order and the two-valued bit-line model are this
// design's choices.
//
// Ports: wl (word lines), pchb (active-low precharge), col (multiplexer
// select), we (write-driver enable), sae (sense-amplifier enable), din (data
// to write), dout (sensed data).  The model reacts at once to every input
// change; timing comes from the controller driving it.  Lint tools report
// the cells and bit lines as latches: they are storage nodes, and holding
// their value between events is what the model is for.
`timescale 1ps/1ps
module sram_bank #(
  parameter int unsigned ROWS    = 16,
  parameter int unsigned W       = 8,
  parameter int unsigned COL_MUX = 2,
  parameter int unsigned CSEL_W  = (COL_MUX > 1) ? $clog2(COL_MUX) : 1
) (
  input  logic [ROWS-1:0]   wl,
  input  logic              pchb,
  input  logic [CSEL_W-1:0] col,
  input  logic              we,
  input  logic              sae,
  input  logic [W-1:0]      din,
  output logic [W-1:0]      dout
);

  localparam int unsigned COLS = W * COL_MUX;

  logic [COLS-1:0] bit_cell [ROWS];
  logic [COLS-1:0] bl;
  logic [COLS-1:0] blb;

  always @(wl, pchb, col, we, sae, din) begin
    for (int c = 0; c < COLS; c++) begin
      if (!pchb) begin
        bl[c]  = 1'b1;
        blb[c] = 1'b1;
      end else if (we && (c % COL_MUX) == int'(col)) begin
        bl[c]  = din[c / COL_MUX];
        blb[c] = ~din[c / COL_MUX];
        for (int r = 0; r < ROWS; r++)
          if (wl[r]) bit_cell[r][c] = din[c / COL_MUX];
      end else begin
        for (int r = 0; r < ROWS; r++)
          if (wl[r]) begin
            bl[c]  = bl[c] & bit_cell[r][c];
            blb[c] = blb[c] & ~bit_cell[r][c];
          end
      end
    end
    for (int j = 0; j < W; j++)
      dout[j] = sae & bl[j*COL_MUX + int'(col)] & ~blb[j*COL_MUX + int'(col)];
  end

  // Raising more than one word line of a bank is always a decoder fault.
  always @(wl) begin
    assert ($onehot0(wl)) else $error("sram_bank: several word lines raised: %b", wl);
  end

endmodule
