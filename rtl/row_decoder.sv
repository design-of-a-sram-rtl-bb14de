// row_decoder: single-stage AND-gate word line decoder.
//
// Each word line has its own wide AND gate fed with the true or the
// complemented form of every address bit, so that exactly one gate is high
// for each address; a second two-input AND gate then lets the decoded line
// through only while wl_en is high.  There is no predecoding or multi-staging,
// as suits a 16-row array.  This follows the row decoder schematic; only the
// parameterisation of the address width is this design's.
//
// Ports: a (row address), wl_en (word line enable from the bank selector),
// wl (one-hot word lines, all low while wl_en is low).  Purely combinational.
`timescale 1ps/1ps
module row_decoder #(
  parameter int unsigned AW = 4
) (
  input  logic [AW-1:0]      a,
  input  logic               wl_en,
  output logic [(1<<AW)-1:0] wl
);

  logic [AW-1:0] a_b;  // complemented address lines (A0B, A1B, ...)

  assign a_b = ~a;

  for (genvar r = 0; r < (1 << AW); r++) begin : g_row
    logic [AW-1:0] lit;  // literal of each address bit for this row
    logic          hit;

    for (genvar b = 0; b < AW; b++) begin : g_lit
      assign lit[b] = ((r >> b) & 1) != 0 ? a[b] : a_b[b];
    end

    assign hit   = &lit;
    assign wl[r] = hit & wl_en;
  end

endmodule
