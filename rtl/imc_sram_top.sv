// imc_sram_top: 1 kbit full butterfly SRAM with its controller, for loading
// neural-network weights into an in-memory-computing array.
//
// Four banks of 16 x 16 cells sit around a central control block.  The two
// row decoders lie between the left and right banks of the top and of the
// bottom half, so each raises a word line in two banks; the two I/O blocks
// (write drivers and sense amplifiers, shown here inside the bank models) lie
// between the top and bottom banks of each side.  One access touches one bank:
// address bit 5 picks the row decoder, bit 6 the I/O block (see imc_sram_pkg
// for the whole address map).
//
// Protocol on the external pins (clk period 1 ns in the document's results):
//   * Write: drive rw = 0, addr and data_i just after a rising clock edge and
//     hold them for one period.  The byte is in the cells when the next
//     rising edge comes.
//   * Read: drive rw = 1 and addr just after a rising edge and hold them for
//     two periods.  data_o is valid from the falling edge of the first period
//     (data_oe is high while rw is high) and is held by the read latches to
//     the end of the read and beyond, until the next read senses.
//   Inputs may change only in the short window after the rising edge before
//   the precharge pulse ends (the address is not latched inside); assertions
//   below flag a change while the word line is enabled.
//   There is no idle state: every period with rw low writes data_i to addr.
//   A host that has nothing to do holds rw high, which only reads.
//
// The precharge pulse, the word line enable, the sense enable and the write
// enable are brought out to watch the timing; the word lines of both row
// decoders are brought out for the word-line DACs of the computing mode,
// which are not part of this design.
//
// What follows the document: the bank arrangement, the sizes, the control
// circuit, the bank-enable gating on address bit 5, the row decoder and the
// data-bus latches.  This design's own choices: the use of address bits 4 and
// 6, the read multiplexer between banks, the split data bus and the reset.
`timescale 1ps/1ps
module imc_sram_top
  import imc_sram_pkg::*;
#(
  parameter int unsigned INV_DELAY_PS = 30
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  rw,
  input  logic [ADDR_W-1:0]     addr,
  input  logic [DATA_W-1:0]     data_i,
  output logic [DATA_W-1:0]     data_o,
  output logic                  data_oe,
  output logic                  pch_en,
  output logic                  wl_en,
  output logic                  write_en,
  output logic                  sense_en,
  output logic [ROWS-1:0]       wlt_o,
  output logic [ROWS-1:0]       wlb_o
);

  addr_t a;
  assign a = addr_t'(addr);

  // ---- control block -------------------------------------------------------
  logic pchb, pch_fb;

  mem_ctrl u_ctrl (
    .clk      (clk),
    .rst      (rst),
    .rw       (rw),
    .pch_fb   (pch_fb),
    .pch_en   (pch_en),
    .pchb     (pchb),
    .wl_en    (wl_en),
    .sense_en (sense_en),
    .write_en (write_en)
  );

  pch_delay_chain #(.N_INV(4), .INV_DELAY_PS(INV_DELAY_PS)) u_chain (
    .a (pchb),
    .y (pch_fb)
  );

  logic       wl_en_top, wl_en_bot;
  logic [1:0] we_side, sae_side;

  bank_select u_bsel (
    .wl_en     (wl_en),
    .write_en  (write_en),
    .sense_en  (sense_en),
    .bot       (a.bot),
    .side      (a.side),
    .wl_en_top (wl_en_top),
    .wl_en_bot (wl_en_bot),
    .we        (we_side),
    .sae       (sae_side)
  );

  row_decoder #(.AW(ROW_AW)) u_rdec_top (
    .a     (a.row),
    .wl_en (wl_en_top),
    .wl    (wlt_o)
  );

  row_decoder #(.AW(ROW_AW)) u_rdec_bot (
    .a     (a.row),
    .wl_en (wl_en_bot),
    .wl    (wlb_o)
  );

  // ---- data bus --------------------------------------------------------------
  logic [DATA_W-1:0] wr_data, rd_data;

  data_latches #(.W(DATA_W)) u_latch (
    .rw       (rw),
    .sense_en (sense_en),
    .data_i   (data_i),
    .rd       (rd_data),
    .wr       (wr_data),
    .data_o   (data_o),
    .data_oe  (data_oe)
  );

  // ---- banks: index {side, bot}: 0 top-left, 1 bottom-left, 2 top-right, 3 bottom-right
  logic [DATA_W-1:0] bank_dout [BANKS];

  for (genvar s = 0; s < 2; s++) begin : g_side
    for (genvar h = 0; h < 2; h++) begin : g_half
      sram_bank #(.ROWS(ROWS), .W(DATA_W), .COL_MUX(COL_MUX)) u_bank (
        .wl   (h == 0 ? wlt_o : wlb_o),
        .pchb (pchb),
        .col  (a.col),
        .we   (we_side[s]),
        .sae  (sae_side[s]),
        .din  (wr_data),
        .dout (bank_dout[2*s + h])
      );
    end
  end

  // Each I/O block reads the bank of its side whose row decoder is active.
  assign rd_data = bank_dout[{a.side, a.bot}];

  // ---- bus rules -------------------------------------------------------------
  // The address and RW are not latched, so they may only change while every
  // word line is off; otherwise a word line of the old or new address would
  // see the other access's data.
  always @(addr) begin
    if (!rst) assert (!wl_en) else $error("address changed while the word line was enabled");
  end

  always @(rw) begin
    if (!rst) assert (!wl_en) else $error("RW changed while the word line was enabled");
  end

endmodule
