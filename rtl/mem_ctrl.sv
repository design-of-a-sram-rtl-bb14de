// mem_ctrl: timing generator of the SRAM controller (one-cycle write version).
//
// The controller has no state machine in the usual sense: five flip-flops,
// clocked by CLK, by its falling edge and by the end of the precharge pulse,
// turn the read/write pin into the control pulses of one access.
//
//   pch_en   Set at the rising clock edge unless the sense amplifiers were on
//            in the half period before (SENSEB low).  Cleared asynchronously
//            when its own inverse PCHB comes back through the delay chain, so
//            the precharge pulse lasts one delay-chain time.
//   wl_en    Loaded with SENSE_EN at the rising clock edge, and set
//            asynchronously when the delayed PCHB rises while CLK is high, ie.
//            right after the precharge pulse.  So WL_EN is off only during
//            precharge and stays on for the rest of the period.
//   sense_en Loaded with RW at the falling clock edge, so a read senses in the
//            second half of its first period.  It is held cleared from the
//            next rising edge for as long as WL_EN stays high; this makes the
//            read take two periods and keeps the next precharge away from the
//            sensing half period.
//   write_en Combinational: NOT RW AND WL_EN, so a write finishes in one period.
//
// A write (RW low) therefore takes one clock period: precharge, then word line
// and write driver on until the next rising edge.  A read (RW high) takes two:
// precharge, word line, sensing in the second half of the first period, then a
// period with the word line on and nothing else, after which the next access
// may start.  RW and the address must be stable from shortly after the rising
// edge that starts an access until it ends; they may change only in the
// window between that edge and the end of the precharge pulse.
//
// The flip-flops, their clocks and their asynchronous set and clear pins
// follow the improved controller schematic.  Two of its nets, the clear of
// the precharge flip-flop and the clock of the word-line arming flip-flop,
// are both taken here from the delay-chain output pch_fb (the delayed PCHB).
// The reset input, which pulls the control nodes low, is this design's
// rendering of the pull-down reset.  The asynchronous set and clear pins are
// driven by logic on purpose: that is how the circuit times its pulses.
//
// Ports: clk, rst (active high), rw (1 read, 0 write), pch_fb (delay-chain
// output); pch_en / pchb (precharge, and its active-low form for the
// precharge transistors), wl_en, sense_en, write_en.
`timescale 1ps/1ps
module mem_ctrl (
  input  logic clk,
  input  logic rst,
  input  logic rw,
  input  logic pch_fb,
  output logic pch_en,
  output logic pchb,
  output logic wl_en,
  output logic sense_en,
  output logic write_en
);

  logic pch_clr_n;   // clear of the precharge flip-flop
  logic arm_set_n;   // set of the word-line arming flip-flop (while CLK low)
  logic wl_set_n;    // arming flip-flop output: sets WL_EN when low
  logic wl_load_n;   // asynchronous load of WL_EN (set, or reset)
  logic senseb;
  logic sense_clr_n; // holds SENSE_EN cleared while low
  logic sense_rst_n;

  // Precharge flip-flop: D = SENSEB, cleared by the delayed PCHB.
  assign pch_clr_n = pch_fb & ~rst;

  always_ff @(posedge clk or negedge pch_clr_n) begin
    if (!pch_clr_n) pch_en <= 1'b0;
    else            pch_en <= senseb;
  end

  assign pchb = ~pch_en;

  // Word-line arming flip-flop: set while CLK is low, loads 0 when the
  // delayed PCHB rises, that is when the precharge pulse is over.
  assign arm_set_n = clk & ~rst;

  always_ff @(posedge pch_fb or negedge arm_set_n) begin
    if (!arm_set_n) wl_set_n <= 1'b1;
    else            wl_set_n <= 1'b0;
  end

  // Word-line enable flip-flop: D = SENSE_EN, set by the arming flip-flop.
  // Reset and set share one asynchronous load: while either is active the
  // flip-flop takes NOT rst, so reset wins.
  assign wl_load_n = wl_set_n & ~rst;

  always_ff @(posedge clk or negedge wl_load_n) begin
    if (!wl_load_n) wl_en <= ~rst;
    else            wl_en <= sense_en;
  end

  // Sense-hold flip-flop: set while WL_EN is low, loads 0 at a rising edge
  // that finds WL_EN high.
  always_ff @(posedge clk or negedge wl_en) begin
    if (!wl_en) sense_clr_n <= 1'b1;
    else        sense_clr_n <= 1'b0;
  end

  // Sense-enable flip-flop: falling-edge clocked, D = RW.
  assign sense_rst_n = sense_clr_n & ~rst;

  always_ff @(negedge clk or negedge sense_rst_n) begin
    if (!sense_rst_n) sense_en <= 1'b0;
    else              sense_en <= rw;
  end

  assign senseb = ~sense_en;

  // Write enable: gates, not a flip-flop, so it follows WL_EN at once.
  assign write_en = ~rw & wl_en;

endmodule
