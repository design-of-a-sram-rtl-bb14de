// pch_delay_chain: behavioural model of the precharge delay chain.
//
// This is a behavioural model, not synthesizable logic: it stands for a chain
// of N_INV minimum size inverters whose propagation delay sets the length of
// the precharge pulse.  Each inverter is modelled as a transport delay of
// INV_DELAY_PS picoseconds, so with an even N_INV the output y follows the
// input a, delayed by N_INV * INV_DELAY_PS.  The chain length of four
// inverters is the document's; the delay per inverter is an assumed value
// for a minimum size 65 nm inverter loaded by the next one.
//
// Ports: a (chain input), y (chain output).  Timing: y(t) = a(t - N_INV*INV_DELAY_PS),
// inverted when N_INV is odd.
`timescale 1ps/1ps
module pch_delay_chain #(
  parameter int unsigned N_INV        = 4,
  parameter int unsigned INV_DELAY_PS = 30
) (
  input  logic a,
  output logic y
);

  logic [N_INV:0] node;

  assign node[0] = a;

  for (genvar i = 0; i < N_INV; i++) begin : g_inv
    assign #(INV_DELAY_PS) node[i+1] = ~node[i];
  end

  assign y = node[N_INV];

endmodule
