// clock_gen: behavioural model of the two-phase non-overlapping clock
// generator (not synthesizable: it relies on gate delays).
//
// Two cross-coupled NOR gates, one fed by mclk and one by its inverse; each
// NOR output passes through a buffer chain before it reaches the other gate.
// phi1 can rise only after phi2 has fallen and travelled through its buffers,
// and the other way round, so the two phases never overlap; the buffer chain
// delay BUF_DELAY (in simulation time units) sets the non-overlap time.  phi1 is high while mclk is
// high, phi2 while it is low, each shortened by the non-overlap gaps.  The
// NOR pair and buffers are the design's; the delay values are illustrative.
// The synthesizable core in this repository is clocked by mclk directly and
// this model only brings the two phases out.
//
// Synthesis reports a combinational loop through n1/b1/n2/b2: that loop is the
// cross-coupled NOR latch itself and is intended.  Synthesis drops the delays,
// so the netlist of this block is not a working clock generator; a real one
// needs the delay chain built from cells on the chip.

module clock_gen #(
  parameter int NOR_DELAY = 1,
  parameter int BUF_DELAY = 4
) (
  input  logic mclk,
  output logic phi1,
  output logic phi2
);
  logic nmclk, n1, n2, b1, b2;

  assign nmclk = ~mclk;
  assign #(NOR_DELAY) n1 = ~(nmclk | b2);
  assign #(NOR_DELAY) n2 = ~(mclk  | b1);
  assign #(BUF_DELAY) b1 = n1;
  assign #(BUF_DELAY) b2 = n2;
  assign phi1 = b1;
  assign phi2 = b2;
endmodule
