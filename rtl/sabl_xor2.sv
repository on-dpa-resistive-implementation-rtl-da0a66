// sabl_xor2: behavioural model of a two-input SABL XOR/XNOR gate. Behavioural model
// of a transistor-level custom cell: it gives the cell's logic and phase
// behaviour, not its circuit.
//
// Like every SABL cell it is dual-rail and precharged: with clk low both output
// nodes are high; with clk high exactly one is discharged by the differential
// pull-down network. The XOR node is discharged when the inputs are equal
// (a.b or a_n.b_n), the XNOR node when they differ (a.b_n or a_n.b), so the XOR
// node carries a XOR b during evaluation. One output wire falls and rises once per
// cycle whatever the data.
//
// Inputs follow the domino convention (both rails 0 in precharge, one rises in
// evaluation); a node discharges once its path is complete and stays low until the
// next precharge.
//
// Interface:
//   clk               precharge (0) / evaluate (1)
//   a, a_n, b, b_n    dual-rail inputs
//   xor_o, xnor_o     the two output nodes, both 1 in precharge
// The XOR/XOR-bar output names follow the published cell; the input convention and
// zero delay are choices of this model.
module sabl_xor2 (
  input  logic clk,
  input  logic a,
  input  logic a_n,
  input  logic b,
  input  logic b_n,
  output logic xor_o,
  output logic xnor_o
);

  // Both nodes discharged at once would mean an input had both rails high.
  always_comb begin
    xor_o  = ~(clk & ((a & b) | (a_n & b_n)));
    xnor_o = ~(clk & ((a & b_n) | (a_n & b)));
    assert (xor_o || xnor_o)
      else $error("sabl_xor2: both output nodes discharged, invalid dual-rail input");
  end

endmodule
