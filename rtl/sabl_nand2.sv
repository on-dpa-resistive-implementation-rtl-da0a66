// sabl_nand2: behavioural model of a two-input SABL (sense-amplifier based logic)
// NAND/AND gate. Behavioural model of a transistor-level custom cell: it gives the
// cell's logic and phase behaviour, not its circuit.
//
// SABL is a dual-rail precharge logic style. Every signal travels on two
// complementary wires, and every clock cycle has a precharge phase (clk low) and
// an evaluation phase (clk high). In precharge both output nodes are pulled high.
// In evaluation exactly one of them is discharged by the differential pull-down
// network: the NAND node when a AND b is true, the AND node otherwise. So every
// cycle, whatever the data, one output wire falls and rises once, which is what
// makes the supply current independent of the data.
//
// Inputs arrive in domino style (through inverters from the previous gate): both
// rails of an input are 0 in precharge and one rail rises during evaluation. A node
// is discharged only once its pull-down path is complete, so the gate waits for
// late inputs; once discharged it stays low until the next precharge.
//
// Interface:
//   clk               precharge (0) / evaluate (1)
//   a, a_n, b, b_n    dual-rail inputs (true and complement rails)
//   nand_o, and_o     the two output nodes, both 1 in precharge
// The NAND/AND port names follow the published cell; the domino input convention,
// the modelling of a node as "discharged when its path conducts" and the zero
// delay are choices of this model.
module sabl_nand2 (
  input  logic clk,
  input  logic a,
  input  logic a_n,
  input  logic b,
  input  logic b_n,
  output logic nand_o,
  output logic and_o
);

  // Both nodes discharged at once would mean an input had both rails high.
  always_comb begin
    nand_o = ~(clk & a & b);
    and_o  = ~(clk & (a_n | b_n));
    assert (nand_o || and_o)
      else $error("sabl_nand2: both output nodes discharged, invalid dual-rail input");
  end

endmodule
