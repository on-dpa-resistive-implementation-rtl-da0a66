// sabl_dff: behavioural model of the SABL D flip-flop. Behavioural model of a
// transistor-level custom cell: it gives the cell's logic behaviour, not its
// circuit.
//
// The flip-flop takes a dual-rail data input (d, d_n), as produced by SABL gates,
// and drives static complementary outputs (q, q_n) through output inverters, so
// its outputs hold their value for the whole cycle instead of being precharged.
// The value is captured at the rising clock edge; at that instant exactly one data
// rail must be high. In the cell the capture stage is a sense amplifier that
// always switches one of its two nodes, so the power drawn at the clock edge does
// not depend on the stored value.
//
// Interface:
//   clk        capture at the rising edge
//   d, d_n     dual-rail data input
//   q, q_n     complementary outputs, q = captured value
// The rising-edge capture, the initial-free behaviour and the check on the input
// encoding are choices of this model; the relative timing of gate evaluation and
// capture in a real SABL pipeline (delayed clocking) is not modelled.
module sabl_dff (
  input  logic clk,
  input  logic d,
  input  logic d_n,
  output logic q,
  output logic q_n
);

  always_ff @(posedge clk) begin
    q   <= d;
    q_n <= d_n;
  end

  always @(posedge clk) begin
    assert (d != d_n) else $error("sabl_dff: data input is not a valid dual-rail value");
  end

endmodule
