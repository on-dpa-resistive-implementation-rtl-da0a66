// fsr_ciphers_top: the two feedback-shift-register stream ciphers side by side.
//
// A Grain v.1 core (80-bit key, 64-bit IV, 160 initialisation clocks) and a
// Trivium core (80-bit key, 80-bit IV, 1152 initialisation clocks) share the clock
// and the asynchronous active-low reset and are otherwise independent: each has
// its own load request, key, IV and keystream outputs. Both cores load key and IV
// in parallel in one clock edge and produce RADIX keystream bits per clock
// (throughput = clock frequency x RADIX); the default RADIX of 1 gives the
// bit-serial cores. Putting both ciphers in one top is a choice of this design,
// made so that they can be exercised and compared together.
//
// Beside the ciphers stand models of the three SABL (sense-amplifier based logic)
// library cells, a NAND2/AND2, an XOR2/XNOR2 and a D flip-flop, clocked by the same
// clock and with their dual-rail pins brought out. They are behavioural models of
// transistor-level cells, for simulating the dual-rail precharge protocol
// (precharge while clk is low, one output rail discharged while clk is high);
// the ciphers themselves are written as single-rail logic.
module fsr_ciphers_top #(
  parameter int unsigned GRAIN_RADIX   = 1,
  parameter int unsigned TRIVIUM_RADIX = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // Grain v.1
  input  logic                     grain_load,
  input  logic [79:0]              grain_key,
  input  logic [63:0]              grain_iv,
  output logic [GRAIN_RADIX-1:0]   grain_ks,
  output logic                     grain_ks_valid,
  output logic                     grain_init_busy,
  // Trivium
  input  logic                     trivium_load,
  input  logic [79:0]              trivium_key,
  input  logic [79:0]              trivium_iv,
  output logic [TRIVIUM_RADIX-1:0] trivium_ks,
  output logic                     trivium_ks_valid,
  output logic                     trivium_init_busy,
  // SABL cell models (dual rail, domino inputs: both rails 0 while clk is low)
  input  logic                     sabl_a,
  input  logic                     sabl_a_n,
  input  logic                     sabl_b,
  input  logic                     sabl_b_n,
  output logic                     sabl_nand_o,
  output logic                     sabl_and_o,
  output logic                     sabl_xor_o,
  output logic                     sabl_xnor_o,
  input  logic                     sabl_d,
  input  logic                     sabl_d_n,
  output logic                     sabl_q,
  output logic                     sabl_q_n
);

  grain_core #(.RADIX(GRAIN_RADIX)) u_grain (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (grain_load),
    .key      (grain_key),
    .iv       (grain_iv),
    .ks       (grain_ks),
    .ks_valid (grain_ks_valid),
    .init_busy(grain_init_busy)
  );

  trivium_core #(.RADIX(TRIVIUM_RADIX)) u_trivium (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (trivium_load),
    .key      (trivium_key),
    .iv       (trivium_iv),
    .ks       (trivium_ks),
    .ks_valid (trivium_ks_valid),
    .init_busy(trivium_init_busy)
  );

  sabl_nand2 u_sabl_nand2 (
    .clk   (clk),
    .a     (sabl_a),
    .a_n   (sabl_a_n),
    .b     (sabl_b),
    .b_n   (sabl_b_n),
    .nand_o(sabl_nand_o),
    .and_o (sabl_and_o)
  );

  sabl_xor2 u_sabl_xor2 (
    .clk   (clk),
    .a     (sabl_a),
    .a_n   (sabl_a_n),
    .b     (sabl_b),
    .b_n   (sabl_b_n),
    .xor_o (sabl_xor_o),
    .xnor_o(sabl_xnor_o)
  );

  sabl_dff u_sabl_dff (
    .clk(clk),
    .d  (sabl_d),
    .d_n(sabl_d_n),
    .q  (sabl_q),
    .q_n(sabl_q_n)
  );

endmodule
