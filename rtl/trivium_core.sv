// trivium_core: Trivium stream cipher core with parallel key/IV loading.
//
// Three nonlinear shift registers A (93 bits), B (84 bits) and C (111 bits) form a
// ring: each register's feedback bit is built from one of its own bits and four
// bits of the previous register (one AND of two adjacent bits plus XORs), and the
// keystream bit z is the XOR of six state bits. The update functions are in
// trivium_pkg.
//
// Operation: a clock edge with load=1 loads the whole state at once (key into A,
// IV into B, three ones into C, zeros elsewhere) through the three-NAND2 selectors
// of fsr_load_reg. Then 1152 initialisation updates (four times the 288-bit state)
// run with no keystream released; after that ks_valid is high and every clock
// yields RADIX keystream bits.
//
// RADIX: the update logic is replicated RADIX times in series (ks[0] first in
// time). RADIX=1 is the bit-serial structure of the published block diagram; up to 64 is
// allowed. 1152 must be a multiple of RADIX.
//
// Interface:
//   load            load key and iv at the next rising edge and start initialisation
//   key[j] = k_j    80-bit key;  iv[j] = IV_j  80-bit IV
//   ks[RADIX-1:0]   keystream bits of the current clock, valid when ks_valid
// Timing: ks_valid rises 1152/RADIX + 1 clock edges after the edge that sampled
// load; ks is combinational from the state registers. Reset (rst_n, asynchronous,
// active low) clears only the phase sequencer.
module trivium_core
  import trivium_pkg::*;
#(
  parameter int unsigned RADIX = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [KEY_W-1:0] key,
  input  logic [IV_W-1:0]  iv,
  output logic [RADIX-1:0] ks,
  output logic             ks_valid,
  output logic             init_busy
);

  logic           load_n_shift;
  logic           init_phase;
  trivium_state_t state, state_next, state_load;

  fsr_init_ctrl #(
    .INIT_CLOCKS(INIT_CLOCKS),
    .RADIX      (RADIX)
  ) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .load        (load),
    .load_n_shift(load_n_shift),
    .init_phase  (init_phase),
    .ks_valid    (ks_valid)
  );

  // RADIX unrolled cipher steps. The keystream bits are computed in every phase;
  // ks_valid tells when they are released.
  always_comb begin
    trivium_state_t st;
    st = state;
    for (int r = 0; r < int'(RADIX); r++) begin
      ks[r] = trivium_z(st);
      st    = trivium_step(st);
    end
    state_next = st;
    state_load = trivium_load_value(key, iv);
  end

  fsr_load_reg #(.WIDTH(A_W)) u_reg_a (
    .clk         (clk),
    .load_n_shift(load_n_shift),
    .d_load      (state_load.a),
    .d_shift     (state_next.a),
    .q           (state.a)
  );

  fsr_load_reg #(.WIDTH(B_W)) u_reg_b (
    .clk         (clk),
    .load_n_shift(load_n_shift),
    .d_load      (state_load.b),
    .d_shift     (state_next.b),
    .q           (state.b)
  );

  fsr_load_reg #(.WIDTH(C_W)) u_reg_c (
    .clk         (clk),
    .load_n_shift(load_n_shift),
    .d_load      (state_load.c),
    .d_shift     (state_next.c),
    .q           (state.c)
  );

  assign init_busy = init_phase;

  initial begin
    assert (RADIX >= 1 && RADIX <= MAX_RADIX)
      else $error("trivium_core: RADIX %0d outside 1..%0d", RADIX, MAX_RADIX);
  end

endmodule
