// grain_core: Grain v.1 stream cipher core with parallel key/IV loading.
//
// Two 80-bit shift registers, an LFSR with linear feedback f and an NLFSR with
// nonlinear feedback g (which also takes the LFSR's oldest bit), feed the output
// filter h; h is XORed with seven NLFSR bits to give the keystream bit z. The state
// update functions are in grain_pkg.
//
// Operation: a clock edge with load=1 loads the whole state at once (key into the
// NLFSR, IV into the first 64 LFSR bits, ones into the last 16) through the
// three-NAND2 selectors of fsr_load_reg. Then 160 initialisation updates follow in
// which z is fed back into both registers and no keystream is released. After that
// ks_valid is high and every clock yields RADIX keystream bits.
//
// RADIX: the update logic is replicated RADIX times in series, so one clock
// performs RADIX cipher steps and produces RADIX keystream bits (ks[0] first in
// time). RADIX=1 is the bit-serial structure of the published block diagram; up to 32 is
// allowed. 160 must be a multiple of RADIX.
//
// Interface:
//   load            load key and iv at the next rising edge and start initialisation
//   key[j] = k_j    80-bit key;  iv[j] = IV_j  64-bit IV
//   ks[RADIX-1:0]   keystream bits of the current clock, valid when ks_valid
// Timing: ks_valid rises 160/RADIX + 1 clock edges after the edge that sampled
// load; ks is combinational from the state registers. Throughput is RADIX bits per
// clock. Reset (rst_n, asynchronous, active low) clears only the phase sequencer.
module grain_core
  import grain_pkg::*;
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

  logic         load_n_shift;
  logic         init_phase;
  grain_state_t state, state_next, state_load;

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

  // RADIX unrolled cipher steps.
  always_comb begin
    grain_state_t st;
    st = state;
    for (int r = 0; r < int'(RADIX); r++) begin
      ks[r] = grain_z(st);
      st    = grain_step(st, init_phase);
    end
    state_next = st;
    state_load = grain_load_value(key, iv);
  end

  fsr_load_reg #(.WIDTH(FSR_W)) u_lfsr (
    .clk         (clk),
    .load_n_shift(load_n_shift),
    .d_load      (state_load.lfsr),
    .d_shift     (state_next.lfsr),
    .q           (state.lfsr)
  );

  fsr_load_reg #(.WIDTH(FSR_W)) u_nfsr (
    .clk         (clk),
    .load_n_shift(load_n_shift),
    .d_load      (state_load.nfsr),
    .d_shift     (state_next.nfsr),
    .q           (state.nfsr)
  );

  assign init_busy = init_phase;

  initial begin
    assert (RADIX >= 1 && RADIX <= MAX_RADIX)
      else $error("grain_core: RADIX %0d outside 1..%0d", RADIX, MAX_RADIX);
  end

endmodule
