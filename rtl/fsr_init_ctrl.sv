// fsr_init_ctrl: phase sequencer shared by the Grain v.1 and Trivium cores.
//
// A stream cipher core goes through three phases: the parallel load of key and IV
// (one clock), an initialisation run of INIT_CLOCKS state updates during which no
// keystream is released, and the keystream phase. With RADIX state updates per
// clock, initialisation lasts INIT_CLOCKS/RADIX clocks. The controller is a
// three-state machine with a down-counter; its encoding, the reset and the
// handshake are choices of this design.
//
// Interface:
//   load          request a new key/IV load; sampled at the rising clock edge.
//                 It may be raised in any phase and restarts the sequence.
//   load_n_shift  to the state registers: 0 while load is high (parallel load)
//   init_phase    1 during initialisation (cores feed their output back into the
//                 state, or suppress the keystream)
//   ks_valid      1 in the keystream phase: the core's keystream output is valid
// Timing: after the clock edge that samples load=1, init_phase is high for exactly
// INIT_CLOCKS/RADIX clocks, then ks_valid stays high up to the clock edge that
// samples the next load.
module fsr_init_ctrl #(
  parameter int unsigned INIT_CLOCKS = 160,
  parameter int unsigned RADIX       = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  output logic load_n_shift,
  output logic init_phase,
  output logic ks_valid
);

  localparam int unsigned NCYC = INIT_CLOCKS / RADIX;
  localparam int unsigned CW   = $clog2(NCYC + 1);

  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,
    ST_INIT = 2'd1,
    ST_RUN  = 2'd2
  } phase_e;

  phase_e        phase;
  logic [CW-1:0] remaining;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= ST_IDLE;
      remaining <= '0;
    end else if (load) begin
      phase     <= ST_INIT;
      remaining <= CW'(NCYC);
    end else begin
      unique case (phase)
        ST_INIT: begin
          remaining <= remaining - 1'b1;
          if (remaining == CW'(1)) phase <= ST_RUN;
        end
        ST_RUN:  phase <= ST_RUN;
        default: phase <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    load_n_shift = ~load;
    init_phase   = (phase == ST_INIT);
    ks_valid     = (phase == ST_RUN);
  end

  initial begin
    assert (INIT_CLOCKS % RADIX == 0)
      else $error("INIT_CLOCKS (%0d) must be a multiple of RADIX (%0d)", INIT_CLOCKS, RADIX);
  end

endmodule
