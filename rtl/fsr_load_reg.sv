// fsr_load_reg: the flip-flops of a feedback shift register with parallel loading.
//
// Every bit is a D flip-flop whose input comes from a 2:1 selector made of three
// two-input NAND gates: one NAND gates the parallel-load value, one gates the
// shift value (the neighbour bit or the feedback bit), and a third NAND merges the
// two. This is the parallel key/IV loading scheme of the cipher cores: loading all
// state bits at once in a single clock edge avoids a bit-serial load whose power
// profile would reveal the key one bit at a time. The three-NAND2 overhead per
// flip-flop and the active-low load / active-high shift control follow the
// published scheme; the register width is a parameter of this design.
//
// Interface:
//   load_n_shift  0: every bit takes d_load at the next rising clock edge
//                 1: every bit takes d_shift (next state of the shift register)
//   d_load        parallel-load value (key, IV and constant bits)
//   d_shift       shift/feedback value, computed outside from q
//   q             register contents
// Timing: one rising-edge register stage, no reset (the state is initialised by a
// parallel load).
module fsr_load_reg #(
  parameter int unsigned WIDTH = 80
) (
  input  logic             clk,
  input  logic             load_n_shift,
  input  logic [WIDTH-1:0] d_load,
  input  logic [WIDTH-1:0] d_shift,
  output logic [WIDTH-1:0] q
);

  logic             load;        // inverted control, the inverter on the control line
  logic [WIDTH-1:0] nand_load;   // NAND(d_load, load)
  logic [WIDTH-1:0] nand_shift;  // NAND(d_shift, shift)
  logic [WIDTH-1:0] d;           // NAND of the two: flip-flop input

  always_comb begin
    load       = ~load_n_shift;
    nand_load  = ~(d_load  & {WIDTH{load}});
    nand_shift = ~(d_shift & {WIDTH{load_n_shift}});
    d          = ~(nand_load & nand_shift);
  end

  always_ff @(posedge clk) begin
    q <= d;
  end

endmodule
