// tb_fsr_load_reg: self-checking testbench for the parallel-load FSR register.
//
// Drives random parallel-load and shift values and a random load/shift control for
// 2000 clocks and checks after every rising edge that each bit took the load value
// when the control was 0 and the shift value when it was 1. A short run then wires
// the register as a plain 80-bit shift register (d_shift = q shifted by one, a
// constant bit entering at the top) and checks that a loaded pattern moves down
// one position per clock.
module tb_fsr_load_reg;

  localparam int W = 80;

  logic         clk = 1'b0;
  logic         load_n_shift;
  logic [W-1:0] d_load, d_shift, q;
  logic         chain;      // 1: d_shift is the shifted register contents
  logic [W-1:0] rnd_shift;

  int checks   = 0;
  int failures = 0;

  always #5 clk = ~clk;

  assign d_shift = chain ? {1'b1, q[W-1:1]} : rnd_shift;

  fsr_load_reg dut (
    .clk(clk), .load_n_shift(load_n_shift), .d_load(d_load), .d_shift(d_shift), .q(q)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [W-1:0] exp;
    logic [W-1:0] pattern;
    chain        = 1'b0;
    load_n_shift = 1'b0;
    d_load       = '0;
    rnd_shift    = '0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      d_load       = {$urandom, $urandom, $urandom};
      rnd_shift    = {$urandom, $urandom, $urandom};
      load_n_shift = 1'($urandom);
      exp          = load_n_shift ? rnd_shift : d_load;
      @(posedge clk);
      #1;
      check(q == exp, $sformatf("cycle %0d ctl=%0b q=%h exp=%h", t, load_n_shift, q, exp));
    end

    // Serial shifting after a parallel load.
    @(negedge clk);
    pattern      = {$urandom, $urandom, $urandom};
    d_load       = pattern;
    load_n_shift = 1'b0;
    @(negedge clk);
    check(q == pattern, "parallel load of shift pattern");
    chain        = 1'b1;
    load_n_shift = 1'b1;
    for (int n = 1; n <= 100; n++) begin
      @(negedge clk);
      exp = (n >= W) ? '1 : ((pattern >> n) | ~({W{1'b1}} >> n));
      check(q == exp, $sformatf("shift %0d q=%h exp=%h", n, q, exp));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
