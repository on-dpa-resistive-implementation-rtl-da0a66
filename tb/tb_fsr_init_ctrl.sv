// tb_fsr_init_ctrl: self-checking testbench for the cipher phase sequencer.
//
// Two sequencers are checked: the Grain v.1 setting (160 initialisation clocks,
// RADIX 1) and the Trivium setting at RADIX 64 (1152/64 = 18 clocks). After reset
// both must be idle. A load pulse must give load_n_shift = 0 in that cycle, then
// init_phase for exactly the expected number of clocks, then ks_valid until the
// next load. A load in the middle of initialisation must restart the count.
module tb_fsr_init_ctrl;

  logic clk = 1'b0;
  logic rst_n;
  logic load;
  logic lns_g, init_g, valid_g;
  logic lns_t, init_t, valid_t;

  int checks   = 0;
  int failures = 0;

  always #5 clk = ~clk;

  fsr_init_ctrl #(.INIT_CLOCKS(160), .RADIX(1)) dut_g (
    .clk(clk), .rst_n(rst_n), .load(load),
    .load_n_shift(lns_g), .init_phase(init_g), .ks_valid(valid_g)
  );

  fsr_init_ctrl #(.INIT_CLOCKS(1152), .RADIX(64)) dut_t (
    .clk(clk), .rst_n(rst_n), .load(load),
    .load_n_shift(lns_t), .init_phase(init_t), .ks_valid(valid_t)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Pulse load and follow the phases of both sequencers for 200 clocks.
  task automatic pulse_and_follow(input int n_clocks);
    int init_g_cnt, init_t_cnt, first_valid_g, first_valid_t;
    @(negedge clk);
    load = 1'b1;
    #1;
    check(lns_g == 1'b0 && lns_t == 1'b0, "load_n_shift low during load");
    @(negedge clk);
    load = 1'b0;
    #1;
    check(lns_g == 1'b1 && lns_t == 1'b1, "load_n_shift high after load");
    init_g_cnt = 0; init_t_cnt = 0;
    first_valid_g = -1; first_valid_t = -1;
    for (int c = 1; c <= n_clocks; c++) begin
      if (init_g) init_g_cnt++;
      if (init_t) init_t_cnt++;
      check(!(init_g && valid_g) && !(init_t && valid_t), "phases exclusive");
      if (valid_g && first_valid_g < 0) first_valid_g = c;
      if (valid_t && first_valid_t < 0) first_valid_t = c;
      if (first_valid_g >= 0) check(valid_g, "Grain ks_valid stays high");
      if (first_valid_t >= 0) check(valid_t, "Trivium ks_valid stays high");
      @(negedge clk);
      #1;
    end
    check(init_g_cnt == 160, $sformatf("Grain init clocks %0d, expected 160", init_g_cnt));
    check(init_t_cnt == 18,  $sformatf("Trivium init clocks %0d, expected 18", init_t_cnt));
    check(first_valid_g == 161, $sformatf("Grain valid at %0d, expected 161", first_valid_g));
    check(first_valid_t == 19,  $sformatf("Trivium valid at %0d, expected 19", first_valid_t));
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    rst_n = 1'b0;
    load  = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    check(!init_g && !valid_g && !init_t && !valid_t, "idle after reset");
    check(lns_g && lns_t, "shift selected when idle");

    pulse_and_follow(200);
    // Reload in the keystream phase.
    pulse_and_follow(200);
    // Reload in the middle of initialisation: restart the full count.
    @(negedge clk);
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    repeat (10) @(negedge clk);
    pulse_and_follow(200);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
