// tb_fsr_ciphers_top: end-to-end test of both cipher cores at their default sizes.
//
// Grain v.1 and Trivium run concurrently on the shared clock. For each of the four
// key/IV choices used in the power-analysis experiments (K1 = AA..A, K2 = 80..0,
// IV1 = 55..5, IV2 = FF..F, IV3 = 00..0, IV4 = 11..1; Grain takes the low 64 bits of
// the IV) both cores are loaded in parallel, the initialisation length is
// measured (160 and 1152 clocks) and 128 keystream bits of each are compared with
// the reference models. The run also reloads one core in the middle of its
// initialisation and one during keystream output. Each mechanism (parallel load,
// full initialisation, keystream output, reload during initialisation, reload
// during keystream output) is counted, and one that never happened is a failure.
// Throughout the run the SABL cell models beside the ciphers get random dual-rail
// data every cycle (domino style: rails low while clk is low); their outputs are
// checked at the end of each evaluation phase and the number of evaluated cycles
// is counted as a further mechanism.
module tb_fsr_ciphers_top;

  import cipher_ref_pkg::*;

  localparam int NBITS = 128;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        g_load, t_load;
  logic [79:0] g_key, t_key, t_iv;
  logic [63:0] g_iv;
  logic [0:0]  g_ks, t_ks;
  logic        g_valid, t_valid, g_busy, t_busy;

  int checks   = 0;
  int failures = 0;
  logic        s_a, s_a_n, s_b, s_b_n, s_d, s_d_n;
  logic        s_nand, s_and, s_xor, s_xnor, s_q, s_q_n;
  int n_sabl = 0;
  int n_load = 0, n_init_done = 0, n_ks_bits = 0, n_reload_init = 0, n_reload_ks = 0;

  always #5 clk = ~clk;

  fsr_ciphers_top dut (
    .clk(clk), .rst_n(rst_n),
    .grain_load(g_load), .grain_key(g_key), .grain_iv(g_iv),
    .grain_ks(g_ks), .grain_ks_valid(g_valid), .grain_init_busy(g_busy),
    .trivium_load(t_load), .trivium_key(t_key), .trivium_iv(t_iv),
    .trivium_ks(t_ks), .trivium_ks_valid(t_valid), .trivium_init_busy(t_busy),
    .sabl_a(s_a), .sabl_a_n(s_a_n), .sabl_b(s_b), .sabl_b_n(s_b_n),
    .sabl_nand_o(s_nand), .sabl_and_o(s_and), .sabl_xor_o(s_xor), .sabl_xnor_o(s_xnor),
    .sabl_d(s_d), .sabl_d_n(s_d_n), .sabl_q(s_q), .sabl_q_n(s_q_n)
  );

  // SABL cells: inputs arrive 1 time unit after clk rises and return to the
  // precharge value 1 unit before clk falls; flip-flop data is set during the low
  // phase and captured at the rising edge.
  initial begin : sabl_driver
    logic va, vb, vd, vd_prev;
    {s_a, s_a_n, s_b, s_b_n} = '0;
    s_d = 1'b0; s_d_n = 1'b1;
    vd_prev = 1'b0;
    forever begin
      @(posedge clk);
      va = 1'($urandom); vb = 1'($urandom);
      #1;
      s_a = va; s_a_n = ~va; s_b = vb; s_b_n = ~vb;
      if (rst_n && n_sabl > 0) begin
        check(s_q == vd_prev && s_q_n == ~vd_prev, "SABL flip-flop output");
      end
      #2;
      if (rst_n) begin
        check(s_nand == ~(va & vb) && s_and == (va & vb), "SABL NAND2/AND2 evaluation");
        check(s_xor == (va ^ vb) && s_xnor == ~(va ^ vb), "SABL XOR2/XNOR2 evaluation");
        n_sabl++;
      end
      #1;
      {s_a, s_a_n, s_b, s_b_n} = '0;
      @(negedge clk);
      #1;
      check(s_nand && s_and && s_xor && s_xnor, "SABL outputs precharged");
      vd = 1'($urandom);
      s_d = vd; s_d_n = ~vd;
      vd_prev = vd;
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Count loads as seen at the rising edge, and reloads by phase.
  always @(posedge clk) begin
    if (rst_n) begin
      if (g_load) n_load++;
      if (t_load) n_load++;
      if (g_load && g_busy)  n_reload_init++;
      if (t_load && t_busy)  n_reload_init++;
      if (g_load && g_valid) n_reload_ks++;
      if (t_load && t_valid) n_reload_ks++;
    end
  end

  // Load both cores together (a pre-load on one core first when asked), then
  // follow both until NBITS keystream bits of each are collected.
  task automatic run_both(input logic [79:0] k, input logic [79:0] v, input int preload);
    bit   g_exp[], t_exp[];
    int   g_init, t_init, g_n, t_n;
    logic g_seen_init, t_seen_init;
    grain_ref_keystream(k, v[63:0], NBITS, g_exp);
    trivium_ref_keystream(k, v, NBITS, t_exp);
    if (preload != 0) begin
      // Start Trivium with the bitwise complement first, then restart it.
      @(negedge clk);
      t_key = ~k; t_iv = ~v; t_load = 1'b1;
      @(negedge clk);
      t_load = 1'b0;
      repeat (preload) @(negedge clk);
    end
    @(negedge clk);
    g_key = k; g_iv = v[63:0]; g_load = 1'b1;
    t_key = k; t_iv = v;       t_load = 1'b1;
    @(negedge clk);
    g_load = 1'b0; t_load = 1'b0;
    g_init = 0; t_init = 0; g_n = 0; t_n = 0;
    g_seen_init = 1'b0; t_seen_init = 1'b0;
    while (g_n < NBITS || t_n < NBITS) begin
      if (g_busy) begin g_init++; g_seen_init = 1'b1; end
      if (t_busy) begin t_init++; t_seen_init = 1'b1; end
      if (g_valid && g_n < NBITS) begin
        check(g_ks[0] == g_exp[g_n], $sformatf("Grain key=%h bit %0d", k, g_n));
        g_n++; n_ks_bits++;
      end
      if (t_valid && t_n < NBITS) begin
        check(t_ks[0] == t_exp[t_n], $sformatf("Trivium key=%h bit %0d", k, t_n));
        t_n++; n_ks_bits++;
      end
      @(negedge clk);
    end
    check(g_init == 160,  $sformatf("Grain initialisation took %0d clocks", g_init));
    check(t_init == 1152, $sformatf("Trivium initialisation took %0d clocks", t_init));
    if (g_init == 160)  n_init_done++;
    if (t_init == 1152) n_init_done++;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    rst_n  = 1'b0;
    g_load = 1'b0; t_load = 1'b0;
    g_key  = '0; g_iv = '0; t_key = '0; t_iv = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!g_valid && !t_valid && !g_busy && !t_busy, "both cores idle after reset");

    run_both({20{4'hA}}, {20{4'h5}}, 0);     // K1, IV1
    run_both({20{4'hA}}, {20{4'hF}}, 0);     // K1, IV2: reload while keystream runs
    run_both({4'h8, 76'h0}, {20{4'h0}}, 300); // K2, IV3: Trivium restarted mid-init
    run_both({4'h8, 76'h0}, {20{4'h1}}, 0);  // K2, IV4

    $display("mechanisms: loads=%0d full_inits=%0d keystream_bits=%0d reload_in_init=%0d reload_in_keystream=%0d sabl_cycles=%0d",
             n_load, n_init_done, n_ks_bits, n_reload_init, n_reload_ks, n_sabl);
    check(n_load > 0,        "parallel load never happened");
    check(n_init_done > 0,   "initialisation never completed");
    check(n_ks_bits > 0,     "no keystream produced");
    check(n_reload_init > 0, "no reload during initialisation");
    check(n_reload_ks > 0,   "no reload during keystream output");
    check(n_sabl > 0,        "SABL cells never evaluated");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
