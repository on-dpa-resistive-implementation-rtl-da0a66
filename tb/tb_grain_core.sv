// tb_grain_core: self-checking testbench for the Grain v.1 core.
//
// Three cores run side by side: bit-serial (RADIX=1), RADIX=8 and RADIX=32, the
// largest radix considered for Grain v.1. For each key/IV pair all are loaded, the
// clocks until ks_valid are counted (160, 20 and 5) and 256 keystream bits are
// compared with a reference model (cipher_ref_pkg). The reference works on the bit
// sequences s_i and b_i themselves (s[i+80] computed from s[i..], b[i+80] from
// b[i..]) rather than on shifting registers. The pairs are the four
// key/IV choices of the power-analysis experiments (K1 = AA..A, K2 = 80..0,
// IV1 = 55..5, IV2 = FF..F, IV3 = 00..0, IV4 = 11..1), the all-zero pair, whose
// first 80 keystream bits (bytes collected least significant bit first) are
// checked against the published value dee931cf1662a72f77d0, and random pairs.
// A reload in the middle of the keystream phase is also exercised.
module tb_grain_core;

  import cipher_ref_pkg::*;

  localparam int NBITS = 256;
  localparam int R2    = 8;
  localparam int R3    = 32;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        load;
  logic [79:0] key;
  logic [63:0] iv;
  logic [0:0]  ks1;
  logic [R2-1:0] ks2;
  logic [R3-1:0] ks3;
  logic        v1, v2, v3, busy1, busy2, busy3;

  int checks   = 0;
  int failures = 0;

  always #5 clk = ~clk;

  grain_core #(.RADIX(1)) dut1 (
    .clk(clk), .rst_n(rst_n), .load(load), .key(key), .iv(iv),
    .ks(ks1), .ks_valid(v1), .init_busy(busy1)
  );

  grain_core #(.RADIX(R2)) dut2 (
    .clk(clk), .rst_n(rst_n), .load(load), .key(key), .iv(iv),
    .ks(ks2), .ks_valid(v2), .init_busy(busy2)
  );

  grain_core #(.RADIX(R3)) dut3 (
    .clk(clk), .rst_n(rst_n), .load(load), .key(key), .iv(iv),
    .ks(ks3), .ks_valid(v3), .init_busy(busy3)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Load, count the initialisation clocks of both cores, collect and compare.
  task automatic run_pair(input logic [79:0] k, input logic [63:0] v, output bit zs[]);
    bit exp[];
    int c1, c2, c3, n1, n2, n3;
    bit got1[NBITS], got2[NBITS], got3[NBITS];
    grain_ref_keystream(k, v, NBITS, exp);
    @(negedge clk);
    key  = k;
    iv   = v;
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    c1 = 1; c2 = 1; c3 = 1;
    n1 = 0; n2 = 0; n3 = 0;
    while (n1 < NBITS || n2 < NBITS || n3 < NBITS) begin
      if (v1 && n1 < NBITS) begin got1[n1] = ks1[0]; n1++; end
      else if (n1 == 0) c1++;
      if (v2 && n2 < NBITS) begin
        for (int r = 0; r < R2; r++) got2[n2 + r] = ks2[r];
        n2 += R2;
      end
      else if (n2 == 0) c2++;
      if (v3 && n3 < NBITS) begin
        for (int r = 0; r < R3; r++) got3[n3 + r] = ks3[r];
        n3 += R3;
      end
      else if (n3 == 0) c3++;
      @(negedge clk);
    end
    check(c1 == 161, $sformatf("RADIX=1 keystream after %0d edges, expected 161", c1));
    check(c2 == 21,  $sformatf("RADIX=8 keystream after %0d edges, expected 21", c2));
    check(c3 == 6,   $sformatf("RADIX=32 keystream after %0d edges, expected 6", c3));
    for (int i = 0; i < NBITS; i++) begin
      check(got1[i] == exp[i], $sformatf("RADIX=1 key=%h iv=%h bit %0d", k, v, i));
      check(got2[i] == exp[i], $sformatf("RADIX=8 key=%h iv=%h bit %0d", k, v, i));
      check(got3[i] == exp[i], $sformatf("RADIX=32 key=%h iv=%h bit %0d", k, v, i));
    end
    zs = exp;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    bit zs[];
    logic [79:0] keystream_bytes;
    rst_n = 1'b0;
    load  = 1'b0;
    key   = '0;
    iv    = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!v1 && !v2 && !v3 && !busy1 && !busy2 && !busy3, "idle after reset");

    // All-zero key and IV: published keystream dee931cf1662a72f77d0, each byte
    // collected least significant bit first.
    run_pair('0, '0, zs);
    for (int i = 0; i < 80; i++) keystream_bytes[79 - (i / 8) * 8 - 7 + (i % 8)] = zs[i];
    check(keystream_bytes == 80'hdee931cf1662a72f77d0,
          $sformatf("all-zero test vector: %h", keystream_bytes));

    run_pair({20{4'hA}}, {16{4'h5}}, zs);  // K1, IV1
    run_pair({20{4'hA}}, {16{4'hF}}, zs);  // K1, IV2
    run_pair({4'h8, 76'h0}, {16{4'h0}}, zs); // K2, IV3
    // Reload while the previous keystream is being produced.
    repeat (7) @(negedge clk);
    run_pair({4'h8, 76'h0}, {16{4'h1}}, zs); // K2, IV4
    for (int t = 0; t < 3; t++)
      run_pair({$urandom, $urandom, $urandom}, {$urandom, $urandom}, zs);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
