// tb_trivium_core: self-checking testbench for the Trivium core.
//
// Two cores run side by side, one bit-serial (RADIX=1) and one with RADIX=64. For
// each key/IV pair both are loaded, the clocks until ks_valid are counted (1152
// and 18) and 256 keystream bits are compared with a reference model (cipher_ref_pkg). The
// reference keeps the 288-bit state in the s1..s288 numbering of the cipher's
// specification, independently of the three-register a/b/c form of the core.
// The pairs are the four key/IV choices of the power-analysis experiments
// (K1 = AA..A, K2 = 80..0, IV1 = 55..5, IV2 = FF..F, IV3 = 00..0, IV4 = 11..1), the
// all-zero pair, whose first 16 keystream bytes (each collected least significant
// bit first) are checked against the published value fbe0bf265859051b517a2e4e239fc97f,
// and random pairs. A reload during the keystream phase is included.
module tb_trivium_core;

  import cipher_ref_pkg::*;

  localparam int NBITS = 256;
  localparam int R2    = 64;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          load;
  logic [79:0]   key;
  logic [79:0]   iv;
  logic [0:0]    ks1;
  logic [R2-1:0] ks2;
  logic          v1, v2, busy1, busy2;

  int checks   = 0;
  int failures = 0;

  always #5 clk = ~clk;

  trivium_core #(.RADIX(1)) dut1 (
    .clk(clk), .rst_n(rst_n), .load(load), .key(key), .iv(iv),
    .ks(ks1), .ks_valid(v1), .init_busy(busy1)
  );

  trivium_core #(.RADIX(R2)) dut2 (
    .clk(clk), .rst_n(rst_n), .load(load), .key(key), .iv(iv),
    .ks(ks2), .ks_valid(v2), .init_busy(busy2)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_pair(input logic [79:0] k, input logic [79:0] v, output bit zs[]);
    bit exp[];
    int c1, c2, n1, n2;
    bit got1[NBITS], got2[NBITS];
    trivium_ref_keystream(k, v, NBITS, exp);
    @(negedge clk);
    key  = k;
    iv   = v;
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    c1 = 1; c2 = 1;
    n1 = 0; n2 = 0;
    while (n1 < NBITS || n2 < NBITS) begin
      if (v1 && n1 < NBITS) begin got1[n1] = ks1[0]; n1++; end
      else if (n1 == 0) c1++;
      if (v2 && n2 < NBITS) begin
        for (int r = 0; r < R2; r++) got2[n2 + r] = ks2[r];
        n2 += R2;
      end
      else if (n2 == 0) c2++;
      @(negedge clk);
    end
    check(c1 == 1153, $sformatf("RADIX=1 keystream after %0d edges, expected 1153", c1));
    check(c2 == 19,   $sformatf("RADIX=64 keystream after %0d edges, expected 19", c2));
    for (int i = 0; i < NBITS; i++) begin
      check(got1[i] == exp[i], $sformatf("RADIX=1 key=%h iv=%h bit %0d", k, v, i));
      check(got2[i] == exp[i], $sformatf("RADIX=64 key=%h iv=%h bit %0d", k, v, i));
    end
    zs = exp;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    bit zs[];
    logic [127:0] kbytes;
    rst_n = 1'b0;
    load  = 1'b0;
    key   = '0;
    iv    = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!v1 && !v2 && !busy1 && !busy2, "idle after reset");

    run_pair('0, '0, zs);
    for (int i = 0; i < 128; i++) kbytes[127 - (i / 8) * 8 - 7 + (i % 8)] = zs[i];
    check(kbytes == 128'hfbe0bf265859051b517a2e4e239fc97f,
          $sformatf("all-zero test vector: %h", kbytes));

    run_pair({20{4'hA}}, {20{4'h5}}, zs);   // K1, IV1
    run_pair({20{4'hA}}, {20{4'hF}}, zs);   // K1, IV2
    run_pair({4'h8, 76'h0}, {20{4'h0}}, zs); // K2, IV3
    repeat (5) @(negedge clk);
    run_pair({4'h8, 76'h0}, {20{4'h1}}, zs); // K2, IV4
    for (int t = 0; t < 2; t++)
      run_pair({$urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom}, zs);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
