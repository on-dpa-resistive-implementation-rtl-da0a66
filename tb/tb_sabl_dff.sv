// tb_sabl_dff: self-checking testbench for the SABL D flip-flop model.
//
// Presents a random dual-rail value before each of 500 rising clock edges and
// checks that q takes it and q_n its complement, that the outputs hold through the
// rest of the cycle while the data input returns to its precharge value, and that
// the outputs only change at rising edges.
module tb_sabl_dff;

  logic clk = 1'b0;
  logic d, d_n, q, q_n;

  int checks   = 0;
  int failures = 0;

  sabl_dff dut (.clk(clk), .d(d), .d_n(d_n), .q(q), .q_n(q_n));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic v, prev;
    d = 1'b0; d_n = 1'b1;
    #1 clk = 1'b1;
    #4 clk = 1'b0;
    prev = 1'b0;
    for (int c = 0; c < 500; c++) begin
      v = 1'($urandom);
      #2;
      d = v; d_n = ~v;
      #2;
      check(q == prev && q_n == ~prev, $sformatf("cycle %0d: output changed before the edge", c));
      clk = 1'b1;
      #1;
      check(q == v && q_n == ~v, $sformatf("cycle %0d: captured %0b/%0b, expected %0b", c, q, q_n, v));
      // data returns to precharge (both rails low), outputs must hold
      d = 1'b0; d_n = 1'b0;
      #2;
      clk = 1'b0;
      #2;
      check(q == v && q_n == ~v, $sformatf("cycle %0d: output not held", c));
      prev = v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
