// tb_sabl_xor2: self-checking testbench for the SABL xor2 cell model.
//
// Runs 500 clock cycles with random data, driving the inputs in domino style: both
// rails low while clk is low (precharge), one rail of each input raised a little
// after clk rises (evaluation). Checks: both output nodes are high in precharge;
// before the inputs arrive neither node is discharged; after they arrive the
// XOR node carries a XOR b, XNOR node its complement; and every cycle, whatever the data, exactly one output wire falls and
// exactly one rises, the data-independent switching that SABL is used for.
module tb_sabl_xor2;

  logic clk = 1'b0;
  logic a, a_n, b, b_n;
  logic o1, o0;

  int checks   = 0;
  int failures = 0;
  int falls = 0, rises = 0;

  sabl_xor2 dut (
    .clk(clk), .a(a), .a_n(a_n), .b(b), .b_n(b_n), .xor_o(o1), .xnor_o(o0)
  );

  always @(negedge o1 or negedge o0) falls++;
  always @(posedge o1 or posedge o0) rises++;

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
    logic va, vb;
    {a, a_n, b, b_n} = '0;
    #10;
    for (int c = 0; c < 500; c++) begin
      va = 1'($urandom);
      vb = 1'($urandom);
      // precharge phase
      clk = 1'b0;
      {a, a_n, b, b_n} = '0;
      #5;
      check(o1 && o0, $sformatf("cycle %0d: both nodes high in precharge", c));
      falls = 0;
      rises = 0;
      // evaluation phase, inputs not yet arrived
      clk = 1'b1;
      #2;
      check(o1 && o0, $sformatf("cycle %0d: no discharge before inputs arrive", c));
      a = va; a_n = ~va;
      #1;
      b = vb; b_n = ~vb;
      #4;
      check(o1 == (va ^ vb), $sformatf("cycle %0d: a=%0b b=%0b first node %0b", c, va, vb, o1));
      check(o0 == ~(va ^ vb), $sformatf("cycle %0d: a=%0b b=%0b second node %0b", c, va, vb, o0));
      // back to precharge: the discharged node recovers
      clk = 1'b0;
      #1;
      {a, a_n, b, b_n} = '0;
      #1;
      check(falls == 1 && rises == 1,
            $sformatf("cycle %0d: %0d falls and %0d rises, expected one each", c, falls, rises));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
