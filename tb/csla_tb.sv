// csla_tb: self-checking test of the carry select adder.
//
// Compares sum/cout with the integer sum a + b + cin, computed here with a
// wider addition, for directed carry-chain corner cases (full propagation
// across every block boundary, all ones, alternating patterns) and for
// random operands. Combinational: each vector is checked after #1.
module csla_tb;

  localparam int unsigned W = 32;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int           checks = 0, failures = 0;

  csla #(.WIDTH(W), .BLOCK(4)) dut (.a, .b, .cin, .sum, .cout);

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    logic [W:0] exp;
    a = ta; b = tb_; cin = tc;
    #1;
    exp = {1'b0, ta} + {1'b0, tb_} + {{W{1'b0}}, tc};
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h cin=%0d got %0d:%h exp %h", ta, tb_, tc, cout, sum, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0, 0);
    check('1, '0, 1);           // carry through the whole word
    check('1, '1, 1);
    check(32'h8000_0000, 32'h8000_0000, 0);
    for (int k = 0; k < W; k += 4) begin
      // carry generated in one block and propagated through all above it
      check(~(32'h1 << k) | (32'h1 << k), 32'h1 << k, 0);
      check(32'hFFFF_FFFF >> k, 32'h1, 0);
      check(32'h0000_000F << k, 32'h0000_0001 << k, 1);
    end
    check(32'hAAAA_AAAA, 32'h5555_5555, 1);
    check(32'h5555_5555, 32'h5555_5555, 0);
    for (int i = 0; i < 20000; i++)
      check($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
