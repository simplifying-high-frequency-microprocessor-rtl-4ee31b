// ctv_main_alu_tb: checks the main (f_H) part of the CTV ALU.
//
// en_h is driven every 4 ticks. Operations are issued on random f_H edges
// with random operands and, on about a third of them, a non-zero fault mask.
// Checked: the result strobe comes exactly on the tick after the next f_H
// edge (one f_H cycle of latency), carries the issued tag and equals the
// reference result XOR the fault mask; op_pending rises with each operation,
// falls when a claim is given, and the operand registers show the operation.
module ctv_main_alu_tb;
  import ctv_pkg::*;
  import ctv_alu_ref_pkg::*;

  localparam int H = 4;

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  logic        en_h, in_valid, claim;
  alu_op_e     in_op, op_op;
  logic [31:0] in_a, in_b, in_fault, op_a, op_b, res_value;
  logic [7:0]  in_tag, op_tag, res_tag;
  logic        op_pending, res_strobe;

  ctv_main_alu #(.WIDTH(32), .TAG_W(8)) dut (.*);

  int checks = 0, failures = 0;
  int tick = 0;

  task automatic expect_true(input string what, input logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL tick %0d: %s", tick, what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // operation in flight: issued on the last f_H edge
  logic        exp_valid;
  logic [31:0] exp_val;
  logic [7:0]  exp_tag;
  int          exp_tick;
  int          n_results = 0, n_faults = 0;

  initial begin
    rst_n = 0; en_h = 0; in_valid = 0; claim = 0;
    in_op = ALU_ADD; in_a = 0; in_b = 0; in_tag = 0; in_fault = 0;
    exp_valid = 0; exp_val = 0; exp_tag = 0; exp_tick = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (tick = 0; tick < 4000; tick++) begin
      // drive inputs for this tick
      @(negedge clk);
      en_h     = (tick % H) == 0;
      claim    = op_pending && ($urandom_range(1) == 0) && !en_h;
      if (en_h) begin
        in_valid = $urandom_range(3) != 0;
        in_op    = alu_op_e'($urandom_range(7));
        in_a     = $urandom;
        in_b     = $urandom;
        in_tag   = 8'($urandom);
        in_fault = ($urandom_range(2) == 0) ? (32'h1 << $urandom_range(31)) : 32'h0;
      end
      // claim at least once before the next f_H edge so the assertion holds
      if ((tick % H) == H - 1 && op_pending) claim = 1;
      @(posedge clk);
      #1;
      // result of the previous operation appears one tick after this f_H edge
      if (en_h && exp_valid) begin
        expect_true("result strobe", res_strobe);
        expect_true("result tag", res_tag == exp_tag);
        expect_true("result value", res_value == exp_val);
        expect_true("latency one f_H cycle", tick - exp_tick == H);
        n_results++;
      end else begin
        expect_true("no spurious strobe", !res_strobe);
      end
      if (en_h) begin
        exp_valid = in_valid;
        if (in_valid) begin
          exp_val  = ref_alu32(in_op, in_a, in_b) ^ in_fault;
          exp_tag  = in_tag;
          exp_tick = tick;
          if (in_fault != 0) n_faults++;
          expect_true("pending after issue", op_pending);
          expect_true("operand registers", op_a == in_a && op_b == in_b && op_tag == in_tag && op_op == in_op);
        end else begin
          expect_true("no pending without issue", !op_pending);
        end
      end else if (claim) begin
        expect_true("claim clears pending", !op_pending);
      end
    end
    expect_true("results seen", n_results > 500);
    expect_true("faults injected", n_faults > 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
