// ctv_checker_tb: checks one checker part of the CTV ALU.
//
// The testbench plays the main part: a new operation appears in the operand
// registers every 4 ticks (f_H), its main result is strobed one f_H cycle
// later, and about a third of the main results carry a flipped bit (an
// emulated timing violation). The checker's clock edge (en) comes every
// 6 ticks (f_L = f_H / 1.5). Checked: the checker claims exactly when its
// edge finds a pending operation; it reports that operation on the tick
// after its next edge, one f_L period later; the result equals the
// reference ALU result; detect is raised exactly for corrupted main results.
module ctv_checker_tb;
  import ctv_pkg::*;
  import ctv_alu_ref_pkg::*;

  localparam int H = 4, L = 6;

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  logic        en, op_pending, claim, main_strobe, done, detect;
  alu_op_e     op_op;
  logic [31:0] op_a, op_b, main_value, result;
  logic [7:0]  op_tag, main_tag, tag;

  ctv_checker #(.WIDTH(32), .TAG_W(8)) dut (.*);

  int checks = 0, failures = 0;
  int tick;

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

  typedef struct {
    alu_op_e     op;
    logic [31:0] a, b, fault;
    logic [7:0]  tag;
  } op_t;

  op_t cur, prev, chk;
  logic chk_busy;
  int   chk_start;
  int   n_verified = 0, n_detect = 0, n_clean = 0;

  initial begin
    rst_n = 0; en = 0; op_pending = 0; main_strobe = 0;
    op_op = ALU_ADD; op_a = 0; op_b = 0; op_tag = 0; main_tag = 0; main_value = 0;
    chk_busy = 0; chk_start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (tick = 0; tick < 6000; tick++) begin
      @(negedge clk);
      en          = (tick % L) == 0;
      main_strobe = 0;
      if (tick % H == 1) begin
        // the main part captured a new operation on the last f_H edge ...
        prev = cur;
        cur.op    = alu_op_e'($urandom_range(7));
        cur.a     = $urandom;
        cur.b     = $urandom;
        cur.tag   = 8'(tick / H);
        cur.fault = ($urandom_range(2) == 0) ? (32'h1 << $urandom_range(31)) : 32'h0;
        op_op = cur.op; op_a = cur.a; op_b = cur.b; op_tag = cur.tag;
        op_pending = 1;
        // ... and the result of the previous one
        if (tick > H) begin
          main_strobe = 1;
          main_tag    = prev.tag;
          main_value  = ref_alu32(prev.op, prev.a, prev.b) ^ prev.fault;
        end
      end
      #1;
      expect_true("claim exactly on an edge with a pending operation", claim == (en && op_pending));
      @(posedge clk);
      #1;
      if (en && chk_busy) begin
        expect_true("done one f_L period after start", done && (tick - chk_start == L));
        expect_true("tag", tag == chk.tag);
        expect_true("correct result", result == ref_alu32(chk.op, chk.a, chk.b));
        expect_true("detect iff main result corrupted", detect == (chk.fault != 0));
        n_verified++;
        if (detect) n_detect++; else n_clean++;
      end else begin
        expect_true("no spurious done", !done);
      end
      if (claim) begin
        chk = cur; chk_busy = 1; chk_start = tick;
        op_pending = 0;
      end else if (en) begin
        chk_busy = 0;
      end
    end
    expect_true("verifications", n_verified > 500);
    expect_true("violations detected", n_detect > 50);
    expect_true("clean verifications", n_clean > 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
