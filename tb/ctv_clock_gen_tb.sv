// ctv_clock_gen_tb: checks the f_H, f_L and f_L-bar strobes.
//
// With H_DIV = 4 and L_DIV = 6 (f_H = 1.5 * f_L) it checks, tick by tick
// after reset, that en_h fires exactly every 4 ticks, en_l every 6 ticks,
// en_lb 3 ticks after each en_l, that all three fire on the first tick, that
// en_l and en_lb never coincide, and that the clock levels are high for the
// first half of each period. It also runs the 2:1 ratio of the timing
// diagram (H_DIV = 3, L_DIV = 6), where every f_H edge meets an f_L or
// f_L-bar edge.
module ctv_clock_gen_tb;

  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic en_h, en_l, en_lb, f_h, f_l;
  logic en_h2, en_l2, en_lb2, f_h2, f_l2;

  ctv_clock_gen #(.H_DIV(4), .L_DIV(6)) dut (.clk, .rst_n, .en_h, .en_l, .en_lb, .f_h, .f_l);
  ctv_clock_gen #(.H_DIV(3), .L_DIV(6)) dut2 (.clk, .rst_n, .en_h(en_h2), .en_l(en_l2),
                                              .en_lb(en_lb2), .f_h(f_h2), .f_l(f_l2));

  task automatic expect_eq(input string what, input logic got, input logic exp, input int t);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL tick %0d %s got %0d exp %0d", t, what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_coinc = 0;

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      expect_eq("en_h",  en_h,  (t % 4) == 0, t);
      expect_eq("en_l",  en_l,  (t % 6) == 0, t);
      expect_eq("en_lb", en_lb, (t % 6) == 3, t);
      expect_eq("f_h",   f_h,   (t % 4) < 2, t);
      expect_eq("f_l",   f_l,   (t % 6) < 3, t);
      expect_eq("l/lb disjoint", en_l & en_lb, 1'b0, t);
      // 2:1 ratio: every f_H edge is an f_L or f_L-bar edge
      expect_eq("en_h2", en_h2, (t % 3) == 0, t);
      if (en_h2) begin
        expect_eq("2:1 alignment", en_l2 | en_lb2, 1'b1, t);
        n_coinc++;
      end
    end
    checks++;
    if (n_coinc != 67) begin
      failures++;
      $display("FAIL 2:1 coincidences %0d", n_coinc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
