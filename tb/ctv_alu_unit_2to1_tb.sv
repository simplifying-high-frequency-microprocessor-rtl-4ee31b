// ctv_alu_unit_2to1_tb: end-to-end test of the CTV ALU with f_H = 2 * f_L,
// the limiting ratio at which the two checkers exactly keep up with the main
// ALU and every f_H edge coincides with an f_L or f_L-bar edge, as in the
// scheme's clock diagram (H_DIV = 3, L_DIV = 6 base ticks).
//
// Same scoreboard and checks as ctv_alu_unit_tb: main result one f_H cycle
// after issue and equal to the reference with the emulated violation
// applied; one verification per operation, one f_L period after the checker
// edge that takes it; detect exactly for corrupted main results; correct
// results from the checkers; each mechanism seen at least once. Fault
// probability swept over 0, 10, 20 and 30 %.
module ctv_alu_unit_2to1_tb;
  import ctv_pkg::*;
  import ctv_alu_ref_pkg::*;

  localparam int H = 3, L = 6;      // f_H = 2 * f_L
  localparam int N_PER_PHASE = 3000;

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  logic        issue_ready, issue_valid;
  alu_op_e     issue_op;
  logic [31:0] issue_a, issue_b, fault_mask;
  logic [7:0]  issue_tag;
  logic        main_valid, verify_valid, detect, verify_checker;
  logic [7:0]  main_tag, verify_tag;
  logic [31:0] main_result, correct_result;

  ctv_alu_unit #(.H_DIV(H), .L_DIV(L)) dut (.*);

  int checks = 0, failures = 0;
  int tick = 0;

  task automatic expect_true(input string what, input logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL tick %0d: %s", tick, what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard, indexed by tag
  typedef struct {
    logic        live;
    logic        main_seen;
    logic [31:0] exp;
    logic [31:0] fault;
    int          t_issue;
    int          ph;
  } sb_t;
  sb_t sb [256];

  int n_main = 0, n_chk_l = 0, n_chk_lb = 0, n_detect = 0, n_clean = 0;
  int n_wait = 0, n_b2b = 0, n_issued = 0, n_faulty = 0;
  int ph_faulty[4], ph_detect[4], ph_ops[4];
  int phase;
  logic [7:0] next_tag;
  logic       last_edge_issued;
  int         issued_here, lat;
  sb_t        e;

  initial begin
    rst_n = 0; issue_valid = 0; issue_op = ALU_ADD; issue_a = 0; issue_b = 0;
    issue_tag = 0; fault_mask = 0; next_tag = 0; last_edge_issued = 0;
    foreach (sb[i]) sb[i].live = 0;
    foreach (ph_ops[i]) begin ph_ops[i] = 0; ph_faulty[i] = 0; ph_detect[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (phase = 0; phase < 5; phase++) begin
      // phases 0..3: fault probability 0, 10, 20, 30 %; phase 4 drains
      issued_here = 0;
      while ((phase < 4) ? (issued_here < N_PER_PHASE) : (issued_here < 40)) begin
        @(negedge clk);
        issue_valid = 0;
        fault_mask  = 0;
        if (phase < 4 && issue_ready && $urandom_range(9) != 0 && !sb[next_tag].live) begin
          issue_valid = 1;
          issue_op    = alu_op_e'($urandom_range(7));
          issue_a     = $urandom;
          issue_b     = ($urandom_range(3) == 0) ? 32'($urandom_range(31)) : $urandom;
          issue_tag   = next_tag;
          if ($urandom_range(99) < phase * 10)
            fault_mask = $urandom | (32'h1 << $urandom_range(31));
        end
        @(posedge clk);
        if (issue_ready) begin
          if (issue_valid && last_edge_issued) n_b2b++;
          last_edge_issued = issue_valid;
        end
        if (issue_valid) begin
          sb[issue_tag].live      = 1;
          sb[issue_tag].main_seen = 0;
          sb[issue_tag].exp       = ref_alu32(issue_op, issue_a, issue_b);
          sb[issue_tag].fault     = fault_mask;
          sb[issue_tag].t_issue   = tick;
          sb[issue_tag].ph        = phase;
          next_tag++;
          n_issued++;
          ph_ops[phase]++;
          if (fault_mask != 0) begin n_faulty++; ph_faulty[phase]++; end
        end
        if (phase == 4 || issue_valid) issued_here++;
        #1;
        tick++;
        if (main_valid) begin
          e = sb[main_tag];
          expect_true("main result for a live operation", e.live && !e.main_seen);
          expect_true("main latency is one f_H cycle", tick - 1 - e.t_issue == H);
          expect_true("main value", main_result == (e.exp ^ e.fault));
          sb[main_tag].main_seen = 1;
          n_main++;
        end
        if (verify_valid) begin
          e   = sb[verify_tag];
          lat = tick - 1 - e.t_issue;
          expect_true("verified operation is live", e.live && e.main_seen);
          expect_true("verification latency", lat >= L + 1 && lat <= L + L / 2);
          expect_true("correct result", correct_result == e.exp);
          expect_true("detect iff violation", detect == (e.fault != 0));
          if (lat > L + 1) n_wait++;
          if (verify_checker) n_chk_lb++; else n_chk_l++;
          if (detect) begin n_detect++; ph_detect[e.ph]++; end
          else n_clean++;
          sb[verify_tag].live = 0;
        end else begin
          expect_true("detect only with verify_valid", !detect);
        end
      end
    end
    // every issued operation was verified
    foreach (sb[i]) expect_true("operation left unverified", !sb[i].live);
    for (int p = 0; p < 4; p++)
      $display("fault probability %0d%%: %0d ops, %0d violations injected, %0d detected (%0d%% of ops)",
               p * 10, ph_ops[p], ph_faulty[p], ph_detect[p], (100 * ph_detect[p]) / ph_ops[p]);
    $display("issued %0d main %0d checkerL %0d checkerLbar %0d detected %0d clean %0d waited %0d back-to-back %0d",
             n_issued, n_main, n_chk_l, n_chk_lb, n_detect, n_clean, n_wait, n_b2b);
    expect_true("all violations detected", n_detect == n_faulty);
    expect_true("every operation verified", n_chk_l + n_chk_lb == n_issued && n_main == n_issued);
    expect_true("mechanism: speculative result", n_main > 0);
    expect_true("mechanism: f_L checker", n_chk_l > 0);
    expect_true("mechanism: f_L-bar checker", n_chk_lb > 0);
    expect_true("mechanism: violation detected", n_detect > 0);
    expect_true("mechanism: clean verification", n_clean > 0);
    expect_true("mechanism: operation waits for a checker edge", n_wait > 0);
    expect_true("mechanism: back-to-back issue", n_b2b > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
