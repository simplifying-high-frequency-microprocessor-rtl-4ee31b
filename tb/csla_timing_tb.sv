// csla_timing_tb: fault probability of an over-clocked carry select adder.
//
// Two adders see the same operands: the gate-delay model (csla_delay_model)
// and the zero-delay RTL adder (csla). Operands are launched from an input
// register; the delayed adder's output is captured one clock period later,
// as an output register clocked at that period would, and compared with the
// RTL sum. A mismatch is a timing violation. The experiment is repeated for
// clock periods from the longest-path delay (plus one time unit, so the
// last change is not simultaneous with the capture) down to a third of it, and
// the fraction of violating additions is reported for each. The period that
// corresponds to f_H = 1.5 * f_L is two thirds of the longest path.
//
// Two operand streams are used: uniformly random 32-bit words, and "typical"
// integer operands (small signed values, as loop counters, offsets and
// addresses produce), whose carries rarely travel far. The operand
// traces of real programs are not reproduced.
//
// Checked: no violation at the longest-path period, a non-increasing
// violation count as the period shrinks, violations below the longest path,
// and the long carry chain (all ones + 1) violating at 2/3 of the period.
module csla_timing_tb;

  localparam int unsigned W = 32;
  localparam int unsigned D = 10;                // gate delay, time units
  localparam int unsigned CRIT = (4 + 7) * D;     // longest path of the model
  localparam int N_VEC = 2000;

  logic [W-1:0] a, b, sum_d, sum_r;
  logic         cin, cout_d, cout_r;
  int checks = 0, failures = 0;

  csla_delay_model #(.WIDTH(W), .BLOCK(4), .D_GATE(D)) u_slow (.a, .b, .cin, .sum(sum_d), .cout(cout_d));
  csla             #(.WIDTH(W), .BLOCK(4))             u_ref  (.a, .b, .cin, .sum(sum_r), .cout(cout_r));

  task automatic expect_true(input string what, input logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] typical_operand();
    int unsigned r = $urandom_range(3);
    case (r)
      0: return W'($signed(8'($urandom)));
      1: return W'($signed(16'($urandom)));
      2: return W'($urandom_range(255));
      default: return 32'h1000_0000 + W'($urandom_range(65535) * 4);
    endcase
  endfunction

  // apply one operand pair after the adder settled on the previous one, sample
  // after `period`, and say whether the sampled sum was wrong
  task automatic one_add(input logic [W-1:0] x, input logic [W-1:0] y, input int period,
                         output logic bad);
    a = x; b = y; cin = 1'b0;
    #(period);
    bad = ({cout_d, sum_d} != {cout_r, sum_r});
    #(CRIT + D);   // let the slow adder settle before the next launch
  endtask

  int periods[5] = '{CRIT + 1, (CRIT * 5) / 6, (CRIT * 2) / 3, CRIT / 2, CRIT / 3};
  int fails_rand[5], fails_typ[5];
  logic bad;

  initial begin
    a = '0; b = '0; cin = 1'b0;
    #(CRIT * 2);
    for (int p = 0; p < 5; p++) begin
      process::self().srandom(17);   // same operand sequence for every period
      fails_rand[p] = 0;
      fails_typ[p]  = 0;
      for (int n = 0; n < N_VEC; n++) begin
        one_add($urandom, $urandom, periods[p], bad);
        if (bad) fails_rand[p]++;
        one_add(typical_operand(), typical_operand(), periods[p], bad);
        if (bad) fails_typ[p]++;
      end
      $display("period %0d of %0d (clock x%0d.%02d): random %0d.%0d%%  typical %0d.%0d%% violating",
               periods[p], CRIT, CRIT / periods[p], ((CRIT * 100) / periods[p]) % 100,
               fails_rand[p] * 100 / N_VEC, (fails_rand[p] * 1000 / N_VEC) % 10,
               fails_typ[p] * 100 / N_VEC, (fails_typ[p] * 1000 / N_VEC) % 10);
    end
    expect_true("no violation at the longest-path period", fails_rand[0] == 0 && fails_typ[0] == 0);
    for (int p = 1; p < 5; p++)
      expect_true("violations grow as the period shrinks",
                  fails_rand[p] >= fails_rand[p-1] && fails_typ[p] >= fails_typ[p-1]);
    expect_true("violations below the longest path", fails_rand[2] > 0);
    expect_true("not every addition violates at 1.5x", fails_rand[2] < N_VEC);
    one_add('0, '0, CRIT, bad);   // start both long-chain checks from a zero sum
    one_add('1, 32'h1, CRIT + 1, bad);
    expect_true("full carry chain settles within the longest path", !bad);
    one_add('0, '0, CRIT, bad);
    one_add('1, 32'h1, (CRIT * 2) / 3, bad);
    expect_true("full carry chain violates at 1.5x clock", bad);
    one_add(32'h0000_0003, 32'h0000_0004, (CRIT * 2) / 3, bad);
    expect_true("short carry settles at 1.5x clock", !bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
