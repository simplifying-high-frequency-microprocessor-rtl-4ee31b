// ctv_alu_unit: an ALU built for constructive timing violation (CTV).
//
// The unit is clocked faster than its critical path allows and tolerates the
// resulting timing violations instead of avoiding them. It holds three copies
// of the same ALU:
//   * the main ALU (ctv_main_alu) at f_H, above the safe frequency f_L. It
//     returns every result after one f_H cycle, speculatively: its result
//     register may have caught a value that had not settled;
//   * two checker ALUs (ctv_checker) at f_L and at f_L-bar, the complement of
//     f_L. Each needs a whole f_L period per operation, so they take
//     operations alternately and together keep up with the main ALU's
//     throughput. Each compares its own (always correct) result with the
//     main result for the same operation and raises `detect` on a mismatch.
// A detected violation is then handled like a mispredicted instruction: the
// instructions that depend on the tagged operation are re-issued with
// `correct_result`. That recovery belongs to the surrounding processor and is
// not part of this unit; its inputs (verify_tag, detect, correct_result) are
// ports here.
//
// Clocks: the three clocks are clock-enable strobes of one base clock `clk`
// (ctv_clock_gen): f_H every H_DIV ticks, f_L every L_DIV ticks. The defaults
// give f_H = 1.5 * f_L, the evaluated boost. WIDTH follows the 32-bit integer
// registers of the evaluated processor; TAG_W and the handshake are this
// design's own.
//
// Interface and timing:
//   issue_*      offered on any tick, accepted on a tick where issue_ready
//                (an f_H edge) is high; one operation per f_H cycle.
//   main_*       one-tick strobe on the tick after the next f_H edge.
//   verify_*     one-tick strobe on the tick after the verifying checker edge,
//                one f_L period after the checker started the operation;
//                detect and correct_result are valid with it.
//   fault_mask   evaluation input, XORed into the main result of the
//                operation it is issued with, to emulate a violation.
module ctv_alu_unit
  import ctv_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned TAG_W = 8,
  parameter int unsigned H_DIV = 4,
  parameter int unsigned L_DIV = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  // issue
  output logic             issue_ready,
  input  logic             issue_valid,
  input  alu_op_e          issue_op,
  input  logic [WIDTH-1:0] issue_a,
  input  logic [WIDTH-1:0] issue_b,
  input  logic [TAG_W-1:0] issue_tag,
  input  logic [WIDTH-1:0] fault_mask,
  // speculative, low-latency result
  output logic             main_valid,
  output logic [TAG_W-1:0] main_tag,
  output logic [WIDTH-1:0] main_result,
  // verification
  output logic             verify_valid,
  output logic [TAG_W-1:0] verify_tag,
  output logic             detect,
  output logic [WIDTH-1:0] correct_result,
  output logic             verify_checker
);

  logic en_h, en_l, en_lb, f_h, f_l;

  ctv_clock_gen #(.H_DIV(H_DIV), .L_DIV(L_DIV)) u_clk (
    .clk, .rst_n, .en_h, .en_l, .en_lb, .f_h, .f_l);

  logic             op_pending;
  alu_op_e          op_op;
  logic [WIDTH-1:0] op_a, op_b;
  logic [TAG_W-1:0] op_tag;
  logic             claim_l, claim_lb;

  assign issue_ready = en_h;

  ctv_main_alu #(.WIDTH(WIDTH), .TAG_W(TAG_W)) u_main (
    .clk, .rst_n, .en_h,
    .in_valid(issue_valid), .in_op(issue_op), .in_a(issue_a), .in_b(issue_b),
    .in_tag(issue_tag), .in_fault(fault_mask),
    .op_pending, .op_op, .op_a, .op_b, .op_tag,
    .claim(claim_l | claim_lb),
    .res_strobe(main_valid), .res_tag(main_tag), .res_value(main_result));

  logic             done_l, done_lb, det_l, det_lb;
  logic [TAG_W-1:0] tag_l, tag_lb;
  logic [WIDTH-1:0] res_l, res_lb;

  // checker clocked by f_L
  ctv_checker #(.WIDTH(WIDTH), .TAG_W(TAG_W)) u_chk_l (
    .clk, .rst_n, .en(en_l),
    .op_pending, .op_op, .op_a, .op_b, .op_tag, .claim(claim_l),
    .main_strobe(main_valid), .main_tag, .main_value(main_result),
    .done(done_l), .tag(tag_l), .detect(det_l), .result(res_l));

  // checker clocked by f_L-bar
  ctv_checker #(.WIDTH(WIDTH), .TAG_W(TAG_W)) u_chk_lb (
    .clk, .rst_n, .en(en_lb),
    .op_pending, .op_op, .op_a, .op_b, .op_tag, .claim(claim_lb),
    .main_strobe(main_valid), .main_tag, .main_value(main_result),
    .done(done_lb), .tag(tag_lb), .detect(det_lb), .result(res_lb));

  // the two checkers finish on different ticks (f_L and f_L-bar edges never coincide)
  assign verify_valid   = done_l | done_lb;
  assign verify_checker = done_lb;
  assign verify_tag     = done_lb ? tag_lb : tag_l;
  assign correct_result = done_lb ? res_lb : res_l;
  assign detect         = det_l | det_lb;

  a_one_checker : assert property (@(posedge clk) disable iff (!rst_n)
    !(done_l && done_lb))
    else $error("ctv_alu_unit: both checkers finished on one tick");

  // clock levels are for observation only
  logic unused_levels;
  assign unused_levels = f_h ^ f_l;

endmodule
