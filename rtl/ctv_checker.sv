// ctv_checker: one checker part of the CTV ALU.
//
// A copy of the main ALU whose operand and result registers are clocked at
// f_L (or, for the second checker, at the complement of f_L), the frequency
// the critical path allows, so it never violates timing. Together with a
// register that holds the main ALU's result for the same operation and an
// equality comparator, it verifies the main part:
//   * on an edge of its clock (en), if the main operand registers hold an
//     operation no checker has taken (op_pending), the checker takes it
//     (claim) into its own operand registers;
//   * the first main result strobe after that is this operation's main
//     result and is held;
//   * on its next clock edge, one f_L period after the start, the checker
//     ALU's result is registered together with the held main result, and the
//     comparator raises `detect` when they differ. `result` is then the
//     correct value, which the recovery uses.
// Taking the operation from the main operand registers rather than directly
// from the operand bus is this design's choice: in one synchronous domain it
// lets an operation issued between checker edges wait for the next one.
//
// Timing: done is a one-tick strobe on the tick after the verifying edge;
// tag, result and detect are valid with it and hold until the next one.
module ctv_checker
  import ctv_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  // main operand registers
  input  logic             op_pending,
  input  alu_op_e          op_op,
  input  logic [WIDTH-1:0] op_a,
  input  logic [WIDTH-1:0] op_b,
  input  logic [TAG_W-1:0] op_tag,
  output logic             claim,
  // main result register
  input  logic             main_strobe,
  input  logic [TAG_W-1:0] main_tag,
  input  logic [WIDTH-1:0] main_value,
  // verification
  output logic             done,
  output logic [TAG_W-1:0] tag,
  output logic             detect,
  output logic [WIDTH-1:0] result
);

  // checker operand registers
  logic             busy;
  alu_op_e          c_op;
  logic [WIDTH-1:0] c_a, c_b;
  logic [TAG_W-1:0] c_tag;
  // register holding the main result of the operation being checked
  logic             have_main;
  logic [WIDTH-1:0] main_hold;
  // verification registers
  logic [WIDTH-1:0] v_main;
  logic [WIDTH-1:0] alu_y;
  logic [WIDTH-1:0] main_now;

  ctv_alu #(.WIDTH(WIDTH)) u_alu (.op(c_op), .a(c_a), .b(c_b), .y(alu_y));

  assign claim = en && op_pending;

  // main result of this operation, including one arriving on this very tick
  assign main_now = have_main ? main_hold : main_value;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      c_op      <= ALU_ADD;
      c_a       <= '0;
      c_b       <= '0;
      c_tag     <= '0;
      have_main <= 1'b0;
      main_hold <= '0;
      done      <= 1'b0;
      tag       <= '0;
      result    <= '0;
      v_main    <= '0;
    end else begin
      done <= en && busy;
      if (en) begin
        // verify the operation started one clock period ago
        if (busy) begin
          result <= alu_y;
          v_main <= main_now;
          tag    <= c_tag;
        end
        // start the next one
        busy      <= op_pending;
        have_main <= 1'b0;
        if (op_pending) begin
          c_op  <= op_op;
          c_a   <= op_a;
          c_b   <= op_b;
          c_tag <= op_tag;
        end
      end else if (busy && !have_main && main_strobe) begin
        have_main <= 1'b1;
        main_hold <= main_value;
      end
    end
  end

  // the "=?" comparator
  assign detect = done && (result != v_main);

  // the main result must be there when the checker finishes
  a_main_in_time : assert property (@(posedge clk) disable iff (!rst_n)
    en && busy |-> have_main || main_strobe)
    else $error("ctv_checker: main result missing at verification");

  a_main_tag : assert property (@(posedge clk) disable iff (!rst_n)
    busy && !have_main && main_strobe && !en |-> main_tag == c_tag)
    else $error("ctv_checker: main result belongs to another operation");

endmodule
