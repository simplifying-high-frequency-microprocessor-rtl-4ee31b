// ctv_main_alu: the main part of the CTV ALU.
//
// Operand registers and a result register around one ctv_alu, all clocked at
// f_H (the en_h strobe). Because f_H is above the frequency the critical path
// allows, the result register may capture a value that has not settled: a
// timing violation. The main part is what gives the unit its latency: an
// operation captured at one f_H edge has its (speculative) result in the
// result register after the next f_H edge.
//
// The operand registers are also the source from which the checker parts take
// each operation: `op_pending` marks an operation that no checker has taken
// yet, and a checker's `claim` clears it. An operation must be claimed before
// the next f_H edge replaces it; with f_H <= 2*f_L this always happens.
//
// In RTL the ALU always settles, so a violation cannot arise by itself.
// `in_fault` is an evaluation input: its bits are flipped into the result
// register, which is how the scheme was evaluated (violations made to occur
// at a chosen rate). Tie it to zero in normal use.
//
// Timing: in_* sampled on a tick with en_h; res_strobe is high for one tick,
// the tick after the next en_h, with res_value/res_tag valid from then until
// the following f_H edge.
module ctv_main_alu
  import ctv_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en_h,
  // operation offered at an f_H edge
  input  logic             in_valid,
  input  alu_op_e          in_op,
  input  logic [WIDTH-1:0] in_a,
  input  logic [WIDTH-1:0] in_b,
  input  logic [TAG_W-1:0] in_tag,
  input  logic [WIDTH-1:0] in_fault,
  // operand registers, read by the checkers
  output logic             op_pending,
  output alu_op_e          op_op,
  output logic [WIDTH-1:0] op_a,
  output logic [WIDTH-1:0] op_b,
  output logic [TAG_W-1:0] op_tag,
  input  logic             claim,
  // result register
  output logic             res_strobe,
  output logic [TAG_W-1:0] res_tag,
  output logic [WIDTH-1:0] res_value
);

  logic             op_valid;
  logic [WIDTH-1:0] op_fault;
  logic [WIDTH-1:0] alu_y;

  ctv_alu #(.WIDTH(WIDTH)) u_alu (.op(op_op), .a(op_a), .b(op_b), .y(alu_y));

  // operand registers (f_H)
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      op_valid   <= 1'b0;
      op_pending <= 1'b0;
      op_op      <= ALU_ADD;
      op_a       <= '0;
      op_b       <= '0;
      op_tag     <= '0;
      op_fault   <= '0;
    end else if (en_h) begin
      op_valid   <= in_valid;
      op_pending <= in_valid;
      if (in_valid) begin
        op_op    <= in_op;
        op_a     <= in_a;
        op_b     <= in_b;
        op_tag   <= in_tag;
        op_fault <= in_fault;
      end
    end else if (claim) begin
      op_pending <= 1'b0;
    end
  end

  // result register (f_H)
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      res_strobe <= 1'b0;
      res_tag    <= '0;
      res_value  <= '0;
    end else begin
      res_strobe <= en_h && op_valid;
      if (en_h && op_valid) begin
        res_tag   <= op_tag;
        res_value <= alu_y ^ op_fault;
      end
    end
  end

  // every operation must reach a checker before it is replaced
  a_no_unchecked_op : assert property (@(posedge clk) disable iff (!rst_n)
    en_h && op_pending |-> claim)
    else $error("ctv_main_alu: operation replaced before a checker took it");

endmodule
