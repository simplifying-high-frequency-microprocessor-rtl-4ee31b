// ctv_alu: the integer ALU that the CTV unit instantiates three times.
//
// The main part and the two checker parts are identical copies of this
// combinational block; only the clocks that sample its inputs and outputs
// differ. Addition, subtraction and the signed less-than compare all go
// through one carry select adder (csla): subtraction adds the inverted b with
// a carry-in of 1, and less-than is the sign of a - b corrected for overflow.
// The logic and shift operations bypass the adder.
//
// Interface: combinational, y = f(op, a, b). The operation set and encoding
// (ctv_pkg::alu_op_e) are this design's own; the scheme speaks only of "an ALU".
module ctv_alu
  import ctv_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  alu_op_e          op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);

  localparam int unsigned SH_W = $clog2(WIDTH);

  logic             sub;
  logic [WIDTH-1:0] b_add;
  logic [WIDTH-1:0] sum;
  logic             cout;
  logic             ovf;
  logic             lt;
  logic [SH_W-1:0]  shamt;

  assign sub   = (op == ALU_SUB) || (op == ALU_SLT);
  assign b_add = sub ? ~b : b;
  assign shamt = b[SH_W-1:0];

  csla #(.WIDTH(WIDTH)) u_add (
    .a(a), .b(b_add), .cin(sub), .sum(sum), .cout(cout));

  // signed overflow of a - b: operands of different sign, result sign differs from a
  assign ovf = (a[WIDTH-1] ^ b[WIDTH-1]) & (a[WIDTH-1] ^ sum[WIDTH-1]);
  assign lt  = sum[WIDTH-1] ^ ovf;

  always_comb begin
    unique case (op)
      ALU_ADD, ALU_SUB: y = sum;
      ALU_AND:          y = a & b;
      ALU_OR:           y = a | b;
      ALU_XOR:          y = a ^ b;
      ALU_SLT:          y = {{(WIDTH-1){1'b0}}, lt};
      ALU_SLL:          y = a << shamt;
      ALU_SRL:          y = a >> shamt;
      default:          y = '0;
    endcase
  end

  // carry out is not needed by any operation here
  logic unused_cout;
  assign unused_cout = cout;

endmodule
