// ctv_pkg: types shared by the constructive timing-violation (CTV) ALU.
//
// The ALU operation encoding is this design's own choice: the scheme only
// speaks of "an ALU" (an integer ALU with a one-cycle latency in the evaluated
// processor) and lists no operations.
package ctv_pkg;

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,  // a + b
    ALU_SUB = 3'd1,  // a - b
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_XOR = 3'd4,
    ALU_SLT = 3'd5,  // signed a < b -> 1
    ALU_SLL = 3'd6,  // a << b[log2 W - 1:0]
    ALU_SRL = 3'd7   // a >> b[log2 W - 1:0]
  } alu_op_e;

endpackage
