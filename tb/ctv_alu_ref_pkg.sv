// ctv_alu_ref_pkg: reference model of the ALU operations for the testbenches,
// written with the plain SystemVerilog operators, independent of the RTL.
package ctv_alu_ref_pkg;
  import ctv_pkg::*;

  function automatic logic [31:0] ref_alu32(alu_op_e o, logic [31:0] x, logic [31:0] z);
    case (o)
      ALU_ADD: return x + z;
      ALU_SUB: return x - z;
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_XOR: return x ^ z;
      ALU_SLT: return ($signed(x) < $signed(z)) ? 32'd1 : 32'd0;
      ALU_SLL: return x << z[4:0];
      ALU_SRL: return x >> z[4:0];
      default: return '0;
    endcase
  endfunction

endpackage
