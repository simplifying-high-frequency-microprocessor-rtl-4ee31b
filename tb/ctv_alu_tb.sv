// ctv_alu_tb: self-checking test of the CTV integer ALU.
//
// Every operation is checked against a reference written directly with the
// SystemVerilog operators (signed compare, shifts, logic ops), on corner
// operands (zero, all ones, the most negative value, overflowing pairs) and
// random operands.
module ctv_alu_tb;
  import ctv_pkg::*;

  localparam int unsigned W = 32;

  alu_op_e      op;
  logic [W-1:0] a, b, y;
  int           checks = 0, failures = 0;

  ctv_alu #(.WIDTH(W)) dut (.op, .a, .b, .y);

  function automatic logic [W-1:0] ref_alu(alu_op_e o, logic [W-1:0] x, logic [W-1:0] z);
    case (o)
      ALU_ADD: return x + z;
      ALU_SUB: return x - z;
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_XOR: return x ^ z;
      ALU_SLT: return ($signed(x) < $signed(z)) ? W'(1) : W'(0);
      ALU_SLL: return x << z[4:0];
      ALU_SRL: return x >> z[4:0];
      default: return '0;
    endcase
  endfunction

  task automatic check(input alu_op_e o, input logic [W-1:0] x, input logic [W-1:0] z);
    logic [W-1:0] e;
    op = o; a = x; b = z;
    #1;
    e = ref_alu(o, x, z);
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h got %h exp %h", o.name(), x, z, y, e);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] corner [6] = '{32'h0, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1, 32'h0000_001F};

  initial begin
    for (int o = 0; o < 8; o++)
      foreach (corner[i])
        foreach (corner[j])
          check(alu_op_e'(o), corner[i], corner[j]);
    for (int n = 0; n < 20000; n++)
      check(alu_op_e'($urandom_range(7)), $urandom, ($urandom_range(3) == 0) ? W'($urandom_range(40)) : $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
