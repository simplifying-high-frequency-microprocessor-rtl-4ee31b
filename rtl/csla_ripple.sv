// csla_ripple: N-bit ripple-carry adder, the building block of csla.
//
// A chain of full adders: carry i+1 = majority(a_i, b_i, carry i), sum
// bit i = a_i ^ b_i ^ carry i. Purely combinational.
module csla_ripple #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_fa
    assign sum[i]  = a[i] ^ b[i] ^ c[i];
    assign c[i+1]  = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end

  assign cout = c[N];

endmodule
