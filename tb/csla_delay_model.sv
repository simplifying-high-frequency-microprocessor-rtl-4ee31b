// csla_delay_model: behavioural model of the carry select adder with gate
// delays, for timing-error experiments only (not synthesizable).
//
// Same structure as rtl/csla.sv (uniform blocks of ripple-carry adders, the
// upper blocks duplicated for carry-in 0 and 1 and selected by the carry from
// below), but every gate output changes D_GATE time units after its inputs.
// A full-adder carry and a sum bit each take one gate delay, a select
// multiplexer one gate delay. With 32 bits in 4-bit blocks the longest path,
// the carry rippling through the lowest block and then through the seven
// carry multiplexers, settles after (4 + 7) gate delays; an addition
// whose carries do not travel that far settles sooner. Sampling the output
// with a clock faster than the longest path therefore gives a wrong sum only
// for some operand pairs: the timing violations a CTV checker has to catch.
// The unit delay per gate is a modelling choice of this testbench.
module csla_delay_model #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned BLOCK  = 4,
  parameter int unsigned D_GATE = 10
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NBLK = WIDTH / BLOCK;

  logic [NBLK:0] c;
  assign c[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    // two ripple chains: index 0 assumes carry-in 0, index 1 carry-in 1
    logic [BLOCK:0]   rc0, rc1;
    logic [BLOCK-1:0] s0, s1;
    logic [BLOCK-1:0] ab_x, ab_g;

    assign ab_x = a[k*BLOCK +: BLOCK] ^ b[k*BLOCK +: BLOCK];
    assign ab_g = a[k*BLOCK +: BLOCK] & b[k*BLOCK +: BLOCK];

    if (k == 0) begin : g_first
      assign rc1[0] = cin;
      assign rc0[0] = 1'b0;
    end else begin : g_sel
      assign rc0[0] = 1'b0;
      assign rc1[0] = 1'b1;
    end

    for (genvar i = 0; i < BLOCK; i++) begin : g_fa
      assign #(D_GATE) rc0[i+1] = ab_g[i] | (rc0[i] & ab_x[i]);
      assign #(D_GATE) rc1[i+1] = ab_g[i] | (rc1[i] & ab_x[i]);
      assign #(D_GATE) s0[i]    = ab_x[i] ^ rc0[i];
      assign #(D_GATE) s1[i]    = ab_x[i] ^ rc1[i];
    end

    if (k == 0) begin : g_out0
      assign sum[BLOCK-1:0] = s1;
      assign c[1]           = rc1[BLOCK];
    end else begin : g_outk
      assign #(D_GATE) sum[k*BLOCK +: BLOCK] = c[k] ? s1 : s0;
      assign #(D_GATE) c[k+1]                = c[k] ? rc1[BLOCK] : rc0[BLOCK];
    end
  end

  assign cout = c[NBLK];

endmodule
