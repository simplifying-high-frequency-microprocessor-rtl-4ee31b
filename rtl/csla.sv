// csla: carry select adder.
//
// The word is cut into blocks of BLOCK bits. The lowest block is a plain
// ripple-carry adder fed by cin. Every other block holds two ripple-carry
// adders, one assuming a carry-in of 0 and one assuming 1; both run in
// parallel, and the carry leaving the block below selects one sum and one
// carry-out. The critical path is therefore one block ripple plus one
// multiplexer per block, and the actual settling time of an addition depends
// on how far carries really propagate: the property that lets a clock faster
// than the critical path still give correct sums most of the time.
//
// Interface: purely combinational, sum/cout = a + b + cin.
// The adder type follows the case study this unit is built for; its width and
// block size are this design's own, not given with the original scheme
// (32-bit word, 4-bit uniform blocks). WIDTH must be a multiple of BLOCK.
module csla #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned BLOCK = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NBLK = WIDTH / BLOCK;

  // carry into each block; c[NBLK] is the carry out of the word
  logic [NBLK:0] c;

  assign c[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    if (k == 0) begin : g_first
      // lowest block: ripple directly from cin, no selection needed
      csla_ripple #(.N(BLOCK)) u_rc (
        .a(a[BLOCK-1:0]), .b(b[BLOCK-1:0]), .cin(cin),
        .sum(sum[BLOCK-1:0]), .cout(c[1]));
    end else begin : g_sel
      logic [BLOCK-1:0] s0, s1;
      logic             co0, co1;

      csla_ripple #(.N(BLOCK)) u_r0 (
        .a(a[k*BLOCK +: BLOCK]), .b(b[k*BLOCK +: BLOCK]), .cin(1'b0),
        .sum(s0), .cout(co0));
      csla_ripple #(.N(BLOCK)) u_r1 (
        .a(a[k*BLOCK +: BLOCK]), .b(b[k*BLOCK +: BLOCK]), .cin(1'b1),
        .sum(s1), .cout(co1));

      // the carry from the block below selects the precomputed result
      assign sum[k*BLOCK +: BLOCK] = c[k] ? s1 : s0;
      assign c[k+1]                = c[k] ? co1 : co0;
    end
  end

  assign cout = c[NBLK];

  initial begin
    assert (WIDTH % BLOCK == 0) else $error("csla: WIDTH must be a multiple of BLOCK");
  end

endmodule
