// ctv_clock_gen: the three clocks of the CTV ALU as clock enables.
//
// The main ALU runs at f_H, above the frequency f_L that its critical path
// allows; the two checker ALUs run at f_L and at its complement, so that
// between them they start an operation on every edge of f_L (rising edge for
// one checker, falling edge for the other). The three clocks are generated
// here as one-tick strobes of a single base clock `clk`, which keeps the
// whole unit in one synchronous clock domain:
//   f_H has a period of H_DIV base ticks,
//   f_L has a period of L_DIV base ticks (L_DIV even),
//   f_L-bar rises L_DIV/2 ticks after f_L.
// The defaults 4 and 6 give f_H = 1.5 * f_L, the boost evaluated for this
// scheme. Legal settings satisfy f_L <= f_H <= 2 * f_L, i.e.
// H_DIV <= L_DIV <= 2 * H_DIV: at 2 * f_L the checkers would no longer keep up
// with a one-operation-per-f_H-cycle stream if f_H grew further.
// Realising the clocks as enables of a base clock is this design's choice;
// the original scheme draws three separate clock nets.
//
// Timing: all strobes rise together on the first tick after reset, which is
// the "start #1" alignment drawn for the scheme. f_h/f_l give the clock
// levels (high during the first half period) for observation.
module ctv_clock_gen #(
  parameter int unsigned H_DIV = 4,
  parameter int unsigned L_DIV = 6
) (
  input  logic clk,
  input  logic rst_n,
  output logic en_h,
  output logic en_l,
  output logic en_lb,
  output logic f_h,
  output logic f_l
);

  localparam int unsigned PERIOD = H_DIV * L_DIV;
  localparam int unsigned CNT_W  = $clog2(PERIOD + 1);

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n)                         cnt <= '0;
    else if (cnt == CNT_W'(PERIOD - 1)) cnt <= '0;
    else                                cnt <= cnt + 1'b1;
  end

  logic [CNT_W-1:0] ph_h, ph_l;
  assign ph_h = CNT_W'(cnt % CNT_W'(H_DIV));
  assign ph_l = CNT_W'(cnt % CNT_W'(L_DIV));

  assign en_h  = (ph_h == '0);
  assign en_l  = (ph_l == '0);
  assign en_lb = (ph_l == CNT_W'(L_DIV / 2));
  assign f_h   = (ph_h < CNT_W'((H_DIV + 1) / 2));
  assign f_l   = (ph_l < CNT_W'(L_DIV / 2));

  initial begin
    assert (L_DIV % 2 == 0)
      else $error("ctv_clock_gen: L_DIV must be even");
    assert (H_DIV <= L_DIV && L_DIV <= 2 * H_DIV)
      else $error("ctv_clock_gen: need f_L <= f_H <= 2*f_L");
  end

endmodule
