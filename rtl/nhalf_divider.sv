// nhalf_divider - modulo N+1/2 frequency divider: fo = fi / (N + 1/2).
//
// Instead of doubling the input frequency and dividing by 2N+1, this divider
// counts at about the input frequency. A divide-by-(N+1) counter (main_divider)
// is clocked by fi_star = fi xor Q. Q is the output of a divide-by-2 stage
// (toggle_divider) that toggles once per output period. While Q = 0 the
// counter counts rising edges of fi, while Q = 1 falling edges. Each toggle
// of Q therefore takes the next counted edge half an input period earlier.
// N+1 counted edges then span N+1/2 input periods on average. With an input
// high time K*ti, the output periods alternate between (N+K)*ti (the period
// that starts when Q becomes 1) and (N+1-K)*ti (the one that starts when
// Q becomes 0). Their mean is (N+1/2)*ti, and they are equal only for K = 1/2.
//
// Interface: fi (input frequency, also the only clock), rst_n (asynchronous,
// active low: count 0, Q 0), fo (divided output, falls at the start of each
// output period), q (divide-by-2 output, period 2N+1 input periods),
// fi_star (the main divider's clock, brought out for observation).
// The structure (EOR, divide by N+1, divide by 2, feedback of Q) follows the
// block diagram. The counter encoding, fo's duty and the reset are this
// design's choices. The divide-by-2 toggles on the main divider's clock when
// it wraps, not on fo.
//
// Timing: the extra pulse on fi_star that appears when Q changes has the width
// t_G + t_Q in hardware. That width must reach the counter's minimum clock
// pulse width, and the input high and low times must allow for it. In
// zero-delay RTL simulation the pulse has zero width.
module nhalf_divider #(
  parameter int unsigned N = 6
) (
  input  logic fi,
  input  logic rst_n,
  output logic fo,
  output logic q,
  output logic fi_star
);
  logic [$clog2(N+1)-1:0] count;
  logic                   wrap;

  edge_select_xor u_xor (
    .fi      (fi),
    .sel     (q),
    .fi_star (fi_star)
  );

  main_divider #(.N(N)) u_main (
    .clk   (fi_star),
    .rst_n (rst_n),
    .count (count),
    .wrap  (wrap),
    .fo    (fo)
  );

  toggle_divider u_div2 (
    .clk   (fi_star),
    .rst_n (rst_n),
    .en    (wrap),
    .q     (q)
  );
endmodule
