// main_divider - the divide-by-(N+1) counter of the modulo N+1/2 divider.
//
// A binary counter, clocked by fi_star, runs through the states 0, 1, ..., N
// and then back to 0, so it divides its clock by N+1. The output fo is low in
// the lower states and high from state FO_HIGH = ceil((N+1)/2) upwards. So fo
// falls when the counter returns to 0, as in the timing diagram of the
// divider. For N = 6, fo is bit 2 of the count, like output Q2 of the '161
// example. The position of fo's rising edge inside the period, and the
// asynchronous active-low reset, are this design's choices.
//
// wrap is high in the last state (count >= N). It tells the divide-by-2 stage
// that the next clock edge ends the output period. A count above N can only
// come from a missing reset; it also counts as the last state, so the
// counter cannot get stuck outside its cycle.
//
// Interface: clk (= fi_star), rst_n (asynchronous, active low, clears the
// count), count, wrap, fo. Timing: count and fo change on the rising edge of
// clk; wrap is combinational from count.
module main_divider #(
  parameter int unsigned N = 6
) (
  input  logic                   clk,
  input  logic                   rst_n,
  output logic [$clog2(N+1)-1:0] count,
  output logic                   wrap,
  output logic                   fo
);
  localparam int unsigned W       = $clog2(N + 1);
  localparam int unsigned FO_HIGH = (N + 2) / 2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    count <= '0;
    else if (wrap) count <= '0;
    else           count <= count + W'(1);
  end

  assign wrap = (count >= W'(N));
  assign fo   = (count >= W'(FO_HIGH));

  initial begin
    assert (N >= 1) else $error("main_divider: N must be at least 1");
  end
endmodule
