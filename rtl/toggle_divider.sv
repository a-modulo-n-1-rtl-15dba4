// toggle_divider - the additional divide-by-2 stage of the modulo N+1/2
// divider.
//
// Output q toggles once per output period of the main divider. In the block
// diagram this stage is driven by fo and toggles where fo falls, i.e. where
// the main divider returns to state 0. Here it is a toggle flip-flop on the
// main divider's own clock, enabled by the main divider's wrap signal. It
// therefore toggles on exactly the same clock edge, without a second clock
// domain. This is also how the '161 example does it: its fourth flip-flop
// is inverted each time the counter loads. q drives the edge-select EOR gate.
//
// Interface: clk (= fi_star), rst_n (asynchronous, active low, q = 0),
// en (toggle on the next rising clk edge), q.
module toggle_divider (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (en) q <= ~q;
  end
endmodule
