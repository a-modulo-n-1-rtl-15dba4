// divider_6p5_161 - modulo 6+1/2 divider built from one '161 counter and
// three gates: 1 MHz in, 1 MHz / 6.5 = 153.8 kHz out.
//
// This is the generic modulo N+1/2 divider for N = 6, written as the gate
// netlist of a small board. The three low flip-flops of the counter (Q2..Q0)
// are the divide-by-7 main divider. NAND G2 detects state 6 (Q1 and Q2 high)
// and pulls the parallel-load input low, so the next clock loads 0 into
// Q2..Q0. The fourth flip-flop Q3, with inverter G3 feeding its load input D3,
// is the divide-by-2: each load inverts it. EOR G1 forms the counter clock
// from the 1 MHz input and Q3. The output is Q2 (states 4 to 6 high), which
// runs at 153.8 kHz on average. Q3 runs at half that.
// Count enables CEP and CET are tied high and D2..D0 are tied low, as drawn.
// Using the master reset MR as an asynchronous reset input is this design's
// choice. TC is not used.
//
// Interface: fi (1 MHz input), rst_n (drives MR), fo (Q2, 153.8 kHz),
// q3 (divide-by-2 output), clk_161 (counter clock, for observation).
// Timing: zero-delay. In hardware the extra clock pulse after each load
// lasts t_G + t_Q ('86 plus '161 delay). It must be at least the '161's minimum
// clock pulse width.
module divider_6p5_161 (
  input  logic fi,
  input  logic rst_n,
  output logic fo,
  output logic q3,
  output logic clk_161
);
  logic [3:0] q;
  logic       pe_n;
  logic       g3_out;

  assign clk_161 = fi ^ q[3];          // G1, '86
  assign pe_n    = ~(q[1] & q[2]);     // G2, '00: detector of state 6
  assign g3_out  = ~q[3];              // G3, '04

  counter_161 u_161 (
    .cp   (clk_161),
    .mr_n (rst_n),
    .cep  (1'b1),
    .cet  (1'b1),
    .pe_n (pe_n),
    .d    ({g3_out, 3'b000}),
    .q    (q),
    .tc   ()
  );

  assign fo = q[2];
  assign q3 = q[3];
endmodule
