// mod_nhalf_top - frequency divider stage of a baud-rate clock source: two
// modulo N+1/2 dividers on the same input clock.
//
// The input fi is the stable base frequency (1 MHz in the application), and
// the divided clock goes to a baud rate generator (9600 x 16 = 153.6 kHz
// wanted, 1 MHz / 6.5 = 153.8 kHz delivered). Two implementations of the same
// divider sit side by side:
//   u_generic : nhalf_divider, the parameterised block (EOR gate,
//               divide-by-(N+1) counter, divide-by-2), default N = 6;
//   u_161     : divider_6p5_161, the fixed N = 6 gate netlist around a '161
//               counter.
// With N = 6 and the same reset, both produce the same waveforms.
//
// Interface: fi (input clock), rst_n (asynchronous, active low), fo / q /
// fi_star of the generic divider, and baud_clk / q3_161 / clk_161 of the
// '161 divider; baud_clk is the 153.8 kHz clock for the baud rate generator.
module mod_nhalf_top #(
  parameter int unsigned N = 6
) (
  input  logic fi,
  input  logic rst_n,
  output logic fo,
  output logic q,
  output logic fi_star,
  output logic baud_clk,
  output logic q3_161,
  output logic clk_161
);
  nhalf_divider #(.N(N)) u_generic (
    .fi      (fi),
    .rst_n   (rst_n),
    .fo      (fo),
    .q       (q),
    .fi_star (fi_star)
  );

  divider_6p5_161 u_161 (
    .fi      (fi),
    .rst_n   (rst_n),
    .fo      (baud_clk),
    .q3      (q3_161),
    .clk_161 (clk_161)
  );
endmodule
