// edge_select_xor - the exclusive-OR gate at the input of the modulo N+1/2
// divider.
//
// It forms the main divider's clock as fi_star = fi ^ sel. When sel (the
// divide-by-2 output Q) is 0 the main divider counts rising edges of fi; when
// sel is 1 it counts falling edges of fi. So every time Q toggles, the
// counted edge moves by half an input period. That is the whole trick of the
// divider: one edge is gained per output period.
//
// Interface: fi is the input frequency, sel the edge-select input, fi_star
// the clock for the main divider. Purely combinational. The gate delay t_G
// is not modelled: in zero-delay simulation the extra pulse that appears on
// fi_star when sel changes has zero width, and the counted edge is the one
// that starts it.
module edge_select_xor (
  input  logic fi,
  input  logic sel,
  output logic fi_star
);
  assign fi_star = fi ^ sel;
endmodule
