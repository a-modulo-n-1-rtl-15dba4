// counter_161 - 4-bit synchronous binary counter with the function of the
// 74x161 TTL/CMOS part, used by the modulo 6+1/2 example divider.
//
// On each rising edge of cp: if pe_n is low, q is loaded from d; otherwise, if
// both cep and cet are high, q counts up by one (15 wraps to 0). mr_n low
// clears q at once (asynchronous master reset). tc (terminal count) is high
// when q is 15 and cet is high. This is the standard function of the part;
// the divider only names the part and its pins.
//
// Interface: cp, mr_n, cep, cet, pe_n, d[3:0] (d[0] = D0), q[3:0] (q[0] = Q0),
// tc. Timing: q changes on the rising edge of cp, or at once on mr_n low.
module counter_161 (
  input  logic       cp,
  input  logic       mr_n,
  input  logic       cep,
  input  logic       cet,
  input  logic       pe_n,
  input  logic [3:0] d,
  output logic [3:0] q,
  output logic       tc
);
  always_ff @(posedge cp or negedge mr_n) begin
    if (!mr_n)            q <= 4'd0;
    else if (!pe_n)       q <= d;
    else if (cep && cet)  q <= q + 4'd1;
  end

  assign tc = cet && (q == 4'hF);
endmodule
