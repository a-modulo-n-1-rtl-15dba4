// nhalf_period_checker - testbench monitor for a modulo N+1/2 divider.
//
// It watches the divided output fo, the divide-by-2 output q and the main
// divider's clock fi_star. Each output period runs from one falling edge of fo
// to the next. The monitor checks it against values worked out from the input
// waveform alone (period ti, high time th):
//   - a period that starts with q going to 1 lasts N*ti + th;
//   - a period that starts with q going to 0 lasts N*ti + (ti - th);
//   - each period holds exactly N+1 rising edges of fi_star;
//   - q toggles at the start of every period.
// The first period after arm goes high is only used as a starting point.
// Counters are outputs so that the testbench can add them to its totals.
module nhalf_period_checker #(
  parameter int unsigned N = 6
) (
  input  logic fo,
  input  logic q,
  input  logic fi_star,
  input  logic arm,
  input  int   ti,
  input  int   th,
  output int   checks,
  output int   failures,
  output int   odd_periods,
  output int   even_periods,
  output int   q_toggles
);
  time     last_start;
  bit      started;
  logic    last_q;
  int      edges;

  initial begin
    checks = 0; failures = 0; odd_periods = 0; even_periods = 0; q_toggles = 0;
    started = 0; edges = 0; last_q = 0; last_start = 0;
  end

  always @(negedge arm) started = 0;

  always @(posedge fi_star) if (arm) edges++;

  always @(negedge fo) begin
    if (arm) begin
      #1;
      if (started) begin
        time     len, want;
        len  = $time - 1 - last_start;
        want = last_q ? time'(int'(N) * ti + th) : time'(int'(N) * ti + (ti - th));
        checks++;
        if (len != want) begin
          failures++;
          $display("ERROR N=%0d: period after q=%0d lasted %0t, want %0t", N, last_q, len, want);
        end
        checks++;
        if (edges != N + 1) begin
          failures++;
          $display("ERROR N=%0d: %0d fi_star rising edges in one period, want %0d", N, edges, N + 1);
        end
        checks++;
        if (q == last_q) begin
          failures++;
          $display("ERROR N=%0d: q did not toggle at the start of a period", N);
        end else q_toggles++;
        if (last_q) odd_periods++; else even_periods++;
      end
      started    = 1;
      last_start = $time - 1;
      last_q     = q;
      edges      = 0;
    end
  end
endmodule
