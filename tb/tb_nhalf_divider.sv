// tb_nhalf_divider - self-checking testbench for nhalf_divider.
//
// Three instances (N = 6, the default; N = 1, the smallest; N = 3) share one
// input clock fi of period TI = 1000 time units. The input high time is
// stepped through K = 1/2, 1/4, 3/4 and 1/10. For each setting the dividers
// are reset and run for 12 output periods. A monitor per instance checks every
// period length against N*TI + TH or N*TI + (TI - TH), alternating with q. It
// also checks N+1 main-divider clock edges per period and a q toggle per
// period. The testbench then checks that each pair of periods has the mean
// length (N + 1/2)*TI. For K = 1/2 it also checks that all periods are equal.
module tb_nhalf_divider;
  localparam int TI = 1000;

  logic fi = 0;
  logic rst_n = 0;
  logic arm = 0;
  int   th = TI / 2;
  int   checks = 0, failures = 0;

  logic fo6, q6, fs6, fo1, q1, fs1, fo3, q3, fs3;

  nhalf_divider          dut6 (.fi(fi), .rst_n(rst_n), .fo(fo6), .q(q6), .fi_star(fs6));
  nhalf_divider #(.N(1)) dut1 (.fi(fi), .rst_n(rst_n), .fo(fo1), .q(q1), .fi_star(fs1));
  nhalf_divider #(.N(3)) dut3 (.fi(fi), .rst_n(rst_n), .fo(fo3), .q(q3), .fi_star(fs3));

  int c6, f6, o6, e6, t6, c1, f1, o1, e1, t1, c3, f3, o3, e3, t3;
  nhalf_period_checker #(.N(6)) chk6 (.fo(fo6), .q(q6), .fi_star(fs6), .arm(arm), .ti(TI), .th(th),
    .checks(c6), .failures(f6), .odd_periods(o6), .even_periods(e6), .q_toggles(t6));
  nhalf_period_checker #(.N(1)) chk1 (.fo(fo1), .q(q1), .fi_star(fs1), .arm(arm), .ti(TI), .th(th),
    .checks(c1), .failures(f1), .odd_periods(o1), .even_periods(e1), .q_toggles(t1));
  nhalf_period_checker #(.N(3)) chk3 (.fo(fo3), .q(q3), .fi_star(fs3), .arm(arm), .ti(TI), .th(th),
    .checks(c3), .failures(f3), .odd_periods(o3), .even_periods(e3), .q_toggles(t3));

  // input clock: rising edge at multiples of TI, high for th
  initial forever begin
    fi = 1; #(th);
    fi = 0; #(TI - th);
  end

  // mean period over whole pairs: a window of 3*(2N+1) input periods must
  // hold exactly 6 output periods, i.e. the mean period is (N + 1/2)*TI
  int nf6 = 0, nf1 = 0, nf3 = 0;
  always @(negedge fo6) nf6++;
  always @(negedge fo1) nf1++;
  always @(negedge fo3) nf3++;

  task automatic check_mean(input int n, input int falls);
    checks++;
    if (falls != 6) begin
      failures++;
      $display("ERROR N=%0d: %0d output periods in %0d input periods, want 6",
               n, falls, 3 * (2 * n + 1));
    end
  endtask

  task automatic run_k(input int high);
    @(negedge fi);
    arm = 0; rst_n = 0; th = high;
    #(TI / 3) rst_n = 1;
    arm = 1;
    #(12 * 7 * TI);
    // 3 windows of two output periods each: 6 periods in 3*(2N+1) input periods
    fork
      begin int a = nf6; #(3 * 13 * TI); check_mean(6, nf6 - a); end
      begin int a = nf1; #(3 * 3 * TI);  check_mean(1, nf1 - a); end
      begin int a = nf3; #(3 * 7 * TI);  check_mean(3, nf3 - a); end
    join
    arm = 0;
  endtask

  initial begin
    #(TI / 4);
    run_k(TI / 2);
    run_k(TI / 4);
    run_k(3 * TI / 4);
    run_k(TI / 10);
    checks   += c6 + c1 + c3;
    failures += f6 + f1 + f3;
    // every instance must have seen both kinds of period and q toggling
    checks += 3;
    if (o6 == 0 || e6 == 0 || t6 == 0) begin failures++; $display("ERROR N=6: a period kind never seen"); end
    if (o1 == 0 || e1 == 0 || t1 == 0) begin failures++; $display("ERROR N=1: a period kind never seen"); end
    if (o3 == 0 || e3 == 0 || t3 == 0) begin failures++; $display("ERROR N=3: a period kind never seen"); end
    $display("N=6: %0d periods after q=1, %0d after q=0, %0d q toggles", o6, e6, t6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2_000_000);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
