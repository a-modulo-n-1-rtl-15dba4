// tb_divider_6p5_161 - checks the '161 based modulo 6+1/2 divider.
//
// The input stands for the 1 MHz clock: its 1 us period is 1000 time units
// here. It runs with high times of 500, 300 and 800 units. For each, the
// divider is reset and run for 20 output periods. A monitor checks that the
// output periods alternate between 6*TI + TH and 6*TI + (TI - TH), with 7
// counter clocks per period and a q3 toggle per period. The testbench checks
// that 26 output periods fill exactly 13*13 input periods (mean period 6.5 us,
// 153.846 kHz). It also checks that the counter's low three bits run
// 0,1,...,6 in every period.
module tb_divider_6p5_161;
  localparam int TI = 1000;

  logic fi = 0, rst_n = 0, arm = 0;
  int   th = TI / 2;
  int   checks = 0, failures = 0;
  logic fo, q3, clk_161;

  divider_6p5_161 dut (.fi(fi), .rst_n(rst_n), .fo(fo), .q3(q3), .clk_161(clk_161));

  int c, f, o, e, t;
  nhalf_period_checker #(.N(6)) chk (.fo(fo), .q(q3), .fi_star(clk_161), .arm(arm), .ti(TI), .th(th),
    .checks(c), .failures(f), .odd_periods(o), .even_periods(e), .q_toggles(t));

  initial forever begin
    fi = 1; #(th);
    fi = 0; #(TI - th);
  end

  // state sequence of the main divider (Q2..Q0) after each counter clock
  int seq_expect = 0;
  always @(posedge clk_161) if (arm) begin
    #1;
    checks++;
    if (int'(dut.q[2:0]) != seq_expect) begin
      failures++;
      $display("ERROR: Q2..Q0=%0d want %0d", dut.q[2:0], seq_expect);
    end
    seq_expect = (seq_expect == 6) ? 0 : seq_expect + 1;
  end

  int nf = 0;
  always @(negedge fo) nf++;

  task automatic run_k(input int high);
    int a;
    @(negedge fi);
    arm = 0; rst_n = 0; th = high; seq_expect = 1;
    #(TI / 3) rst_n = 1;
    arm = 1;
    #(20 * 7 * TI);
    a = nf;
    #(13 * 13 * TI);
    checks++;
    if (nf - a != 26) begin failures++; $display("ERROR: %0d output periods in 169 us, want 26", nf - a); end
    arm = 0;
  endtask

  initial begin
    #(TI / 4);
    run_k(500);
    run_k(300);
    run_k(800);
    checks   += c + 1;
    failures += f;
    if (o == 0 || e == 0 || t == 0) begin failures++; $display("ERROR: a period kind never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(3_000_000);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
