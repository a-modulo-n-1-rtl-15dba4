// tb_mod_nhalf_top - end-to-end test of the divider stage at its default size
// (N = 6): a 1 MHz input (period TI = 1000 time units standing for 1 us) divided
// by 6.5 into the 153.8 kHz baud-rate clock.
//
// For input high times of 500, 250, 750 and 100 units the design is reset
// and run for 60 output periods. Checks:
//   - the generic divider and the '161 divider give identical fo, q and
//     counter clock at every change (compared by a monitor);
//   - both follow the period rule of the monitor nhalf_period_checker:
//     periods N*TI + TH and N*TI + (TI - TH) alternate, N+1 counter clocks
//     per period, q toggles each period;
//   - the period deviation t_oE - t_oO equals |2*TH - TI|, so it is zero for
//     K = 1/2 and (2K - 1)/(N + 1/2) of the mean period otherwise;
//   - over 13*13 input periods there are exactly 26 output periods (mean
//     period 6.5 TI, 153.846 kHz) and 182 counter clocks (the main divider
//     is clocked at 14/13 of the input frequency, not at twice it).
// Each mechanism is counted and must happen at least once: edge switch by
// the EOR gate in each direction (q rising, q falling), period after q = 1,
// period after q = 0, equal periods (K = 1/2), unequal periods (K != 1/2).
module tb_mod_nhalf_top;
  localparam int TI = 1000;
  localparam int N  = 6;

  logic fi = 0, rst_n = 0, arm = 0;
  int   th = TI / 2;
  int   checks = 0, failures = 0;

  logic fo, q, fi_star, baud_clk, q3_161, clk_161;

  mod_nhalf_top dut (
    .fi(fi), .rst_n(rst_n), .fo(fo), .q(q), .fi_star(fi_star),
    .baud_clk(baud_clk), .q3_161(q3_161), .clk_161(clk_161)
  );

  int cg, fg, og, eg, tgl, c1, f1, o1, e1, t1;
  nhalf_period_checker #(.N(N)) chk_gen (.fo(fo), .q(q), .fi_star(fi_star), .arm(arm), .ti(TI), .th(th),
    .checks(cg), .failures(fg), .odd_periods(og), .even_periods(eg), .q_toggles(tgl));
  nhalf_period_checker #(.N(N)) chk_161 (.fo(baud_clk), .q(q3_161), .fi_star(clk_161), .arm(arm), .ti(TI), .th(th),
    .checks(c1), .failures(f1), .odd_periods(o1), .even_periods(e1), .q_toggles(t1));

  initial forever begin
    fi = 1; #(th);
    fi = 0; #(TI - th);
  end

  // the two implementations must agree at all times once reset has been seen
  always @(fo, q, fi_star, baud_clk, q3_161, clk_161) if (arm) begin
    #0;
    checks++;
    if (fo !== baud_clk || q !== q3_161 || fi_star !== clk_161) begin
      failures++;
      $display("ERROR at %0t: generic fo/q/clk=%0b%0b%0b, '161 %0b%0b%0b",
               $time, fo, q, fi_star, baud_clk, q3_161, clk_161);
    end
  end

  // period lengths of the baud clock, for the deviation check
  time last_fall;
  int  nper = 0;
  time pmin = 0, pmax = 0;
  int  n_q_rise = 0, n_q_fall = 0, n_equal = 0, n_unequal = 0;
  always @(negedge baud_clk) if (arm) begin
    if (nper > 0) begin
      time len;
      len = $time - last_fall;
      if (nper == 1 || len < pmin) pmin = len;
      if (nper == 1 || len > pmax) pmax = len;
    end
    last_fall = $time;
    nper++;
  end
  always @(posedge q) if (arm) n_q_rise++;
  always @(negedge q) if (arm) n_q_fall++;

  int nfo = 0, nclk = 0, nfi = 0;
  always @(negedge baud_clk) nfo++;
  always @(posedge fi_star) nclk++;
  always @(posedge fi) nfi++;

  task automatic run_k(input int high);
    int a_fo, a_clk, a_fi, dev_want;
    @(negedge fi);
    arm = 0; rst_n = 0; th = high; nper = 0;
    #(TI / 3) rst_n = 1;
    #1 arm = 1;
    #(60 * 7 * TI);
    a_fo = nfo; a_clk = nclk; a_fi = nfi;
    #(13 * 13 * TI);
    checks += 3;
    if (nfo - a_fo != 26)   begin failures++; $display("ERROR: %0d output periods in 169 input periods, want 26", nfo - a_fo); end
    if (nclk - a_clk != 182) begin failures++; $display("ERROR: %0d counter clocks in 169 input periods, want 182", nclk - a_clk); end
    if (nfi - a_fi != 169)   begin failures++; $display("ERROR: %0d input periods counted, want 169", nfi - a_fi); end
    // deviation between the two period kinds
    dev_want = (2 * high > TI) ? 2 * high - TI : TI - 2 * high;
    checks++;
    if (int'(pmax - pmin) != dev_want) begin
      failures++;
      $display("ERROR K=%0d/%0d: periods %0t..%0t, deviation want %0d", high, TI, pmin, pmax, dev_want);
    end
    if (dev_want == 0) n_equal++; else n_unequal++;
    $display("K=%0d/%0d: output periods %0t and %0t (mean %0d), deviation %0d/%0d of the mean",
             high, TI, pmin, pmax, (2 * N + 1) * TI / 2, int'(pmax - pmin), (2 * N + 1) * TI / 2);
    arm = 0;
  endtask

  task automatic seen(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("ERROR: mechanism never happened: %s", what); end
    else $display("mechanism %-28s %0d", what, n);
  endtask

  initial begin
    #(TI / 4);
    run_k(500);
    run_k(250);
    run_k(750);
    run_k(100);
    checks   += cg + c1;
    failures += fg + f1;
    seen("edge switch, q rising",   n_q_rise);
    seen("edge switch, q falling",  n_q_fall);
    seen("period after q = 1",      og);
    seen("period after q = 0",      eg);
    seen("equal periods, K = 1/2",  n_equal);
    seen("unequal periods, K!=1/2", n_unequal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(5_000_000);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
