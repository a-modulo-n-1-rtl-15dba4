// tb_counter_161 - checks the '161 counter function against a reference
// model kept in the testbench: asynchronous clear by mr_n, synchronous load
// by pe_n (over counting), count when cep and cet are both high, hold
// otherwise, and tc = cet and q == 15. Inputs are random, with each control
// biased so that every case happens often.
module tb_counter_161;
  logic       cp = 0, mr_n = 0, cep, cet, pe_n;
  logic [3:0] d, q;
  logic       tc;
  logic [3:0] want = 0;
  int         checks = 0, failures = 0;
  int         n_load = 0, n_count = 0, n_hold = 0, n_tc = 0;

  counter_161 dut (.cp(cp), .mr_n(mr_n), .cep(cep), .cet(cet), .pe_n(pe_n), .d(d), .q(q), .tc(tc));

  always #5 cp = ~cp;

  initial begin
    cep = 1; cet = 1; pe_n = 1; d = 0;
    #12 mr_n = 1;
    checks++;
    if (q != 0) begin failures++; $display("ERROR: q=%0d after clear", q); end
    for (int i = 0; i < 400; i++) begin
      @(negedge cp);
      pe_n = ($urandom % 8) != 0;
      cep  = ($urandom % 6) != 0;
      cet  = ($urandom % 6) != 0;
      d    = 4'($urandom);
      #1;
      checks++;
      if (tc != (cet && want == 4'hF)) begin failures++; $display("ERROR: tc=%0b q=%0d cet=%0b", tc, q, cet); end
      if (tc) n_tc++;
      @(posedge cp);
      if (!pe_n)            begin want = d;        n_load++;  end
      else if (cep && cet)  begin want = want + 1; n_count++; end
      else                  n_hold++;
      #1;
      checks++;
      if (q != want) begin failures++; $display("ERROR: cycle %0d q=%0d want %0d", i, q, want); end
    end
    // asynchronous clear between clock edges
    @(negedge cp); mr_n = 0; #1;
    checks++;
    if (q != 0) begin failures++; $display("ERROR: mr_n did not clear"); end
    checks++;
    if (n_load == 0 || n_count == 0 || n_hold == 0 || n_tc == 0) begin
      failures++;
      $display("ERROR: a case never happened: load=%0d count=%0d hold=%0d tc=%0d", n_load, n_count, n_hold, n_tc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
