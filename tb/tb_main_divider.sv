// tb_main_divider - checks the divide-by-(N+1) counter on a plain clock.
//
// Instances for N = 6 (default), N = 1 and N = 4 are reset and clocked for
// 100 cycles. A reference count kept in the testbench (0..N, wrapping) gives
// the expected count, wrap = (count == N) and fo = (count >= ceil((N+1)/2)).
// The testbench also checks that fo falls exactly once per N+1 clocks.
module tb_main_divider;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;

  logic [2:0] c6; logic w6, f6;
  logic [0:0] c1; logic w1, f1;
  logic [2:0] c4; logic w4, f4;

  main_divider          d6 (.clk(clk), .rst_n(rst_n), .count(c6), .wrap(w6), .fo(f6));
  main_divider #(.N(1)) d1 (.clk(clk), .rst_n(rst_n), .count(c1), .wrap(w1), .fo(f1));
  main_divider #(.N(4)) d4 (.clk(clk), .rst_n(rst_n), .count(c4), .wrap(w4), .fo(f4));

  always #5 clk = ~clk;

  task automatic cmp(input int n, input int cnt, input logic w, input logic f, input int ref_c);
    checks++;
    if (cnt != ref_c || w != (ref_c == n) || f != (ref_c >= (n + 2) / 2)) begin
      failures++;
      $display("ERROR N=%0d: count=%0d wrap=%0b fo=%0b, want count=%0d", n, cnt, w, f, ref_c);
    end
  endtask

  int r6 = 1, r1 = 1, r4 = 1;  // first sample follows the first clock edge
  int falls6 = 0;
  always @(negedge f6) if (rst_n) falls6++;

  initial begin
    #12 rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      cmp(6, int'(c6), w6, f6, r6);
      cmp(1, int'(c1), w1, f1, r1);
      cmp(4, int'(c4), w4, f4, r4);
      r6 = (r6 == 6) ? 0 : r6 + 1;
      r1 = (r1 == 1) ? 0 : r1 + 1;
      r4 = (r4 == 4) ? 0 : r4 + 1;
    end
    // 100 clocks from state 0: fo falls at clock 7, 14, ... 98 -> 14 times
    checks++;
    if (falls6 != 14) begin failures++; $display("ERROR: fo fell %0d times, want 14", falls6); end
    // asynchronous reset clears the count mid-cycle
    @(negedge clk); #1 rst_n = 0; #1;
    checks++;
    if (c6 != 0 || c4 != 0) begin failures++; $display("ERROR: reset did not clear the count"); end
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
