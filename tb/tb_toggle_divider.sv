// tb_toggle_divider - checks the divide-by-2 stage: after reset q is 0, and
// on every rising clock edge q toggles if en was high and holds otherwise.
// en is driven with random values; the expected q is kept in the testbench.
module tb_toggle_divider;
  logic clk = 0, rst_n = 0, en = 0, q;
  logic want = 0;
  int   checks = 0, failures = 0, toggles = 0;

  toggle_divider dut (.clk(clk), .rst_n(rst_n), .en(en), .q(q));

  always #5 clk = ~clk;

  initial begin
    #2;
    checks++;
    if (q !== 1'b0) begin failures++; $display("ERROR: q not 0 in reset"); end
    #10 rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      en = 1'($urandom);
      @(posedge clk);
      if (en) begin want = ~want; toggles++; end
      #1;
      checks++;
      if (q !== want) begin failures++; $display("ERROR: cycle %0d q=%0b want %0b", i, q, want); end
    end
    checks++;
    if (toggles == 0) begin failures++; $display("ERROR: en never high"); end
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
