// tb_edge_select_xor - checks the edge-select gate over all four input
// combinations, repeated with random inputs: fi_star must equal fi when
// sel = 0 and the inverse of fi when sel = 1.
module tb_edge_select_xor;
  logic fi, sel, fi_star;
  int   checks = 0, failures = 0;

  edge_select_xor dut (.fi(fi), .sel(sel), .fi_star(fi_star));

  task automatic apply(input logic a, input logic s);
    logic want;
    fi = a; sel = s;
    #1;
    want = s ? !a : a;
    checks++;
    if (fi_star !== want) begin
      failures++;
      $display("ERROR: fi=%0b sel=%0b fi_star=%0b want %0b", a, s, fi_star, want);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) apply(i[0], i[1]);
    for (int i = 0; i < 60; i++) apply(1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
