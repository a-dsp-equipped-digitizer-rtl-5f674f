// tb_peak_finder: random signed sequences of random length (all negative,
// with many repeated values, and wide-range); checks the maximum and the
// index of its first occurrence against a software scan.
module tb_peak_finder;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic signed [31:0] in_data = '0, peak;
  logic [15:0] peak_idx;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  peak_finder dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #22 rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      int len, mx, mi, idx;
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      len = 1 + $urandom % 200; mx = 0; mi = 0; idx = 0;
      for (int i = 0; i < len; i++) begin
        int v;
        if (t < 5)       v = -1000 - int'($urandom % 1000);   // all negative
        else if (t < 25) v = int'($urandom % 8);               // many ties
        else             v = int'($urandom % 200001) - 100000;
        in_data = v; in_valid = ($urandom % 3) != 0;
        if (in_valid) begin
          if (idx == 0 || v > mx) begin mx = v; mi = idx; end
          idx++;
        end
        @(negedge clk);
      end
      in_valid = 0;
      @(negedge clk);
      if (idx > 0) begin
        check(peak == mx, $sformatf("peak %0d exp %0d", peak, mx));
        check(peak_idx == 16'(mi), $sformatf("index %0d exp %0d", peak_idx, mi));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
