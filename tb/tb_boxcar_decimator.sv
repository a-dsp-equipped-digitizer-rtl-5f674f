// tb_boxcar_decimator: feeds random signed samples with random gaps and
// checks that each output is the sum of the 16 inputs of its block, that
// outputs come one clock after the 16th input, and that clear drops a
// partial block.
module tb_boxcar_decimator;
  localparam int IW = 13, N = 16, OW = IW + 4;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, out_valid;
  logic signed [IW-1:0] in_data = '0;
  logic signed [OW-1:0] out_data;
  int checks = 0, failures = 0;
  int q[$];

  always #5 clk = ~clk;
  boxcar_decimator #(.IW(IW), .N(N)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int sum, cnt, nout;
  logic exp_out;
  always @(posedge clk) begin
    // compare with the expectation prepared on the previous clock
    if (rst_n) begin
      check(out_valid == exp_out, "out_valid timing");
      if (out_valid && exp_out) begin
        check(out_data == OW'(q[0]), $sformatf("sum got %0d exp %0d", out_data, q[0]));
        void'(q.pop_front());
        nout++;
      end
    end
    exp_out = 0;
    if (clear) begin sum = 0; cnt = 0; end
    else if (in_valid) begin
      sum += int'(in_data); cnt++;
      if (cnt == N) begin q.push_back(sum); sum = 0; cnt = 0; exp_out = 1; end
    end
  end

  initial begin
    sum = 0; cnt = 0; nout = 0; exp_out = 0;
    #22 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      in_data  = IW'($signed($urandom % 8191) - 4095);
      clear    = (i == 1500) || (i == 1507);
    end
    @(negedge clk) in_valid = 0; clear = 0;
    repeat (3) @(posedge clk);
    check(nout > 100, $sformatf("only %0d outputs", nout));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
