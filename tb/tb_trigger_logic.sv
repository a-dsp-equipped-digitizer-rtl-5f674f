// tb_trigger_logic: checks source masking, edge detection, arming,
// gating by the FIFO, the latched source and the 3-clock latency.
module tb_trigger_logic;
  logic clk = 0, clk_sys = 0, rst_n = 0, rst_sys_n = 0;
  logic [3:0] trig_in = '0, trig_mask, trig_src;
  logic fifo_accepting, trig, armed, arm;
  int checks = 0, failures = 0, ntrig = 0;

  always #4    clk = ~clk;
  always #6.25 clk_sys = ~clk_sys;

  trigger_logic dut (.*);

  always @(posedge clk) if (rst_n && trig) ntrig++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic do_arm();
    @(posedge clk_sys); #1 arm = 1; @(posedge clk_sys); #1 arm = 0;
    repeat (4) @(posedge clk);
    #1;
  endtask

  // raise source s, count clocks until trig, drop it again
  task automatic pulse(input int s, output int lat);
    int n0; n0 = ntrig; lat = -1;
    @(posedge clk); #1 trig_in[s] = 1;
    for (int i = 1; i <= 8; i++) begin
      @(posedge clk); #1;
      if (trig && lat < 0) lat = i;
    end
    trig_in[s] = 0;
    repeat (4) @(posedge clk);
    #1;
  endtask

  initial begin
    int lat;
    arm = 0; trig_mask = 4'b1111; fifo_accepting = 1;
    #30 rst_n = 1; rst_sys_n = 1;
    repeat (3) @(posedge clk);
    check(!armed, "not armed after reset");
    pulse(0, lat);
    check(lat < 0, "no trigger while not armed");
    for (int s = 0; s < 4; s++) begin
      do_arm();
      check(armed, "armed");
      pulse(s, lat);
      check(lat == 3, $sformatf("source %0d latency %0d", s, lat));
      check(trig_src == 4'(1 << s), $sformatf("source %0d latched as %b", s, trig_src));
      check(!armed, "disarmed after trigger");
      pulse(s, lat);
      check(lat < 0, "second edge ignored until re-armed");
    end
    // masked source
    trig_mask = 4'b0101;
    do_arm();
    pulse(1, lat); check(lat < 0, "masked source 1 ignored");
    pulse(3, lat); check(lat < 0, "masked source 3 ignored");
    pulse(2, lat); check(lat == 3, "enabled source 2 accepted");
    // FIFO not accepting
    trig_mask = 4'b1111;
    do_arm();
    fifo_accepting = 0;
    pulse(0, lat); check(lat < 0, "refused while FIFO not accepting");
    check(armed, "still armed");
    fifo_accepting = 1;
    // a level that is already high is not an edge
    pulse(0, lat); check(lat == 3, "accepted once FIFO accepts");
    check(ntrig == 6, $sformatf("trigger count %0d", ntrig));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
