// tb_pretrigger_fifo: checks the pre-trigger FIFO with a small depth.
// The ADC side writes a running counter, so every sample names its own
// write time. For several events the test triggers at a known sample and
// checks that the reader gets exactly DEPTH samples, the first PRE of them
// from before the trigger, in order; that triggers are refused until the
// circular buffer has refilled after a restart; and that nothing is readable
// before a trigger. Clocks: 8 ns (ADC) and 12.5 ns (reader).
module tb_pretrigger_fifo;
  localparam int DEPTH = 64;
  localparam int PRE   = 16;

  logic clk_w = 0, clk_r = 0, rst_w_n = 0, rst_r_n = 0;
  logic [11:0] din;
  logic trig, accepting, full, restart, event_ready, rd_en, rd_empty, rd_valid;
  logic [11:0] rd_data;
  logic [6:0] pre_len;
  int checks = 0, failures = 0;

  always #4    clk_w = ~clk_w;
  always #6.25 clk_r = ~clk_r;

  pretrigger_fifo #(.DW(12), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ADC: running counter
  always_ff @(posedge clk_w or negedge rst_w_n)
    if (!rst_w_n) din <= '0; else din <= din + 1'b1;

  logic [11:0] trig_val;
  always @(posedge clk_w) if (trig && accepting) trig_val = din;

  task automatic one_event(input int wait_cycles);
    int n; logic [11:0] expv;
    // wait until accepting, then some more
    while (!accepting) @(posedge clk_w);
    repeat (wait_cycles) @(posedge clk_w);
    #1 trig = 1; @(posedge clk_w); #1 trig = 0;
    // reader
    @(posedge clk_r);
    while (!event_ready) @(posedge clk_r);
    n = 0; expv = trig_val - 12'(PRE);
    while (n < DEPTH) begin
      #1 rd_en = !rd_empty;
      @(posedge clk_r);
      #1 rd_en = 0;
      if (rd_valid) begin
        check(rd_data == expv, $sformatf("sample %0d: got %0d exp %0d", n, rd_data, expv));
        expv++; n++;
      end
    end
    // everything read: FIFO must now be empty and stay so
    repeat (40) @(posedge clk_r);
    #1 check(rd_empty, "empty after DEPTH samples");
    check(full, "write side full");
    // restart; triggers must be refused until PRE samples are in again
    #1 restart = 1; @(posedge clk_r); #1 restart = 0;
    check(!event_ready, "event cleared by restart");
  endtask

  initial begin
    trig = 0; restart = 0; rd_en = 0; pre_len = 7'(PRE);
    #30 rst_w_n = 1; rst_r_n = 1;
    @(posedge clk_w);
    #1 check(!accepting, "not accepting before the buffer is filled");
    check(rd_empty, "nothing readable before a trigger");
    // a trigger before the buffer is full is refused
    #1 trig = 1; @(posedge clk_w); #1 trig = 0;
    repeat (10) @(posedge clk_r);
    check(!event_ready, "early trigger refused");
    for (int e = 0; e < 5; e++) begin
      int cyc; cyc = 0;
      // measure time to accepting after restart (must be PRE writes)
      if (e > 0) begin
        while (accepting) @(posedge clk_w);
        while (!accepting) begin @(posedge clk_w); cyc++; end
        check(cyc >= PRE - 1 && cyc <= PRE + 4, $sformatf("refill took %0d cycles", cyc));
      end
      one_event(e * 7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk_w);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
