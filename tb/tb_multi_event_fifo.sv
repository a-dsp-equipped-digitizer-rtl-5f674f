// tb_multi_event_fifo: random pushes and pops on a reduced-depth FIFO
// against a software queue; checks data order, count, full and empty, and
// that the write and read pointers wrap correctly.
module tb_multi_event_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0, full, empty;
  logic [31:0] din = '0, dout;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [31:0] q[$];

  always #5 clk = ~clk;
  multi_event_fifo #(.DW(32), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [31:0] expd; logic popped;
    #22 rst_n = 1;
    popped = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (popped) check(dout == expd, $sformatf("data %h exp %h", dout, expd));
      check(32'(count) == q.size(), "count");
      check(full == (q.size() == DEPTH) && empty == (q.size() == 0), "flags");
      // phases: mostly filling, then mostly draining
      wr_en = !full && (($urandom % 4) < ((i / 300) % 2 ? 1 : 3));
      rd_en = !empty && (($urandom % 4) < ((i / 300) % 2 ? 3 : 1));
      din = $urandom;
      popped = rd_en;
      if (rd_en) expd = q.pop_front();
      if (wr_en) q.push_back(din);
    end
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
