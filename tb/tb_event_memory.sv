// tb_event_memory: writes random words at random addresses of a reduced
// memory, reads them back (one clock read latency) and compares with a
// software copy; also reads during writes to other addresses.
module tb_event_memory;
  localparam int DEPTH = 256;
  logic clk = 0, we = 0, rd_en = 0;
  logic [7:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rd_data;
  logic [31:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  event_memory #(.DW(32), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    // fill everything first
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = 8'(a); wdata = $urandom; ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 2000; i++) begin
      logic [7:0] ra; logic [31:0] expd;
      ra = 8'($urandom);
      expd = ref_mem[ra];
      @(negedge clk);
      rd_en = 1; raddr = ra;
      we = $urandom % 2; waddr = 8'($urandom); wdata = $urandom;
      if (waddr == ra) we = 0;
      if (we) ref_mem[waddr] = wdata;
      @(negedge clk);
      rd_en = 0; we = 0;
      check(rd_data == expd, $sformatf("addr %0d got %h exp %h", ra, rd_data, expd));
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
