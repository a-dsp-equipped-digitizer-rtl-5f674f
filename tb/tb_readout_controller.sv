// tb_readout_controller: four behavioural channels (status, event memory
// with one-clock reads, IRQ1 returning the channel to idle) around the
// readout controller and a deliberately small (8-word) multi-event FIFO.
// VME mode: status word, event memory reads, slow-control and IRQ1 writes.
// FAIR mode: two channels hold records of 7 and 12 words; the host pops the
// FIFO slowly, so the builder must stall on a full FIFO; the test checks
// both board headers, every record word in order (records in scan order), the IRQ1s and the event
// count.
module tb_readout_controller;
  import digitizer_pkg::*;
  localparam int N = 4, MD = 8, AW = 1 + 2 + EVM_AW;

  logic clk = 0, rst_n = 0, mode_fair = 0;
  logic host_req = 0, host_we = 0, host_ack;
  logic [AW-1:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  ch_status_e ch_status [N];
  logic [N-1:0] ch_cfg_busy = 4'b0100, ch_irq1, ch_cfg_wr, evm_rd_en;
  reg_addr_e cfg_addr;
  logic [31:0] cfg_wdata;
  logic [EVM_AW-1:0] evm_raddr;
  logic [31:0] evm_rd_data [N];
  logic mef_wr, mef_rd, mef_full, mef_empty;
  logic [31:0] mef_din, mef_dout;
  logic [3:0] mef_count;
  logic [15:0] events_built;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  readout_controller #(.N_CH(N), .MEF_DEPTH(MD)) dut (.*);
  multi_event_fifo #(.DW(32), .DEPTH(MD)) u_mef (
    .clk(clk), .rst_n(rst_n), .wr_en(mef_wr), .din(mef_din), .rd_en(mef_rd),
    .dout(mef_dout), .full(mef_full), .empty(mef_empty), .count(mef_count));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // channel models
  function automatic logic [31:0] word(input int c, input int a, input int len);
    return (a == 0) ? {16'(c), 16'(len)} : {8'(c), 8'hA5, 16'(a)};
  endfunction
  int len [N] = '{5, 7, 5, 12};
  int n_irq1 [N], n_cfg [N];
  reg_addr_e last_addr; logic [31:0] last_data;
  always @(posedge clk) begin
    for (int c = 0; c < N; c++) begin
      if (evm_rd_en[c]) evm_rd_data[c] <= word(c, int'(evm_raddr), len[c]);
      if (ch_irq1[c]) begin n_irq1[c]++; ch_status[c] <= ST_IDLE; end
      if (ch_cfg_wr[c]) begin n_cfg[c]++; last_addr = cfg_addr; last_data = cfg_wdata; end
    end
  end

  task automatic host(input bit we, input int unsigned a, input logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk); host_req = 1; host_we = we; host_addr = AW'(a); host_wdata = wd;
    @(negedge clk); host_req = 0; host_we = 0;
    check(host_ack, "ack one clock after request");
    rd = host_rdata;
  endtask

  function automatic int unsigned ch_addr(input int c, input int off);
    return (c << EVM_AW) | off;
  endfunction
  localparam int unsigned BRD = 1 << (AW - 1);

  initial begin
    logic [31:0] d;
    int got [$];
    for (int c = 0; c < N; c++) begin ch_status[c] = ST_IDLE; n_irq1[c] = 0; n_cfg[c] = 0; end
    ch_status[2] = ST_ANALYZING; ch_status[3] = ST_WAIT_RO;
    #22 rst_n = 1;
    // ---- VME mode ----
    host(0, BRD + 0, 0, d);
    check(d[7:0] == 8'b10_01_00_00, $sformatf("status word %h", d));
    host(0, ch_addr(2, 7), 0, d);
    check(d == word(2, 7, 5), $sformatf("event memory read %h", d));
    host(0, ch_addr(3, 0), 0, d);
    check(d == word(3, 0, 12), "event memory word 0");
    host(1, ch_addr(1, 3), 32'h5, d);
    check(n_cfg[1] == 1 && last_addr == REG_TRIG_MASK && last_data == 32'h5, "slow-control write");
    host(0, BRD + 3, 0, d);
    check(d == {1'b0, 15'b0, 16'h0004}, $sformatf("busy word %h", d));
    repeat (10) @(negedge clk);
    check(n_irq1[3] == 0, "no IRQ1 from the board in VME mode");
    host(1, ch_addr(3, 256), 0, d);
    @(negedge clk);
    check(n_irq1[3] == 1 && ch_status[3] == ST_IDLE, "IRQ1 write");

    // ---- FAIR mode ----
    mode_fair = 1;
    ch_status[1] = ST_WAIT_RO; ch_status[3] = ST_WAIT_RO;
    repeat (40) @(negedge clk);
    check(mef_count == 4'(MD), "builder filled the FIFO and waits");
    while (got.size() < 2 + 7 + 12) begin
      host(0, BRD + 2, 0, d);
      if (d != 0) begin host(0, BRD + 1, 0, d); got.push_back(int'(d)); end
    end
    // records may come in either order; parse them by their headers
    begin
      int p, seen; p = 0; seen = 0;
      for (int r = 0; r < 2; r++) begin
        int c, l;
        c = (got[p] >> 24) & 15; l = got[p] & 16'hffff;
        check((got[p] >>> 28 & 15) == 14 && (c == 1 || c == 3) && l == len[c],
              $sformatf("board header %h", got[p]));
        seen |= 1 << c;
        for (int i = 0; i < l && p + 1 + i < got.size(); i++)
          check(got[p + 1 + i] == int'(word(c, i, len[c])), $sformatf("ch%0d word %0d: %h", c, i, got[p + 1 + i]));
        p += 1 + l;
      end
      check(seen == 'b1010, "records of channels 1 and 3");
    end
    repeat (5) @(negedge clk);
    check(n_irq1[1] == 1 && n_irq1[3] == 2, "IRQ1 after each record");
    check(events_built == 2, "two events built");
    host(0, ch_addr(1, 0), 0, d);
    check(d == 0, "event memory not host-readable in FAIR mode");
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
