// tb_channel_sequencer: runs the event flow against a behavioural FIFO and
// a software copy of the event memory. Settings: 8 baseline samples, 40
// signal samples, time-reference switch after 10 signal samples.
// Event A (validated, event number 0): checks the baseline, every sample
// sent to the shaping chain, the raw samples, the header words, the TR
// switch, the status sequence and the re-arm on IRQ1.
// Event B (not validated): checks the reject path (restart, re-arm, no
// record, reject counter). Event C (validated, event number 1): no raw data.
module tb_channel_sequencer;
  import digitizer_pkg::*;
  localparam int NB = 8, NS = 40;

  logic clk = 0, rst_n = 0;
  ch_cfg_t cfg;
  logic cfg_allow;
  ch_status_e status;
  logic event_ready, fifo_empty, fifo_rd_en, fifo_rd_valid, fifo_restart;
  logic [11:0] fifo_rd_data;
  logic arm, validation, lev2_trig, tr_select, irq1;
  logic [3:0] trig_src;
  logic proc_clear, proc_valid;
  logic signed [12:0] proc_sample;
  logic signed [31:0] amp_slow, amp_fast;
  logic [15:0] idx_slow, idx_fast, event_no, reject_no;
  logic evm_we;
  logic [13:0] evm_waddr;
  logic [31:0] evm_wdata;
  int checks = 0, failures = 0;

  always #6 clk = ~clk;
  channel_sequencer dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // behavioural FIFO
  logic [11:0] q[$];
  logic ready;
  int n_restart = 0, n_arm = 0, n_clear = 0;
  assign event_ready = ready;
  assign fifo_empty  = !ready || q.size() == 0;
  always @(posedge clk) begin
    fifo_rd_valid <= 0;
    if (fifo_rd_en && !fifo_empty) begin
      fifo_rd_data  <= q.pop_front();
      fifo_rd_valid <= 1;
    end
    if (rst_n && fifo_restart) begin ready = 0; q.delete(); n_restart++; end
    if (rst_n && arm) n_arm++;
    if (rst_n && proc_clear) n_clear++;
  end

  // event memory copy and shaping-chain capture
  logic [31:0] mem [64];
  int psamp[$];
  int tr_at = -1, nproc = 0;
  always @(posedge clk) begin
    if (rst_n && evm_we && evm_waddr < 64) mem[6'(evm_waddr)] = evm_wdata;
    if (rst_n && proc_valid) begin psamp.push_back(int'(proc_sample)); nproc++; end
    if (tr_select && tr_at < 0) tr_at = nproc;
  end

  int samples[NB+NS];
  int exp_base;

  task automatic load_event(input int bl);
    int s;
    s = 0;
    for (int i = 0; i < NB + NS; i++) begin
      samples[i] = (i < NB) ? bl + int'($urandom % 7) - 3 : bl + 50 * (i - NB + 1);
      if (i < NB) s += samples[i];
      q.push_back(12'(samples[i]));
    end
    exp_base = (s + NB / 2) / NB;
    psamp.delete(); nproc = 0; tr_at = -1;
    @(negedge clk); ready = 1;
  endtask

  task automatic wait_status(input ch_status_e st, input int maxc);
    int n; n = 0;
    while (status != st && n < maxc) begin @(negedge clk); n++; end
    check(status == st, $sformatf("reached status %s", st.name()));
  endtask

  initial begin
    int arms0;
    cfg = CFG_RESET; cfg.base_log2 = 3; cfg.n_sig = 14'(NS); cfg.tr_start = 14'd10;
    ready = 0; validation = 1; irq1 = 0; trig_src = 4'b0100;
    amp_slow = 32'sd123456; amp_fast = -32'sd77; idx_slow = 16'd31; idx_fast = 16'd9;
    for (int i = 0; i < 64; i++) mem[i] = '0;
    #25 rst_n = 1;
    repeat (3) @(negedge clk);
    check(n_arm == 1, "trigger armed after init");
    check(status == ST_IDLE && cfg_allow, "idle, settings allowed");

    // ---- event A ----
    load_event(1000);
    @(negedge clk); @(negedge clk);
    check(status == ST_ANALYZING && !cfg_allow, "analyzing");
    wait_status(ST_WAIT_RO, 500);
    @(negedge clk);
    check(n_clear == 1, "shaping chain cleared once");
    check(nproc == NS, $sformatf("%0d samples to the shaping chain", nproc));
    for (int i = 0; i < NS && i < psamp.size(); i++)
      check(psamp[i] == samples[NB + i] - exp_base,
            $sformatf("sample %0d: %0d exp %0d", i, psamp[i], samples[NB + i] - exp_base));
    check(tr_at >= 10 && tr_at <= 12, $sformatf("TR switch after %0d samples", tr_at));
    check(!tr_select, "TR switch released");
    check(n_restart == 1, "baseline sampling restarted");
    check(mem[0] == {16'd0, 16'(HDR_WORDS + NB + NS)}, $sformatf("word0 %h", mem[0]));
    check(mem[1] == {4'b0100, 3'b0, 1'b1, 12'b0, 12'(exp_base)}, $sformatf("word1 %h", mem[1]));
    check(mem[2] == 32'd123456 && mem[3] == -32'sd77, "amplitudes");
    check(mem[4] == {16'd31, 16'd9}, $sformatf("peak indices %h", mem[4]));
    for (int i = 0; i < NB + NS && HDR_WORDS + i < 64; i++)
      check(mem[HDR_WORDS + i] == 32'(samples[i]), $sformatf("raw %0d", i));
    check(event_no == 1, "event counted");
    arms0 = n_arm;
    repeat (20) @(negedge clk);
    check(status == ST_WAIT_RO && n_arm == arms0, "waits for readout");
    irq1 = 1; @(negedge clk); irq1 = 0;
    @(negedge clk);
    check(n_arm == arms0 + 1 && status == ST_IDLE, "IRQ1 re-arms");

    // ---- event B: not validated ----
    validation = 0;
    mem[0] = 32'hdead;
    load_event(900);
    repeat (60) @(negedge clk);
    check(status == ST_IDLE, $sformatf("back to idle after reject, %s", status.name()));
    check(reject_no == 1 && event_no == 1, "reject counted");
    check(n_restart == 2 && n_arm == arms0 + 2, "reject restarts and re-arms");
    check(nproc == 0, "no samples processed for a rejected event");
    check(mem[0] == 32'hdead, "no record for a rejected event");

    // ---- event C ----
    validation = 1;
    load_event(500);
    wait_status(ST_WAIT_RO, 500);
    @(negedge clk);
    check(mem[0] == {16'd1, 16'(HDR_WORDS)}, $sformatf("event 1 word0 %h", mem[0]));
    check(mem[1][24] == 1'b0, "event 1 not raw");
    check(nproc == NS, "event 1 processed");
    irq1 = 1; @(negedge clk); irq1 = 0;
    repeat (3) @(negedge clk);
    check(status == ST_IDLE, "idle at end");
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
