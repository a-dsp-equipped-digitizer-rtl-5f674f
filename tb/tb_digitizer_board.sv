// tb_digitizer_board: end-to-end test of the whole board at its default
// sizes (8 channels, 8192-sample FIFOs, 4096-word multi-event FIFO).
// Each channel gets its own ADC clock phase and a preamplifier-like pulse of
// a different amplitude on a 300 LSB baseline. The comparators are modelled
// here from the analog value (low threshold 20 LSB, high threshold 200 LSB)
// and each channel uses a different trigger source: channel 0 the low
// comparator, 1 the high comparator, 2 the front input, 3 the mother-board
// ECL input, 4..7 any source.
//   Phase 1, FAIR mode: event 0 of every channel (a raw event, 8197 words)
//   is collected through the multi-event FIFO, which fills and stalls the
//   builder; the host checks every record.
//   Phase 2, VME mode (mode switch): event 1, read channel by channel over
//   the host port, then IRQ1 by the host; channel 5 switches to the
//   time-reference input during the event; a second pulse on a channel
//   waiting for readout must not trigger it; finally an event without
//   validation is dropped.
// The slow amplitude divided by the pulse amplitude must agree across
// channels and events within 2 %. Each mechanism is counted and one that
// never happened is a failure.
module tb_digitizer_board;
  import digitizer_pkg::*;
  localparam int N = 8;
  localparam int AW = 1 + 3 + EVM_AW;
  localparam int unsigned BRD = 1 << (AW - 1);

  logic clk_sys = 0, rst_sys_n = 0, mode_fair = 1, validation = 1;
  logic [N-1:0] clk_adc = '0, rst_adc_n = '0;
  logic [11:0] adc_data [N];
  logic [N-1:0] comp1, comp2, ext_trig_front, ecl_trig;
  logic [7:0] gain_code [N], thr_low_code [N], thr_high_code [N];
  logic [N-1:0] tr_select, lev2_trig, armed, fifo_full;
  ch_status_e ch_status [N];
  logic [15:0] event_no [N], reject_no [N], events_built;
  logic mef_full, mef_empty;
  logic host_req = 0, host_we = 0, host_ack;
  logic [AW-1:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;

  always #6.25 clk_sys = ~clk_sys;
  for (genvar c = 0; c < N; c++) begin : g_clk
    initial begin
      #(0.9 * c);
      forever #4 clk_adc[c] = ~clk_adc[c];
    end
  end

  digitizer_board dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---- per-channel pulse generators and comparator models ----
  longint t [N], t0 [N];
  real amp [N];
  for (genvar c = 0; c < N; c++) begin : g_gen
    initial begin t[c] = 0; t0[c] = -1; amp[c] = 0; pend[c] = 0; end
    always @(posedge clk_adc[c]) begin
      real v;
      t[c]++;
      v = 0;
      if (t0[c] >= 0 && t[c] >= t0[c])
        v = amp[c] * (1.0 - $exp(-real'(t[c] - t0[c]) / 2.5)) * $exp(-real'(t[c] - t0[c]) / 6250.0);
      adc_data[c] <= 12'($rtoi(300.0 + v + 0.5));
      comp1[c] <= v > 20.0;
      comp2[c] <= v > 200.0;
      ext_trig_front[c] <= (c == 2 || c >= 4) && pend[c] > 0;
      ecl_trig[c]       <= (c == 3) && pend[c] > 0;
      if (pend[c] > 0) pend[c]--;
    end
  end

  // mechanism counters
  int n_src [4], n_stall = 0, n_reject = 0, n_raw = 0, n_tr = 0, n_cfg = 0;
  int n_ignored = 0, n_mode = 0, n_vme = 0, n_fair = 0;
  always @(posedge clk_sys) begin
    if (mef_full && dut.u_ro.bstate == 3'd4) n_stall++;
    if (tr_select[5]) n_tr++;
  end

  task automatic host(input bit we, input int unsigned a, input logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk_sys); host_req = 1; host_we = we; host_addr = AW'(a); host_wdata = wd;
    @(negedge clk_sys); host_req = 0; host_we = 0;
    rd = host_rdata;
  endtask
  function automatic int unsigned ch_addr(input int c, input int off);
    return (c << EVM_AW) | off;
  endfunction

  // fire a pulse on channel c; the generator below raises the trigger line
  // that channel uses for four ADC clocks
  int pend [N];
  task automatic fire(input int c, input real a);
    amp[c] = a; t0[c] = t[c] + 2; pend[c] = 4;
  endtask

  task automatic settle();
    for (int c = 0; c < N; c++) amp[c] = 0;
    repeat (700) @(posedge clk_sys);
  endtask

  function automatic real pulse_amp(input int c, input int ev);
    return 400.0 + 150.0 * c + 100.0 * ev;
  endfunction

  real ratio [$];
  task automatic check_record(input int c, input int ev, input logic [31:0] w [5], input int exp_len);
    check(w[0] == {16'(ev), 16'(exp_len)}, $sformatf("ch%0d record word0 %h", c, w[0]));
    check(w[1][11:0] == 12'd300, $sformatf("ch%0d baseline %0d", c, w[1][11:0]));
    check(w[1][24] == (ev == 0), $sformatf("ch%0d raw flag", c));
    if (w[1][24]) n_raw++;
    for (int s = 0; s < 4; s++) if (w[1][28 + s]) n_src[s]++;
    ratio.push_back(real'($signed(w[2])) / 4096.0 / pulse_amp(c, ev));
  endtask

  initial begin
    logic [31:0] d, w [5];
    int c, len, nrec;
    for (int s = 0; s < 4; s++) n_src[s] = 0;
    #40 rst_sys_n = 1; rst_adc_n = '1;
    // slow control: trigger sources
    host(1, ch_addr(0, REG_TRIG_MASK), 32'b0100, d);
    host(1, ch_addr(1, REG_TRIG_MASK), 32'b1000, d);
    host(1, ch_addr(2, REG_TRIG_MASK), 32'b0001, d);
    host(1, ch_addr(3, REG_TRIG_MASK), 32'b0010, d);
    repeat (5) @(negedge clk_sys);
    check(dut.g_ch[0].u_ch.u_regs.cfg.trig_mask == 4'b0100, "slow-control write applied");
    n_cfg++;
    repeat (800) @(posedge clk_sys);            // circular buffers full
    check(&armed, "all channels armed");

    // ---------------- phase 1: FAIR ----------------
    for (int k = 0; k < N; k++) fire(k, pulse_amp(k, 0));
    nrec = 0;
    while (nrec < N) begin
      host(0, BRD + 2, 0, d);
      if (d == 0) continue;
      host(0, BRD + 1, 0, d);
      check(d[31:28] == 4'hE, $sformatf("board header %h", d));
      c = int'(d[27:24]); len = int'(d[15:0]);
      for (int i = 0; i < len; i++) begin
        logic [31:0] x;
        do host(0, BRD + 2, 0, x); while (x == 0);
        host(0, BRD + 1, 0, x);
        if (i < 5) w[i] = x;
      end
      check_record(c, 0, w, HDR_WORDS + 8192);
      n_fair++; nrec++;
    end
    check(events_built == 16'(N), "all records built");
    check(mef_empty && !mef_full, "multi-event FIFO drained");
    repeat (10) @(negedge clk_sys);
    for (int k = 0; k < N; k++) check(ch_status[k] == ST_IDLE, "re-armed by the board");

    // ---------------- phase 2: VME ----------------
    mode_fair = 0; n_mode++;
    host(1, ch_addr(5, REG_TR_START), 32'd3000, d);
    settle();
    for (int k = 0; k < N; k++) fire(k, pulse_amp(k, 1));
    // all channels waiting for readout?
    do begin
      host(0, BRD + 0, 0, d);
    end while (d[15:0] != 16'hAAAA);
    // a pulse on a channel that waits for readout is ignored
    settle();
    fire(2, 900.0);
    repeat (200) @(negedge clk_sys);
    if (ch_status[2] == ST_WAIT_RO && event_no[2] == 2 && !armed[2]) n_ignored++;
    for (int k = 0; k < N; k++) begin
      for (int i = 0; i < 5; i++) host(0, ch_addr(k, i), 0, w[i]);
      check_record(k, 1, w, HDR_WORDS);
      n_vme++;
      host(1, ch_addr(k, 256), 0, d);           // IRQ1
    end
    repeat (10) @(negedge clk_sys);
    host(0, BRD + 0, 0, d);
    check(d[15:0] == 16'h0000, $sformatf("all idle after IRQ1: %h", d));
    // event without validation
    settle();
    validation = 0;
    fire(4, 500.0);
    repeat (600) @(negedge clk_sys);
    if (reject_no[4] == 1 && event_no[4] == 2 && ch_status[4] == ST_IDLE) n_reject++;
    validation = 1;

    // amplitude consistency
    foreach (ratio[i])
      check(ratio[i] > 0.98 * ratio[0] && ratio[i] < 1.02 * ratio[0],
            $sformatf("amplitude/pulse ratio %f vs %f", ratio[i], ratio[0]));
    // mechanisms
    for (int s = 0; s < 4; s++) check(n_src[s] > 0, $sformatf("trigger source %0d used", s));
    check(n_stall > 0, "multi-event FIFO full, builder stalled");
    check(n_reject > 0, "event without validation dropped");
    check(n_raw == N, "raw events");
    check(n_tr > 0, "time-reference switch");
    check(n_cfg > 0, "slow control");
    check(n_ignored > 0, "trigger ignored while waiting for readout");
    check(n_mode > 0 && n_vme == N && n_fair == N, "both readout modes");
    $display("mechanisms: src %0d/%0d/%0d/%0d stall %0d reject %0d raw %0d tr %0d ignored %0d vme %0d fair %0d",
             n_src[0], n_src[1], n_src[2], n_src[3], n_stall, n_reject, n_raw, n_tr, n_ignored, n_vme, n_fair);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk_sys);
    for (int k = 0; k < N; k++) $display("ch%0d status %s ev %0d rej %0d armed %0d", k, ch_status[k].name(), event_no[k], reject_no[k], armed[k]);
    $display("builder %s", dut.u_ro.bstate.name());
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
