// tb_digitizer_channel: one complete channel at its default sizes (8192
// sample FIFO, 512-sample circular buffer, 256 baseline samples).
// The ADC input is a preamplifier-like pulse (rise 20 ns, decay 50 us) on a
// baseline of 300 LSB, started together with a front-panel trigger.
// Event 0 keeps its raw samples; from them the test recomputes, in floating
// point, the baseline, the decimated signal and both shaper outputs, and
// compares the baseline and the two amplitudes of the record. It also checks
// that the pre-trigger part of the record precedes the pulse, that a second
// event of half the amplitude gives half the amplitudes, that an event
// without validation is dropped, that a gain setting written during an event
// takes effect only afterwards, that the time-reference switch operates,
// and that a longer circular buffer and baseline move the pulse in the record.
// ADC clock 8 ns, processing clock 12.5 ns.
module tb_digitizer_channel;
  import digitizer_pkg::*;
  logic clk_adc = 0, clk_sys = 0, rst_adc_n = 0, rst_sys_n = 0;
  logic [11:0] adc_data;
  logic comp1 = 0, comp2 = 0, ext_trig_front = 0, ext_trig_mb = 0, validation = 1;
  logic [7:0] gain_code, thr_low_code, thr_high_code;
  logic tr_select, lev2_trig, irq1 = 0, cfg_wr = 0, cfg_busy;
  reg_addr_e cfg_addr = REG_GAIN;
  logic [31:0] cfg_wdata = '0;
  ch_status_e status;
  logic evm_rd_en = 0;
  logic [13:0] evm_raddr = '0;
  logic [31:0] evm_rd_data;
  logic [15:0] event_no, reject_no;
  logic armed, fifo_full;
  int checks = 0, failures = 0;

  always #4    clk_adc = ~clk_adc;
  always #6.25 clk_sys = ~clk_sys;

  digitizer_channel dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---- pulse generator ----
  longint t = 0, t0 = -1;
  real amp = 0;
  always @(posedge clk_adc) begin
    real v;
    t++;
    v = 300.0;
    if (t0 >= 0 && t >= t0) v += amp * (1.0 - $exp(-real'(t - t0) / 2.5)) * $exp(-real'(t - t0) / 6250.0);
    adc_data <= 12'($rtoi(v + 0.5));
  end

  task automatic fire(input real a);
    while (!armed || !dut.accepting) @(posedge clk_adc);
    repeat (100) @(posedge clk_adc);
    amp = a; t0 = t + 1;
    #1 ext_trig_front = 1;
    repeat (4) @(posedge clk_adc);
    #1 ext_trig_front = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk_sys); evm_rd_en = 1; evm_raddr = 14'(a);
    @(negedge clk_sys); evm_rd_en = 0; d = evm_rd_data;
  endtask

  task automatic wait_ro(input int maxc);
    int n; n = 0;
    while (status != ST_WAIT_RO && n < maxc) begin @(negedge clk_sys); n++; end
    check(status == ST_WAIT_RO, "record ready");
    @(negedge clk_sys);
  endtask

  task automatic rearm();
    @(negedge clk_sys); irq1 = 1; @(negedge clk_sys); irq1 = 0;
  endtask

  // floating-point shaper on decimated sums
  function automatic real shaper_peak(input real xs[$], input real b0, b1, a1, a2, a3, output int pidx);
    real x1 = 0, y1 = 0, y2 = 0, y3 = 0, y, pk = -1e30;
    pidx = 0;
    foreach (xs[n]) begin
      y = b0 * xs[n] + b1 * x1 + a1 * y1 + a2 * y2 + a3 * y3;
      x1 = xs[n]; y3 = y2; y2 = y1; y1 = y;
      if (y > pk) begin pk = y; pidx = n; end
    end
    return pk;
  endfunction

  initial begin
    logic [31:0] w0, w1, w2, w3, w4, d;
    int nw, bsum, base, first_rise, ps, pf, acc, cnt;
    real xs[$], pk_s, pk_f, as0, af0;
    int raw[8192];

    #30 rst_adc_n = 1; rst_sys_n = 1;

    // ---------- event 0, raw ----------
    fire(1000.0);
    // a gain write during the event is held back
    repeat (20) @(negedge clk_sys);
    @(negedge clk_sys); cfg_wr = 1; cfg_addr = REG_GAIN; cfg_wdata = 32'd200;
    @(negedge clk_sys); cfg_wr = 0;
    @(negedge clk_sys);
    check(status == ST_ANALYZING && cfg_busy && gain_code == 8'd128, "gain held during event");
    wait_ro(40000);
    check(gain_code == 8'd200 && !cfg_busy, "gain applied after the event");
    rd(0, w0); rd(1, w1); rd(2, w2); rd(3, w3); rd(4, w4);
    nw = int'(w0[15:0]);
    check(w0[31:16] == 16'd0 && nw == HDR_WORDS + 8192, $sformatf("event 0 header %h", w0));
    check(w1[24] && w1[31:28] == 4'b0001, $sformatf("raw flag, trigger source %h", w1));
    bsum = 0; first_rise = -1;
    for (int i = 0; i < 8192; i++) begin
      rd(HDR_WORDS + i, d); raw[i] = int'(d);
      if (i < 256) bsum += raw[i];
      if (first_rise < 0 && raw[i] > 305) first_rise = i;
    end
    base = (bsum + 128) / 256;
    check(int'(w1[11:0]) == base && base == 300, $sformatf("baseline %0d exp %0d", w1[11:0], base));
    check(first_rise >= 505 && first_rise <= 515, $sformatf("pulse starts at sample %0d", first_rise));
    // reference processing
    acc = 0; cnt = 0;
    for (int i = 256; i < 8192; i++) begin
      acc += raw[i] - base; cnt++;
      if (cnt == 16) begin xs.push_back(real'(acc)); acc = 0; cnt = 0; end
    end
    pk_s = shaper_peak(xs, 16495.0/2097152.0, -16503.0/2097152.0, 23623.0/8192.0, -22729.0/8192.0, 7296.0/8192.0, ps);
    pk_f = shaper_peak(xs, 24760.0/262144.0, -24771.0/262144.0, 20469.0/8192.0, -17048.0/8192.0, 4733.0/8192.0, pf);
    as0 = real'($signed(w2)) / 4096.0; af0 = real'($signed(w3)) / 4096.0;
    check(as0 > pk_s - 2.0 && as0 < pk_s + 2.0, $sformatf("slow amplitude %f exp %f", as0, pk_s));
    check(af0 > pk_f - 2.0 && af0 < pk_f + 2.0, $sformatf("fast amplitude %f exp %f", af0, pk_f));
    check(int'(w4[31:16]) == ps && int'(w4[15:0]) == pf, $sformatf("peak indices %h exp %0d %0d", w4, ps, pf));
    check(as0 > 0.8 * 16000 && as0 < 16000, $sformatf("slow amplitude %f for a 1000 LSB pulse", as0));
    $display("event 0: baseline %0d slow %f fast %f (peaks at %0d, %0d)", base, as0, af0, ps, pf);
    rearm();

    // ---------- rejected event ----------
    validation = 0;
    fire(700.0);
    repeat (400) @(negedge clk_sys);
    check(reject_no == 1 && event_no == 1 && status == ST_IDLE, "event without validation dropped");
    validation = 1;
    amp = 0;                       // let the input settle before the next pulse
    repeat (600) @(negedge clk_adc);

    // ---------- event 1, half amplitude, TR switch on ----------
    @(negedge clk_sys); cfg_wr = 1; cfg_addr = REG_TR_START; cfg_wdata = 32'd2000;
    @(negedge clk_sys); cfg_wr = 0;
    repeat (3) @(negedge clk_sys);
    fire(500.0);
    begin
      bit seen; int n; seen = 0; n = 0;
      while (status != ST_WAIT_RO && n < 40000) begin
        @(negedge clk_sys); n++;
        if (tr_select) seen = 1;
      end
      check(seen, "time-reference switch operated");
    end
    wait_ro(10);
    rd(0, w0); rd(1, w1); rd(2, w2); rd(3, w3); rd(4, w4);
    check(w0 == {16'd1, 16'(HDR_WORDS)}, $sformatf("event 1 header %h", w0));
    begin
      real r_s, r_f;
      r_s = real'($signed(w2)) / 4096.0 / as0; r_f = real'($signed(w3)) / 4096.0 / af0;
      check(r_s > 0.49 && r_s < 0.51 && r_f > 0.49 && r_f < 0.51, $sformatf("amplitude ratios %f %f", r_s, r_f));
    end
    // ---------- event 2: longer circular buffer and baseline ----------
    // written while waiting for readout; the pulse then sits 1024 samples
    // into the record and 512 samples after the baseline, 16 decimated
    // samples later than before
    @(negedge clk_sys); cfg_wr = 1; cfg_addr = REG_PRE_LEN; cfg_wdata = 32'd1024;
    @(negedge clk_sys); cfg_addr = REG_BASE_LOG2; cfg_wdata = 32'd9;
    @(negedge clk_sys); cfg_addr = REG_TR_START; cfg_wdata = 32'd0;
    @(negedge clk_sys); cfg_wr = 0;
    repeat (3) @(negedge clk_sys);
    amp = 0;
    repeat (600) @(negedge clk_adc);
    rearm();
    fire(1000.0);
    wait_ro(40000);
    rd(0, w0); rd(1, w1); rd(2, w2); rd(4, w4);
    check(w0 == {16'd2, 16'(HDR_WORDS)} && int'(w1[11:0]) == 300, $sformatf("event 2 header %h %h", w0, w1));
    check(real'($signed(w2)) / 4096.0 > as0 * 0.99 && real'($signed(w2)) / 4096.0 < as0 * 1.01,
          $sformatf("event 2 slow amplitude %f", real'($signed(w2)) / 4096.0));
    check(int'(w4[31:16]) == ps + 16, $sformatf("event 2 slow peak at %0d, expected %0d", w4[31:16], ps + 16));
    rearm();
    repeat (5) @(negedge clk_sys);
    check(status == ST_IDLE, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk_sys);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
