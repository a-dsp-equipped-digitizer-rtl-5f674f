// tb_shaper_workload: runs one complete channel, at its default sizes, on
// the two kinds of signal the shaping chain was made for.
//
// Rise-time sweep: preamplifier-like pulses with a linear rise of 50 ns,
// 200 ns, 1 us, 2 us and 5 us, followed by a 50 us exponential decay,
// 1000 LSB high on a 300 LSB baseline. The slow shaper must peak later as
// the rise gets slower. Its amplitude must stay within 1 % up to a 1 us rise
// and then fall (ballistic deficit). Its
// amplitude and peak position must agree with a floating-point model of the
// baseline, the 16-sample decimation and the filter run on the same samples.
//
// CsI(Tl)-like pulses: the integrated light of a scintillator with a fast
// (0.7 us) and a slow (3.2 us) decay component. Two light mixtures are used,
// 35 % and 60 % fast component. Such a change in mixture is what tells
// particle types apart. The values are typical of CsI(Tl) and are not taken
// from a measurement. Each mixture is sent at two heights. The ratio of the
// fast to the slow amplitude must be the same at both heights and must
// differ between the mixtures by well over the measurement spread.
//
// The first event (event number 0) keeps its raw samples. From them the
// test finds where the pulse starts in a record. The trigger timing is the
// same for every event, so all the models use that position.
// ADC clock 8 ns, processing clock 12.5 ns.
module tb_shaper_workload;
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

  localparam real BASE = 300.0, DECAY = 6250.0;  // decay 50 us in 8 ns samples

  // pulse shape u samples after its start; kind 0: linear rise over p1
  // samples, kind 1: scintillator with fast fraction p1
  function automatic real shape(input int kind, input real p1, input real u);
    if (u <= 0.0) return 0.0;
    if (kind == 0) return ((u < p1) ? u / p1 : 1.0) * $exp(-((u < p1) ? 0.0 : u - p1) / DECAY);
    return (p1 * (1.0 - $exp(-u / 87.5)) + (1.0 - p1) * (1.0 - $exp(-u / 400.0))) * $exp(-u / DECAY);
  endfunction

  // ---- ADC input ----
  longint t = 0, t0 = -1;
  real amp = 0, par = 1.0;
  int kind = 0;
  always @(posedge clk_adc) begin
    real v;
    t++;
    v = BASE;
    if (t0 >= 0 && t >= t0) v += amp * shape(kind, par, real'(t - t0));
    adc_data <= 12'($rtoi(v + 0.5));
  end

  task automatic fire(input int k, input real p, input real a);
    while (!armed || !dut.accepting) @(posedge clk_adc);
    repeat (100) @(posedge clk_adc);
    kind = k; par = p; amp = a; t0 = t + 1;
    #1 ext_trig_front = 1;
    repeat (4) @(posedge clk_adc);
    #1 ext_trig_front = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk_sys); evm_rd_en = 1; evm_raddr = 14'(a);
    @(negedge clk_sys); evm_rd_en = 0; d = evm_rd_data;
  endtask

  // wait for the record, read the amplitudes, silence the input, re-arm
  task automatic take(output real as, output real af, output int is, output int ifs);
    logic [31:0] w2, w3, w4;
    int n; n = 0;
    while (status != ST_WAIT_RO && n < 40000) begin @(negedge clk_sys); n++; end
    check(status == ST_WAIT_RO, "record ready");
    rd(2, w2); rd(3, w3); rd(4, w4);
    as = real'($signed(w2)) / 4096.0; af = real'($signed(w3)) / 4096.0;
    is = int'(w4[31:16]); ifs = int'(w4[15:0]);
    amp = 0;
    repeat (600) @(negedge clk_adc);
    @(negedge clk_sys); irq1 = 1; @(negedge clk_sys); irq1 = 0;
  endtask

  function automatic real filt_peak(input real xs[$], input real b0, b1, a1, a2, a3, output int pidx);
    real x1 = 0, y1 = 0, y2 = 0, y3 = 0, y, pk = -1e30;
    pidx = 0;
    foreach (xs[n]) begin
      y = b0 * xs[n] + b1 * x1 + a1 * y1 + a2 * y2 + a3 * y3;
      x1 = xs[n]; y3 = y2; y2 = y1; y1 = y;
      if (y > pk) begin pk = y; pidx = n; end
    end
    return pk;
  endfunction

  // model of the channel for a pulse that starts at record sample `off`
  task automatic model(input int k, input real p, input real a, input int off,
                       output real ms, output real mf, output int is, output int ifs);
    real xs[$];
    int acc, cnt;
    acc = 0; cnt = 0;
    for (int i = 256; i < FIFO_DEPTH; i++) begin
      acc += $rtoi(BASE + a * shape(k, p, real'(i - off)) + 0.5) - int'(BASE);
      cnt++;
      if (cnt == DECIM) begin xs.push_back(real'(acc)); acc = 0; cnt = 0; end
    end
    ms = filt_peak(xs, 16495.0/2097152.0, -16503.0/2097152.0, 23623.0/8192.0, -22729.0/8192.0, 7296.0/8192.0, is);
    mf = filt_peak(xs, 24760.0/262144.0, -24771.0/262144.0, 20469.0/8192.0, -17048.0/8192.0, 4733.0/8192.0, ifs);
  endtask

  task automatic compare(input string what, input real hs, hf, input int his, hifs,
                         input real ms, mf, input int mis, mifs);
    check(hs > ms * 0.995 - 2.0 && hs < ms * 1.005 + 2.0, $sformatf("%s slow amplitude %f model %f", what, hs, ms));
    check(hf > mf * 0.995 - 2.0 && hf < mf * 1.005 + 2.0, $sformatf("%s fast amplitude %f model %f", what, hf, mf));
    check(his >= mis - 1 && his <= mis + 1, $sformatf("%s slow peak at %0d model %0d", what, his, mis));
    check(hifs >= mifs - 1 && hifs <= mifs + 1, $sformatf("%s fast peak at %0d model %0d", what, hifs, mifs));
  endtask

  initial begin
    automatic real rise_ns[5] = '{50.0, 200.0, 1000.0, 2000.0, 5000.0};
    automatic real frac[2] = '{0.35, 0.60};
    automatic real height[2] = '{800.0, 1600.0};
    real as[5], af[5], ms, mf, ratio[2][2], gap;
    int is[5], ifs[5], mis, mifs, off, n_rise, n_psd;
    logic [31:0] d;

    #30 rst_adc_n = 1; rst_sys_n = 1;
    n_rise = 0; n_psd = 0; off = -1;

    // ---------- rise-time sweep ----------
    for (int r = 0; r < 5; r++) begin
      fire(0, rise_ns[r] / 8.0, 1000.0);
      if (r == 0) begin
        int n; n = 0;
        while (status != ST_WAIT_RO && n < 40000) begin @(negedge clk_sys); n++; end
        rd(1, d);
        check(d[24], "first event keeps its raw samples");
        for (int i = 0; i < FIFO_DEPTH && off < 0; i++) begin
          rd(HDR_WORDS + i, d);
          if (int'(d) > int'(BASE) + 2) off = i - 1;   // first sample of the rise is u = 1
        end
        check(off >= 505 && off <= 515, $sformatf("pulse starts at record sample %0d", off));
      end
      take(as[r], af[r], is[r], ifs[r]);
      model(0, rise_ns[r] / 8.0, 1000.0, off, ms, mf, mis, mifs);
      compare($sformatf("rise %0.0f ns", rise_ns[r]), as[r], af[r], is[r], ifs[r], ms, mf, mis, mifs);
      $display("rise %6.0f ns: slow %9.1f at %0d (%0.2f us after the pulse start), fast %9.1f at %0d",
               rise_ns[r], as[r], is[r], real'(is[r]) * 0.128 - real'(off - 256) * 0.008, af[r], ifs[r]);
      n_rise++;
    end
    for (int r = 1; r < 5; r++) begin
      check(is[r] >= is[r-1], $sformatf("slow peak moves later with rise %0.0f ns", rise_ns[r]));
      if (rise_ns[r] <= 1000.0)
        check(as[r] > as[0] * 0.99 && as[r] < as[0] * 1.01, $sformatf("slow amplitude flat up to rise %0.0f ns", rise_ns[r]));
      else
        check(as[r] < as[r-1], $sformatf("slow amplitude falls with rise %0.0f ns", rise_ns[r]));
    end
    check(is[4] - is[0] >= 8, $sformatf("5 us rise delays the peak by %0d samples", is[4] - is[0]));
    check(as[4] / as[0] > 0.6 && as[4] / as[0] < 0.97,
          $sformatf("5 us rise keeps %0.3f of the amplitude", as[4] / as[0]));
    check(af[4] / af[0] < as[4] / as[0], "the fast shaper loses more to a slow rise");

    // ---------- CsI(Tl)-like pulses ----------
    for (int m = 0; m < 2; m++)
      for (int h = 0; h < 2; h++) begin
        real hs, hf;
        int his, hifs;
        fire(1, frac[m], height[h]);
        take(hs, hf, his, hifs);
        model(1, frac[m], height[h], off, ms, mf, mis, mifs);
        compare($sformatf("fast fraction %0.2f height %0.0f", frac[m], height[h]), hs, hf, his, hifs, ms, mf, mis, mifs);
        ratio[m][h] = hf / hs;
        $display("fast fraction %0.2f height %5.0f: A_s %9.1f A_f %9.1f A_f/A_s %0.4f",
                 frac[m], height[h], hs, hf, ratio[m][h]);
        n_psd++;
      end
    for (int m = 0; m < 2; m++)
      check(ratio[m][1] > ratio[m][0] * 0.99 && ratio[m][1] < ratio[m][0] * 1.01,
            $sformatf("ratio independent of height for fraction %0.2f", frac[m]));
    gap = ratio[1][0] / ratio[0][0];
    check(gap > 1.05, $sformatf("mixtures separated, ratio of ratios %0.3f", gap));
    check(reject_no == 0 && event_no == 16'(n_rise + n_psd), $sformatf("%0d events recorded", event_no));
    $display("mechanisms: rise-time events %0d, scintillator events %0d", n_rise, n_psd);
    check(n_rise == 5 && n_psd == 4, "every workload event ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk_sys);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
