// digitizer_channel: the digital part of one digitizing daughter-board.
//
// Data path: ADC samples (12 bit, ADC clock, nominally 125 MHz) enter the
// pre-trigger FIFO, which keeps a circular pre-trigger buffer until the
// trigger logic accepts a trigger from one of its four sources. The
// sequencer (processing clock, nominally 80 MHz) then reads the event from
// the FIFO: first the baseline samples, then, if the event is validated, the
// signal samples minus the baseline. These go through a moving average with
// decimation by 16 (8 ns -> 128 ns) into two shaping filters of the same
// form: the slow shaper (published coefficients, peaking time of a few us)
// and the fast shaper (700 ns time constant). Peak finders give the two
// amplitudes used for pulse-shape discrimination. The sequencer writes the
// event record into the event memory, which the mother-board reads on its
// own read port, and reports the channel status.
//
// Analog parts of the board are outside: the gain and threshold codes go to
// the board's DACs, tr_select drives the switch in front of the ADC, and the
// comparator outputs come back as comp1/comp2.
//
// The fast-shaper coefficients are this design's: three equal poles at
// exp(-128 ns / 700 ns) with the zero of the slow shaper and unit peak gain
// for a step.
module digitizer_channel
  import digitizer_pkg::*;
(
  input  logic               clk_adc,
  input  logic               rst_adc_n,
  input  logic               clk_sys,
  input  logic               rst_sys_n,
  // ADC and analog front end
  input  logic [ADC_W-1:0]   adc_data,
  input  logic               comp1,          // low-threshold comparator
  input  logic               comp2,          // high-threshold comparator
  input  logic               ext_trig_front, // front connector
  input  logic               ext_trig_mb,    // mother-board ECL input
  input  logic               validation,     // common, from the mother-board
  output logic [7:0]         gain_code,
  output logic [7:0]         thr_low_code,
  output logic [7:0]         thr_high_code,
  output logic               tr_select,
  output logic               lev2_trig,
  // local bus
  input  logic               irq1,
  input  logic               cfg_wr,
  input  reg_addr_e          cfg_addr,
  input  logic [31:0]        cfg_wdata,
  output logic               cfg_busy,
  output ch_status_e         status,
  input  logic               evm_rd_en,
  input  logic [EVM_AW-1:0]  evm_raddr,
  output logic [31:0]        evm_rd_data,
  output logic [15:0]        event_no,
  output logic [15:0]        reject_no,
  output logic               armed,          // ADC clock domain
  output logic               fifo_full       // ADC clock domain
);
  localparam int unsigned XW = ADC_W + 1 + $clog2(DECIM);

  ch_cfg_t cfg;
  logic    cfg_allow;

  // trigger / FIFO
  logic trig, accepting;
  logic [3:0] trig_src;
  logic arm, event_ready, fifo_empty, fifo_rd_en, fifo_rd_valid, fifo_restart;
  logic [ADC_W-1:0] fifo_rd_data;

  // shaping chain
  logic                    proc_clear, proc_valid;
  logic signed [ADC_W:0]   proc_sample;
  logic                    dec_valid, slow_valid, fast_valid;
  logic signed [XW-1:0]    dec_data;
  logic signed [31:0]      slow_y, fast_y, amp_slow, amp_fast;
  logic [15:0]             idx_slow, idx_fast;

  // event memory
  logic              evm_we;
  logic [EVM_AW-1:0] evm_waddr;
  logic [31:0]       evm_wdata;

  assign gain_code     = cfg.gain;
  assign thr_low_code  = cfg.thr_low;
  assign thr_high_code = cfg.thr_high;

  channel_regs u_regs (
    .clk(clk_sys), .rst_n(rst_sys_n), .wr(cfg_wr), .addr(cfg_addr),
    .wdata(cfg_wdata), .allow(cfg_allow), .busy(cfg_busy), .cfg(cfg));

  trigger_logic u_trig (
    .clk(clk_adc), .rst_n(rst_adc_n),
    .trig_in({comp2, comp1, ext_trig_mb, ext_trig_front}),
    .trig_mask(cfg.trig_mask), .fifo_accepting(accepting),
    .trig(trig), .armed(armed), .trig_src(trig_src),
    .clk_sys(clk_sys), .rst_sys_n(rst_sys_n), .arm(arm));

  pretrigger_fifo #(.DW(ADC_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk_w(clk_adc), .rst_w_n(rst_adc_n), .din(adc_data), .trig(trig),
    .pre_len(cfg.pre_len), .accepting(accepting), .full(fifo_full),
    .clk_r(clk_sys), .rst_r_n(rst_sys_n), .restart(fifo_restart),
    .event_ready(event_ready), .rd_en(fifo_rd_en), .rd_empty(fifo_empty),
    .rd_data(fifo_rd_data), .rd_valid(fifo_rd_valid));

  channel_sequencer u_seq (
    .clk(clk_sys), .rst_n(rst_sys_n), .cfg(cfg), .cfg_allow(cfg_allow),
    .status(status),
    .event_ready(event_ready), .fifo_empty(fifo_empty), .fifo_rd_en(fifo_rd_en),
    .fifo_rd_data(fifo_rd_data), .fifo_rd_valid(fifo_rd_valid),
    .fifo_restart(fifo_restart),
    .arm(arm), .trig_src(trig_src), .validation(validation),
    .lev2_trig(lev2_trig), .tr_select(tr_select), .irq1(irq1),
    .proc_clear(proc_clear), .proc_valid(proc_valid), .proc_sample(proc_sample),
    .amp_slow(amp_slow), .amp_fast(amp_fast),
    .idx_slow(idx_slow), .idx_fast(idx_fast),
    .evm_we(evm_we), .evm_waddr(evm_waddr), .evm_wdata(evm_wdata),
    .event_no(event_no), .reject_no(reject_no));

  boxcar_decimator #(.IW(ADC_W + 1), .N(DECIM)) u_dec (
    .clk(clk_sys), .rst_n(rst_sys_n), .clear(proc_clear),
    .in_valid(proc_valid), .in_data(proc_sample),
    .out_valid(dec_valid), .out_data(dec_data));

  // slow shaper: published coefficients (a3 chosen, see iir_shaper)
  iir_shaper #(.XW(XW)) u_slow (
    .clk(clk_sys), .rst_n(rst_sys_n), .clear(proc_clear),
    .in_valid(dec_valid), .x(dec_data), .out_valid(slow_valid), .y(slow_y));

  // fast shaper: 700 ns semi-Gaussian, coefficients of this design
  iir_shaper #(.XW(XW), .B_FRAC(18),
               .B0(16'sd24760), .B1(-16'sd24771),
               .A1(16'sd20469), .A2(-16'sd17048), .A3(16'sd4733)) u_fast (
    .clk(clk_sys), .rst_n(rst_sys_n), .clear(proc_clear),
    .in_valid(dec_valid), .x(dec_data), .out_valid(fast_valid), .y(fast_y));

  peak_finder u_pk_slow (
    .clk(clk_sys), .rst_n(rst_sys_n), .clear(proc_clear),
    .in_valid(slow_valid), .in_data(slow_y), .peak(amp_slow), .peak_idx(idx_slow));

  peak_finder u_pk_fast (
    .clk(clk_sys), .rst_n(rst_sys_n), .clear(proc_clear),
    .in_valid(fast_valid), .in_data(fast_y), .peak(amp_fast), .peak_idx(idx_fast));

  event_memory #(.DW(32), .DEPTH(EVM_DEPTH)) u_evm (
    .clk(clk_sys), .we(evm_we), .waddr(evm_waddr), .wdata(evm_wdata),
    .rd_en(evm_rd_en), .raddr(evm_raddr), .rd_data(evm_rd_data));

endmodule
