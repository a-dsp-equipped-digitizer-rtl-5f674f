// digitizer_pkg: types and constants shared by the digitizer channel and the
// mother-board logic.
//
// Sizes that come from the design description: 12-bit ADC samples, an
// 8192-sample channel FIFO, a 512-sample default pre-trigger (circular) buffer,
// decimation by 16 ahead of the shaping filters, 8-bit DAC codes for the
// 255-step gain and threshold settings, 16-bit filter coefficients, a full
// raw signal transferred once every 256 events, and the three channel states
// (idle, analyzing, waiting for readout). The register map, the event record
// layout and the default settings are this design's own choices.
package digitizer_pkg;

  localparam int unsigned ADC_W        = 12;    // ADC resolution
  localparam int unsigned FIFO_DEPTH   = 8192;  // channel FIFO, samples
  localparam int unsigned PRE_LEN_DEF  = 512;   // default circular-buffer length
  localparam int unsigned BASE_LEN_DEF = 256;   // default baseline samples
  localparam int unsigned DECIM        = 16;    // moving average + decimation
  localparam int unsigned RAW_EVERY    = 256;   // full signal kept every N events
  localparam int unsigned CNT_W        = 14;    // sample counters (0..8192)
  localparam int unsigned EVM_DEPTH    = 16384; // event memory, 32-bit words
  localparam int unsigned EVM_AW       = 14;
  localparam int unsigned HDR_WORDS    = 5;     // event record header length

  // Channel status as seen by the acquisition system on the local bus.
  typedef enum logic [1:0] {
    ST_IDLE      = 2'd0,
    ST_ANALYZING = 2'd1,
    ST_WAIT_RO   = 2'd2
  } ch_status_e;

  // Trigger source bits (trigger mask and latched source).
  localparam int unsigned TRG_EXT_FRONT = 0; // front connector input
  localparam int unsigned TRG_EXT_MB    = 1; // mother-board ECL input
  localparam int unsigned TRG_COMP1     = 2; // low-threshold comparator
  localparam int unsigned TRG_COMP2     = 3; // high-threshold comparator

  // Slow-control register addresses (written through the IRQE path).
  typedef enum logic [3:0] {
    REG_GAIN      = 4'd0,  // programmable-gain amplifier code, 1..255
    REG_THR_LOW   = 4'd1,  // low-threshold comparator DAC code
    REG_THR_HIGH  = 4'd2,  // high-threshold comparator DAC code
    REG_TRIG_MASK = 4'd3,  // enabled trigger sources
    REG_PRE_LEN   = 4'd4,  // circular-buffer length, samples
    REG_BASE_LOG2 = 4'd5,  // baseline samples = 2**value
    REG_N_SIG     = 4'd6,  // samples read after the baseline
    REG_TR_START  = 4'd7   // signal samples before switching to TR (0: never)
  } reg_addr_e;

  typedef struct packed {
    logic [7:0]       gain;
    logic [7:0]       thr_low;
    logic [7:0]       thr_high;
    logic [3:0]       trig_mask;
    logic [CNT_W-1:0] pre_len;
    logic [3:0]       base_log2;
    logic [CNT_W-1:0] n_sig;
    logic [CNT_W-1:0] tr_start;
  } ch_cfg_t;

  localparam ch_cfg_t CFG_RESET = '{
    gain:      8'd128,
    thr_low:   8'd32,
    thr_high:  8'd255,
    trig_mask: 4'b1111,
    pre_len:   CNT_W'(PRE_LEN_DEF),
    base_log2: 4'd8,
    n_sig:     CNT_W'(FIFO_DEPTH - BASE_LEN_DEF),
    tr_start:  '0
  };

endpackage
