// channel_sequencer: the event flow of a digitizing channel, in hardware.
//
// In the original channel a DSP program runs this flow; this block performs
// the same steps with a state machine:
//   INIT      arm the trigger, then IDLE.
//   IDLE      wait for a triggered event in the FIFO (IRQ0 of the original).
//   BASE      read 2**base_log2 samples (the pre-trigger part) and sum them.
//   VALID     compute the baseline (rounded mean) and test the external
//             validation signal.
//   REJECT    no validation: restart baseline sampling; REARM waits for the
//             FIFO to drop the event, re-arms the trigger, back to IDLE.
//   SIGNAL    read n_sig more samples; each, minus the baseline, goes to the
//             shaping chain (proc_valid/proc_sample). After tr_start signal
//             samples (if tr_start != 0) the ADC input switch is turned to the
//             time-reference signal (tr_select).
//   RESTART   restart baseline sampling (FIFO back to circular mode).
//   ANALYSIS  let the shaping chain drain (FLUSH clocks).
//   OUTPUT    write the event record header into the event memory.
//   WAIT_RO   status "waiting for readout" until the acquisition system
//             sends IRQ1, which re-arms the trigger; back to IDLE.
// Every RAW_EVERY-th accepted event (event number 0, RAW_EVERY, ...) also
// stores every sample it read, one per word after the header, so that the
// complete signal can be read out for monitoring.
//
// Event record (32-bit words): 0 {event number[15:0], record length[15:0]};
// 1 {trigger sources[3:0], 3'b0, raw flag, 12'b0, baseline[11:0]};
// 2 slow-shaper amplitude; 3 fast-shaper amplitude (both with the shaper's
// fraction bits); 4 {slow peak index[15:0], fast peak index[15:0]};
// 5.. raw samples. The record layout, the level-2 trigger output (high from
// validation to the end of OUTPUT) and the single-sample validation test are
// this design's choices; the order of the steps follows the description.
//
// Timing: FIFO reads are issued back to back, one per clock while data is
// available; the FIFO returns data one clock later. Settings (cfg) may change
// only while cfg_allow is high (IDLE and WAIT_RO).
module channel_sequencer
  import digitizer_pkg::*;
#(
  parameter int unsigned DEPTH     = FIFO_DEPTH,
  parameter int unsigned RAW_N     = RAW_EVERY,
  parameter int unsigned FLUSH     = 4,
  parameter int unsigned AW        = EVM_AW
) (
  input  logic                clk,
  input  logic                rst_n,
  input  ch_cfg_t             cfg,
  output logic                cfg_allow,
  output ch_status_e          status,
  // pre-trigger FIFO
  input  logic                event_ready,
  input  logic                fifo_empty,
  output logic                fifo_rd_en,
  input  logic [ADC_W-1:0]    fifo_rd_data,
  input  logic                fifo_rd_valid,
  output logic                fifo_restart,
  // trigger section
  output logic                arm,
  input  logic [3:0]          trig_src,
  input  logic                validation,      // asynchronous
  output logic                lev2_trig,
  output logic                tr_select,
  input  logic                irq1,            // one-cycle pulse
  // shaping chain
  output logic                proc_clear,
  output logic                proc_valid,
  output logic signed [ADC_W:0] proc_sample,
  input  logic signed [31:0]  amp_slow,
  input  logic signed [31:0]  amp_fast,
  input  logic [15:0]         idx_slow,
  input  logic [15:0]         idx_fast,
  // event memory write port
  output logic                evm_we,
  output logic [AW-1:0]       evm_waddr,
  output logic [31:0]         evm_wdata,
  // counters
  output logic [15:0]         event_no,
  output logic [15:0]         reject_no
);
  typedef enum logic [3:0] {
    S_INIT, S_IDLE, S_BASE, S_VALID, S_REJECT, S_REARM, S_SIGNAL,
    S_RESTART, S_ANALYSIS, S_OUTPUT, S_WAIT_RO
  } state_e;

  localparam int unsigned TW = $clog2(DEPTH + 1) + 1;

  state_e          state;
  logic [TW-1:0]   issued, recvd, n_base, total, sig_read;
  logic [ADC_W+CNT_W-1:0] base_sum;
  logic [ADC_W-1:0] baseline;
  logic            raw_evt, valid_s;
  logic [2:0]      hcnt;
  logic [3:0]      fcnt;
  logic [TW-1:0]   limit;

  sync_bit u_sync_valid (.clk(clk), .rst_n(rst_n), .d(validation), .q(valid_s));

  always_comb begin
    logic [TW:0] t;
    n_base = TW'(1) << cfg.base_log2;
    t      = (TW+1)'(n_base) + (TW+1)'(cfg.n_sig);
    total  = (t > (TW+1)'(DEPTH)) ? TW'(DEPTH) : TW'(t);
  end

  assign limit      = (state == S_BASE) ? n_base : total;
  assign fifo_rd_en = (state == S_BASE || state == S_SIGNAL) && !fifo_empty && issued < limit;
  assign sig_read   = recvd - n_base;
  assign cfg_allow  = (state == S_IDLE) || (state == S_WAIT_RO);

  always_comb begin
    unique case (state)
      S_IDLE, S_INIT: status = ST_IDLE;
      S_WAIT_RO:      status = ST_WAIT_RO;
      default:        status = ST_ANALYZING;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_INIT;
      issued       <= '0;
      recvd        <= '0;
      base_sum     <= '0;
      baseline     <= '0;
      raw_evt      <= 1'b0;
      hcnt         <= '0;
      fcnt         <= '0;
      fifo_restart <= 1'b0;
      arm          <= 1'b0;
      lev2_trig    <= 1'b0;
      tr_select    <= 1'b0;
      proc_clear   <= 1'b0;
      proc_valid   <= 1'b0;
      proc_sample  <= '0;
      evm_we       <= 1'b0;
      evm_waddr    <= '0;
      evm_wdata    <= '0;
      event_no     <= '0;
      reject_no    <= '0;
    end else begin
      fifo_restart <= 1'b0;
      arm          <= 1'b0;
      proc_clear   <= 1'b0;
      proc_valid   <= 1'b0;
      evm_we       <= 1'b0;

      if (fifo_rd_en) issued <= issued + 1'b1;

      // samples arriving from the FIFO
      if (fifo_rd_valid) begin
        recvd <= recvd + 1'b1;
        if (recvd < n_base) base_sum <= base_sum + (ADC_W+CNT_W)'(fifo_rd_data);
        else begin
          proc_valid  <= 1'b1;
          proc_sample <= $signed({1'b0, fifo_rd_data}) - $signed({1'b0, baseline});
        end
        if (raw_evt) begin
          evm_we    <= 1'b1;
          evm_waddr <= AW'(HDR_WORDS) + AW'(recvd);
          evm_wdata <= 32'(fifo_rd_data);
        end
      end

      unique case (state)
        S_INIT: begin
          arm   <= 1'b1;
          state <= S_IDLE;
        end
        S_IDLE: begin
          if (event_ready) begin
            issued     <= '0;
            recvd      <= '0;
            base_sum   <= '0;
            raw_evt    <= (32'(event_no) % RAW_N) == 0;
            proc_clear <= 1'b1;
            state      <= S_BASE;
          end
        end
        S_BASE: begin
          if (fifo_rd_valid && recvd == n_base - 1'b1) state <= S_VALID;
        end
        S_VALID: begin
          baseline <= ADC_W'((base_sum + ((ADC_W+CNT_W)'(n_base) >> 1)) >> cfg.base_log2);
          if (valid_s) begin
            lev2_trig <= 1'b1;
            state     <= S_SIGNAL;
          end else begin
            state <= S_REJECT;
          end
        end
        S_REJECT: begin
          fifo_restart <= 1'b1;
          reject_no    <= reject_no + 1'b1;
          state        <= S_REARM;
        end
        S_REARM: begin
          // wait until the FIFO has dropped the old event, then re-arm
          if (!fifo_restart && !event_ready) begin
            arm   <= 1'b1;
            state <= S_IDLE;
          end
        end
        S_SIGNAL: begin
          if (cfg.tr_start != '0 && sig_read >= TW'(cfg.tr_start)) tr_select <= 1'b1;
          if (recvd == total) state <= S_RESTART;
        end
        S_RESTART: begin
          fifo_restart <= 1'b1;
          tr_select    <= 1'b0;
          fcnt         <= '0;
          state        <= S_ANALYSIS;
        end
        S_ANALYSIS: begin
          fcnt <= fcnt + 1'b1;
          if (fcnt == 4'(FLUSH - 1)) begin
            hcnt  <= '0;
            state <= S_OUTPUT;
          end
        end
        S_OUTPUT: begin
          evm_we    <= 1'b1;
          evm_waddr <= AW'(hcnt);
          unique case (hcnt)
            3'd0: evm_wdata <= {event_no,
                                16'(HDR_WORDS) + (raw_evt ? 16'(total) : 16'd0)};
            3'd1: evm_wdata <= {trig_src, 3'b0, raw_evt, 12'b0, baseline};
            3'd2: evm_wdata <= amp_slow;
            3'd3: evm_wdata <= amp_fast;
            default: evm_wdata <= {idx_slow, idx_fast};
          endcase
          hcnt <= hcnt + 1'b1;
          if (hcnt == 3'(HDR_WORDS - 1)) begin
            lev2_trig <= 1'b0;
            event_no  <= event_no + 1'b1;
            state     <= S_WAIT_RO;
          end
        end
        S_WAIT_RO: begin
          if (irq1) begin
            arm   <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_INIT;
      endcase
    end
  end

  // A read is never issued into an empty FIFO.
  assert property (@(posedge clk) disable iff (!rst_n) fifo_rd_en |-> !fifo_empty);
endmodule
