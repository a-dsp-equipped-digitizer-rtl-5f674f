// channel_regs: slow-control settings of one channel (gain, comparator
// thresholds, trigger sources, circular-buffer length and algorithm
// parameters).
//
// In the original channel these are changed by a slow-control interrupt
// routine that runs only between events. Here a host write (wr, addr, wdata)
// is parked in a one-entry pending slot (busy = 1) and applied on the first
// clock where the sequencer allows it (allow = 1, i.e. the channel is not
// processing an event). A write in the same clock as the pending one is
// applied takes the slot, so back-to-back writes to an idle channel are all
// applied; a write while the slot is still held (channel processing)
// replaces the pending one, and the host should wait for busy = 0. The gain
// and threshold codes drive the channel's DACs directly. Reset values are
// digitizer_pkg::CFG_RESET. The pending-slot mechanism is this design's own.
module channel_regs
  import digitizer_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr,
  input  reg_addr_e   addr,
  input  logic [31:0] wdata,
  input  logic        allow,
  output logic        busy,
  output ch_cfg_t     cfg
);
  reg_addr_e   p_addr;
  logic [31:0] p_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg    <= CFG_RESET;
      busy   <= 1'b0;
      p_addr <= REG_GAIN;
      p_data <= '0;
    end else begin
      if (busy && allow) begin
        busy <= 1'b0;
        unique case (p_addr)
          REG_GAIN:      cfg.gain      <= p_data[7:0];
          REG_THR_LOW:   cfg.thr_low   <= p_data[7:0];
          REG_THR_HIGH:  cfg.thr_high  <= p_data[7:0];
          REG_TRIG_MASK: cfg.trig_mask <= p_data[3:0];
          REG_PRE_LEN:   cfg.pre_len   <= p_data[CNT_W-1:0];
          REG_BASE_LOG2: cfg.base_log2 <= p_data[3:0];
          REG_N_SIG:     cfg.n_sig     <= p_data[CNT_W-1:0];
          REG_TR_START:  cfg.tr_start  <= p_data[CNT_W-1:0];
          default: ;
        endcase
      end
      if (wr) begin
        busy   <= 1'b1;
        p_addr <= addr;
        p_data <= wdata;
      end
    end
  end
endmodule
