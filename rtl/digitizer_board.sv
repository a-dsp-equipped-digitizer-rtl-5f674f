// digitizer_board: a VME mother-board carrying N_CH digitizing channels
// (eight at most on the real board), their local bus and the readout
// interface.
//
// Each channel samples its detector signal continuously into a pre-trigger
// FIFO, and on a trigger extracts the baseline and the slow and fast shaper
// amplitudes of the pulse, storing a short event record in its own memory
// (plus the full signal every 256th event). The board turns the readout bus
// into the channels' local bus: in VME mode the acquisition system reads
// records and re-arms channels itself; in FAIR mode the board copies every
// finished record into a 32-bit multi-event FIFO and re-arms the channel.
//
// Board-level signals follow the description: the per-channel ECL trigger
// inputs, the validation signal common to all channels, the time-reference
// switch control of each channel and the VME/FAIR mode jumper (mode_fair).
// The time-reference signal itself is analog and reaches the ADCs outside
// this logic. Each channel has its own ADC clock (clk_adc[c]); all
// processing logic and the board run on clk_sys, a choice of this design
// (the original local bus is asynchronous to the channel processors).
// All resets are active low and asynchronous.
module digitizer_board
  import digitizer_pkg::*;
#(
  parameter int unsigned N_CH      = 8,
  parameter int unsigned MEF_DEPTH = 4096,
  parameter int unsigned CB        = (N_CH > 1) ? $clog2(N_CH) : 1,
  parameter int unsigned ADDR_W    = 1 + CB + EVM_AW
) (
  input  logic                    clk_sys,
  input  logic                    rst_sys_n,
  input  logic [N_CH-1:0]         clk_adc,
  input  logic [N_CH-1:0]         rst_adc_n,
  input  logic                    mode_fair,       // VME/FAIR jumper
  // per-channel analog front end and trigger inputs
  input  logic [ADC_W-1:0]        adc_data [N_CH],
  input  logic [N_CH-1:0]         comp1,
  input  logic [N_CH-1:0]         comp2,
  input  logic [N_CH-1:0]         ext_trig_front,
  input  logic [N_CH-1:0]         ecl_trig,        // mother-board ECL inputs
  input  logic                    validation,      // common to all channels
  output logic [7:0]              gain_code     [N_CH],
  output logic [7:0]              thr_low_code  [N_CH],
  output logic [7:0]              thr_high_code [N_CH],
  output logic [N_CH-1:0]         tr_select,
  output logic [N_CH-1:0]         lev2_trig,
  output logic [N_CH-1:0]         armed,
  output logic [N_CH-1:0]         fifo_full,
  output ch_status_e              ch_status     [N_CH],
  output logic [15:0]             event_no      [N_CH],
  output logic [15:0]             reject_no     [N_CH],
  // readout bus (host) port
  input  logic                    host_req,
  input  logic                    host_we,
  input  logic [ADDR_W-1:0]       host_addr,
  input  logic [31:0]             host_wdata,
  output logic                    host_ack,
  output logic [31:0]             host_rdata,
  output logic [15:0]             events_built,
  output logic                    mef_full,        // multi-event FIFO flags,
  output logic                    mef_empty        // for the readout bus side
);
  logic [N_CH-1:0]   ch_irq1, ch_cfg_wr, ch_cfg_busy, evm_rd_en;
  reg_addr_e         cfg_addr;
  logic [31:0]       cfg_wdata;
  logic [EVM_AW-1:0] evm_raddr;
  logic [31:0]       evm_rd_data [N_CH];

  logic        mef_wr, mef_rd;
  logic [31:0] mef_din, mef_dout;
  logic [$clog2(MEF_DEPTH+1)-1:0] mef_count;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    digitizer_channel u_ch (
      .clk_adc(clk_adc[c]), .rst_adc_n(rst_adc_n[c]),
      .clk_sys(clk_sys), .rst_sys_n(rst_sys_n),
      .adc_data(adc_data[c]), .comp1(comp1[c]), .comp2(comp2[c]),
      .ext_trig_front(ext_trig_front[c]), .ext_trig_mb(ecl_trig[c]),
      .validation(validation),
      .gain_code(gain_code[c]), .thr_low_code(thr_low_code[c]),
      .thr_high_code(thr_high_code[c]),
      .tr_select(tr_select[c]), .lev2_trig(lev2_trig[c]),
      .irq1(ch_irq1[c]), .cfg_wr(ch_cfg_wr[c]), .cfg_addr(cfg_addr),
      .cfg_wdata(cfg_wdata), .cfg_busy(ch_cfg_busy[c]), .status(ch_status[c]),
      .evm_rd_en(evm_rd_en[c]), .evm_raddr(evm_raddr), .evm_rd_data(evm_rd_data[c]),
      .event_no(event_no[c]), .reject_no(reject_no[c]),
      .armed(armed[c]), .fifo_full(fifo_full[c]));
  end

  readout_controller #(.N_CH(N_CH), .MEF_DEPTH(MEF_DEPTH)) u_ro (
    .clk(clk_sys), .rst_n(rst_sys_n), .mode_fair(mode_fair),
    .host_req(host_req), .host_we(host_we), .host_addr(host_addr),
    .host_wdata(host_wdata), .host_ack(host_ack), .host_rdata(host_rdata),
    .ch_status(ch_status), .ch_cfg_busy(ch_cfg_busy), .ch_irq1(ch_irq1),
    .ch_cfg_wr(ch_cfg_wr), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
    .evm_rd_en(evm_rd_en), .evm_raddr(evm_raddr), .evm_rd_data(evm_rd_data),
    .mef_wr(mef_wr), .mef_din(mef_din), .mef_rd(mef_rd), .mef_dout(mef_dout),
    .mef_count(mef_count), .events_built(events_built));

  multi_event_fifo #(.DW(32), .DEPTH(MEF_DEPTH)) u_mef (
    .clk(clk_sys), .rst_n(rst_sys_n), .wr_en(mef_wr), .din(mef_din),
    .rd_en(mef_rd), .dout(mef_dout), .full(mef_full), .empty(mef_empty),
    .count(mef_count));

endmodule
