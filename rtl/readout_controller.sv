// readout_controller: the mother-board's bridge between the readout bus and
// the channels' local bus.
//
// The readout bus is represented by a simple synchronous host port: a request
// (host_req, host_we, host_addr, host_wdata) is answered one clock later by
// host_ack with host_rdata. Word address map (CB = channel-select bits):
//   addr[MSB] = 0, channel c = addr[EVM_AW +: CB], offset o = addr[EVM_AW-1:0]
//     read  o        event memory word o of channel c (VME mode; 0 in FAIR
//                    mode, where the memories belong to the event builder)
//     write o < 16   slow-control register o of channel c
//     write o = 256  IRQ1 to channel c: event read out, re-arm the channel
//   addr[MSB] = 1 (board space), offset o
//     read  0        status of all channels, 2 bits each (channel 0 lowest)
//     read  1        pop one word from the multi-event FIFO
//     read  2        multi-event FIFO word count
//     read  3        {mode_fair, 15'b0, slow-control busy bits}
//
// VME mode (mode_fair = 0): the acquisition system polls the status, reads
// the event records itself and sends IRQ1. FAIR mode (mode_fair = 1): an
// event builder scans the channels in turn; for a channel waiting for
// readout it reads the record length from word 0, writes a board header
// word {4'hE, channel[3:0], 8'h00, length[15:0]} and then the whole record
// into the multi-event FIFO, and sends IRQ1 to the channel. Reads of the
// event memory are issued back to back as long as the FIFO has room.
//
// The two modes and the multi-event FIFO follow the description; the bus
// protocols of VME and FAIR themselves are not modelled, and the address
// map, the board header and the scan order are this design's choices.
// Register address and data go to all channels straight from the host port
// (cfg_addr, cfg_wdata); only the per-channel write strobe is decoded.
module readout_controller
  import digitizer_pkg::*;
#(
  parameter int unsigned N_CH     = 8,
  parameter int unsigned MEF_DEPTH = 4096,
  parameter int unsigned CB       = (N_CH > 1) ? $clog2(N_CH) : 1,
  parameter int unsigned ADDR_W   = 1 + CB + EVM_AW
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           mode_fair,
  // host (readout bus) port
  input  logic                           host_req,
  input  logic                           host_we,
  input  logic [ADDR_W-1:0]              host_addr,
  input  logic [31:0]                    host_wdata,
  output logic                           host_ack,
  output logic [31:0]                    host_rdata,
  // channel local bus
  input  ch_status_e                     ch_status   [N_CH],
  input  logic [N_CH-1:0]                ch_cfg_busy,
  output logic [N_CH-1:0]                ch_irq1,
  output logic [N_CH-1:0]                ch_cfg_wr,
  output reg_addr_e                      cfg_addr,
  output logic [31:0]                    cfg_wdata,
  output logic [N_CH-1:0]                evm_rd_en,
  output logic [EVM_AW-1:0]              evm_raddr,
  input  logic [31:0]                    evm_rd_data [N_CH],
  // multi-event FIFO
  output logic                           mef_wr,
  output logic [31:0]                    mef_din,
  output logic                           mef_rd,
  input  logic [31:0]                    mef_dout,
  input  logic [$clog2(MEF_DEPTH+1)-1:0] mef_count,
  output logic [15:0]                    events_built
);
  localparam logic [EVM_AW-1:0] OFF_IRQ1 = EVM_AW'(256);

  typedef enum logic [2:0] {B_SCAN, B_LEN0, B_LEN1, B_HDR, B_COPY, B_IRQ, B_WAIT} bstate_e;
  typedef enum logic [1:0] {R_NONE, R_EVM, R_MEF, R_REG} rkind_e;

  // ---------------- host decode ----------------
  logic              is_board;
  logic [CB-1:0]     h_ch;
  logic [EVM_AW-1:0] h_off;
  rkind_e            rkind;
  logic [CB-1:0]     rch;
  logic [31:0]       reg_rdata;
  logic              host_evm_rd, host_mef_rd;

  assign is_board    = host_addr[ADDR_W-1];
  assign h_ch        = host_addr[EVM_AW +: CB];
  assign h_off       = host_addr[EVM_AW-1:0];
  assign host_evm_rd = host_req && !host_we && !is_board && !mode_fair;
  assign host_mef_rd = host_req && !host_we && is_board && h_off == 1 && mef_count != 0;

  // ---------------- event builder ----------------
  bstate_e       bstate;
  logic [CB-1:0] bch;
  logic [15:0]   blen, bissued, brecvd;
  logic          binflight;
  logic          b_rd;

  assign b_rd = (bstate == B_COPY) && bissued < blen &&
                (32'(mef_count) + 32'(binflight)) < MEF_DEPTH;

  always_comb begin
    evm_rd_en = '0;
    evm_raddr = h_off;
    if (mode_fair) begin
      if (bstate == B_LEN0) begin
        evm_rd_en[bch] = 1'b1;
        evm_raddr      = '0;
      end else if (b_rd) begin
        evm_rd_en[bch] = 1'b1;
        evm_raddr      = EVM_AW'(bissued);
      end
    end else if (host_evm_rd) begin
      evm_rd_en[h_ch] = 1'b1;
    end
  end

  always_comb begin
    mef_wr  = 1'b0;
    mef_din = evm_rd_data[bch];
    if (bstate == B_HDR && 32'(mef_count) < MEF_DEPTH) begin
      mef_wr  = 1'b1;
      mef_din = {4'hE, 4'(bch), 8'h00, blen};
    end else if (bstate == B_COPY && binflight) begin
      mef_wr = 1'b1;
    end
  end
  assign mef_rd = host_mef_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bstate       <= B_SCAN;
      bch          <= '0;
      blen         <= '0;
      bissued      <= '0;
      brecvd       <= '0;
      binflight    <= 1'b0;
      events_built <= '0;
    end else begin
      binflight <= b_rd;
      unique case (bstate)
        B_SCAN: begin
          if (mode_fair && ch_status[bch] == ST_WAIT_RO) bstate <= B_LEN0;
          else bch <= (32'(bch) == N_CH - 1) ? '0 : bch + 1'b1;
        end
        B_LEN0: bstate <= B_LEN1;
        B_LEN1: begin
          blen   <= evm_rd_data[bch][15:0];
          bstate <= B_HDR;
        end
        B_HDR: begin
          if (mef_wr) begin
            bissued <= '0;
            brecvd  <= '0;
            bstate  <= B_COPY;
          end
        end
        B_COPY: begin
          if (b_rd) bissued <= bissued + 1'b1;
          if (binflight) brecvd <= brecvd + 1'b1;
          if (brecvd == blen) bstate <= B_IRQ;
        end
        B_IRQ: begin
          events_built <= events_built + 1'b1;
          bstate       <= B_WAIT;
        end
        B_WAIT: begin
          if (ch_status[bch] != ST_WAIT_RO) begin
            bch    <= (32'(bch) == N_CH - 1) ? '0 : bch + 1'b1;
            bstate <= B_SCAN;
          end
        end
        default: bstate <= B_SCAN;
      endcase
    end
  end

  // ---------------- channel commands ----------------
  always_comb begin
    ch_irq1   = '0;
    ch_cfg_wr = '0;
    cfg_addr  = reg_addr_e'(h_off[3:0]);
    cfg_wdata = host_wdata;
    if (bstate == B_IRQ) ch_irq1[bch] = 1'b1;
    if (host_req && host_we && !is_board) begin
      if (h_off < 16)           ch_cfg_wr[h_ch] = 1'b1;
      else if (h_off == OFF_IRQ1) ch_irq1[h_ch] = 1'b1;
    end
  end

  // ---------------- host response ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      host_ack  <= 1'b0;
      rkind     <= R_NONE;
      rch       <= '0;
      reg_rdata <= '0;
    end else begin
      host_ack  <= host_req;
      rkind     <= R_NONE;
      rch       <= h_ch;
      reg_rdata <= '0;
      if (host_req && !host_we) begin
        if (!is_board) rkind <= mode_fair ? R_REG : R_EVM;
        else if (h_off == 1) rkind <= (mef_count != 0) ? R_MEF : R_REG;
        else begin
          rkind <= R_REG;
          unique case (h_off)
            0: for (int c = 0; c < N_CH && c < 16; c++) reg_rdata[2*c +: 2] <= ch_status[c];
            2: reg_rdata <= 32'(mef_count);
            3: reg_rdata <= {mode_fair, 15'b0, 16'(ch_cfg_busy)};
            default: ;
          endcase
        end
      end
    end
  end

  always_comb begin
    unique case (rkind)
      R_EVM:   host_rdata = evm_rd_data[rch];
      R_MEF:   host_rdata = mef_dout;
      default: host_rdata = reg_rdata;
    endcase
  end
endmodule
