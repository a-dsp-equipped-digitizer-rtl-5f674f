// pretrigger_fifo: the channel's sample FIFO with a circular pre-trigger
// buffer, written at the ADC rate and read from the DSP clock domain.
//
// Behaviour that follows the description: the ADC writes a sample on every
// clock; while the channel waits for a trigger, only the most recent
// pre_len samples are kept (the first FIFO locations behave as a circular
// buffer); when a trigger is accepted the FIFO fills up to DEPTH samples in
// total, so that the first pre_len samples read always precede the trigger.
// The circular-buffer length is a run-time setting (default 512, about 4 us
// at 125 MSamples/s). A restart command from the reader empties the FIFO and
// returns it to circular-buffer mode ("restart baseline sampling").
//
// Implementation (own choice): one DEPTH-entry dual-clock RAM. The write side
// keeps a write pointer and a base pointer; in circular mode base advances with
// the write pointer once pre_len samples are held. A trigger is accepted only
// when the circular buffer is full (accepting = 1), which freezes base and
// flips a toggle flag. The reader sees the toggle through a synchronizer and
// loads its read pointer from the (now frozen) base. The write pointer crosses
// to the read side in Gray code, so rd_empty is safe across the two clocks.
// The restart command crosses as a toggle the other way.
//
// Interface: write side clk_w/rst_w_n, din (one sample per clock), trig (one
// cycle pulse), accepting (trigger may be accepted), pre_len. Read side
// clk_r/rst_r_n, rd_en when !rd_empty, rd_data valid with rd_valid one cycle
// after rd_en, event_ready (a triggered event is available), restart (pulse).
// pre_len must stay constant while the channel is armed.
module pretrigger_fifo #(
  parameter int unsigned DW    = 12,
  parameter int unsigned DEPTH = 8192
) (
  // ADC (write) clock domain
  input  logic                       clk_w,
  input  logic                       rst_w_n,
  input  logic [DW-1:0]              din,
  input  logic                       trig,
  input  logic [$clog2(DEPTH+1)-1:0] pre_len,
  output logic                       accepting,
  output logic                       full,
  // DSP (read) clock domain
  input  logic                       clk_r,
  input  logic                       rst_r_n,
  input  logic                       restart,
  output logic                       event_ready,
  input  logic                       rd_en,
  output logic                       rd_empty,
  output logic [DW-1:0]              rd_data,
  output logic                       rd_valid
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned PW = AW + 1;   // pointers carry a wrap bit

  typedef enum logic [1:0] {W_CIRC, W_FILL, W_FULL} wmode_e;

  logic [DW-1:0] mem [DEPTH];

  // ---------------- write side ----------------
  wmode_e        wmode;
  logic [PW-1:0] wptr, base, wcount;
  logic          trig_tgl, restart_tgl_w, restart_seen_w;
  logic          restart_w;
  logic [PW-1:0] wptr_gray;

  assign wcount    = wptr - base;
  assign accepting = (wmode == W_CIRC) && (wcount >= PW'(pre_len));
  assign full      = (wmode == W_FULL);
  assign restart_w = restart_tgl_w != restart_seen_w;

  always_ff @(posedge clk_w) begin
    if (wmode != W_FULL) mem[wptr[AW-1:0]] <= din;
  end

  always_ff @(posedge clk_w or negedge rst_w_n) begin
    if (!rst_w_n) begin
      wmode          <= W_CIRC;
      wptr           <= '0;
      base           <= '0;
      trig_tgl       <= 1'b0;
      restart_seen_w <= 1'b0;
      wptr_gray      <= '0;
    end else begin
      if (restart_w) begin
        restart_seen_w <= restart_tgl_w;
        wmode          <= W_CIRC;
        base           <= wptr;               // empty, start filling again
      end else begin
        unique case (wmode)
          W_CIRC: begin
            wptr <= wptr + 1'b1;
            if (trig && accepting) begin
              wmode    <= W_FILL;             // base frozen from here on
              trig_tgl <= ~trig_tgl;
            end else if (wcount >= PW'(pre_len)) begin
              base <= base + 1'b1;            // oldest sample dropped
            end
          end
          W_FILL: begin
            wptr <= wptr + 1'b1;
            if (wcount == PW'(DEPTH - 1)) wmode <= W_FULL;
          end
          default: ;                          // W_FULL: hold
        endcase
      end
      // Gray copy of the pointer as it will be after this edge
      wptr_gray <= wptr_next_gray();
    end
  end

  function automatic logic [PW-1:0] wptr_next_gray();
    logic [PW-1:0] n;
    n = (!restart_w && wmode != W_FULL) ? wptr + 1'b1 : wptr;
    return n ^ (n >> 1);
  endfunction

  // ---------------- read side ----------------
  logic [PW-1:0] rptr, wgray_s1, wgray_s2, wptr_r;
  logic          trig_tgl_r, trig_seen_r, restart_tgl_r;
  logic          loaded;

  sync_bit u_sync_trig    (.clk(clk_r), .rst_n(rst_r_n), .d(trig_tgl),      .q(trig_tgl_r));
  sync_bit u_sync_restart (.clk(clk_w), .rst_n(rst_w_n), .d(restart_tgl_r), .q(restart_tgl_w));

  always_ff @(posedge clk_r or negedge rst_r_n) begin
    if (!rst_r_n) begin
      wgray_s1 <= '0;
      wgray_s2 <= '0;
    end else begin
      wgray_s1 <= wptr_gray;
      wgray_s2 <= wgray_s1;
    end
  end

  always_comb begin
    wptr_r[PW-1] = wgray_s2[PW-1];
    for (int i = PW - 2; i >= 0; i--) wptr_r[i] = wptr_r[i+1] ^ wgray_s2[i];
  end

  assign event_ready = loaded;
  assign rd_empty    = !loaded || (rptr == wptr_r);

  always_ff @(posedge clk_r or negedge rst_r_n) begin
    if (!rst_r_n) begin
      rptr          <= '0;
      loaded        <= 1'b0;
      trig_seen_r   <= 1'b0;
      restart_tgl_r <= 1'b0;
      rd_valid      <= 1'b0;
    end else begin
      rd_valid <= 1'b0;
      if (restart) begin
        loaded        <= 1'b0;
        restart_tgl_r <= ~restart_tgl_r;
      end else if (trig_tgl_r != trig_seen_r) begin
        trig_seen_r <= trig_tgl_r;
        loaded      <= 1'b1;
        rptr        <= base;                  // stable since the trigger
      end else if (rd_en && !rd_empty) begin
        rptr     <= rptr + 1'b1;
        rd_valid <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk_r) begin
    if (rd_en && !rd_empty) rd_data <= mem[rptr[AW-1:0]];
  end

endmodule
