// trigger_logic: the channel's trigger section (digital part).
//
// Four trigger sources reach the channel: the external trigger on the front
// connector, the external trigger from the mother-board ECL input, and the
// outputs of the two on-board comparators (low and high threshold). Each is
// synchronized to the ADC clock and its rising edge is a trigger request. A
// request from a source enabled in trig_mask is accepted when the channel is
// armed and the FIFO can accept it (its circular buffer is full). Acceptance
// gives a one-cycle trig pulse to the FIFO, disarms the channel and latches
// which sources fired. The DSP side re-arms the channel with a one-cycle
// arm pulse in its own clock domain; it crosses here as a toggle.
//
// Following the description: the four sources and the fact that storing and
// processing start on a trigger. Edge sensitivity, the source mask, the
// arm/disarm discipline and the latched source are this design's choices.
// Latency: trig rises three ADC clocks after the source edge (two
// synchronizer stages and the edge detector).
module trigger_logic (
  input  logic       clk,        // ADC clock
  input  logic       rst_n,
  input  logic [3:0] trig_in,    // {comp2, comp1, ext_mb, ext_front}, async
  input  logic [3:0] trig_mask,  // quasi-static setting
  input  logic       fifo_accepting,
  output logic       trig,       // to the FIFO, one cycle
  output logic       armed,
  output logic [3:0] trig_src,   // sources that fired at acceptance
  // DSP clock domain
  input  logic       clk_sys,
  input  logic       rst_sys_n,
  input  logic       arm          // one-cycle pulse
);
  logic [3:0] s, s_d, rise;
  logic       arm_tgl, arm_tgl_w, arm_seen;

  for (genvar i = 0; i < 4; i++) begin : g_sync
    sync_bit u_sync (.clk(clk), .rst_n(rst_n), .d(trig_in[i]), .q(s[i]));
  end
  sync_bit u_sync_arm (.clk(clk), .rst_n(rst_n), .d(arm_tgl), .q(arm_tgl_w));

  always_ff @(posedge clk_sys or negedge rst_sys_n) begin
    if (!rst_sys_n) arm_tgl <= 1'b0;
    else if (arm)   arm_tgl <= ~arm_tgl;
  end

  assign rise = s & ~s_d & trig_mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_d      <= '0;
      trig     <= 1'b0;
      armed    <= 1'b0;
      arm_seen <= 1'b0;
      trig_src <= '0;
    end else begin
      s_d  <= s;
      trig <= 1'b0;
      if (arm_tgl_w != arm_seen) begin
        arm_seen <= arm_tgl_w;
        armed    <= 1'b1;
      end else if (armed && fifo_accepting && |rise) begin
        trig     <= 1'b1;
        armed    <= 1'b0;
        trig_src <= rise;
      end
    end
  end
endmodule
