// tb_channel_regs: checks the reset settings, that a written setting is held
// back while the channel is busy and applied as soon as it is allowed, that
// busy shows a pending write, that every register lands in its field, and
// that back-to-back writes to an idle channel are all applied.
module tb_channel_regs;
  import digitizer_pkg::*;
  logic clk = 0, rst_n = 0, wr = 0, allow = 0, busy;
  reg_addr_e addr = REG_GAIN;
  logic [31:0] wdata = '0;
  ch_cfg_t cfg;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  channel_regs dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic write(input reg_addr_e a, input logic [31:0] d);
    @(negedge clk); wr = 1; addr = a; wdata = d;
    @(negedge clk); wr = 0;
  endtask

  initial begin
    #22 rst_n = 1;
    @(negedge clk);
    check(cfg == CFG_RESET, "reset values");
    check(cfg.pre_len == 14'd512 && cfg.n_sig == 14'd7936, "default lengths");
    // held while not allowed
    write(REG_GAIN, 32'd77);
    repeat (5) @(negedge clk);
    check(busy, "busy while pending");
    check(cfg.gain == 8'd128, "not applied while busy");
    allow = 1; @(negedge clk);
    check(!busy && cfg.gain == 8'd77, "applied when allowed");
    // every field
    write(REG_THR_LOW, 32'd10);    @(negedge clk); check(cfg.thr_low == 8'd10, "thr_low");
    write(REG_THR_HIGH, 32'd200);  @(negedge clk); check(cfg.thr_high == 8'd200, "thr_high");
    write(REG_TRIG_MASK, 32'h5);   @(negedge clk); check(cfg.trig_mask == 4'h5, "mask");
    write(REG_PRE_LEN, 32'd256);   @(negedge clk); check(cfg.pre_len == 14'd256, "pre_len");
    write(REG_BASE_LOG2, 32'd7);   @(negedge clk); check(cfg.base_log2 == 4'd7, "base_log2");
    write(REG_N_SIG, 32'd1000);    @(negedge clk); check(cfg.n_sig == 14'd1000, "n_sig");
    write(REG_TR_START, 32'd300);  @(negedge clk); check(cfg.tr_start == 14'd300, "tr_start");
    check(cfg.gain == 8'd77, "other fields kept");
    // back-to-back writes while allowed are all applied
    @(negedge clk); wr = 1; addr = REG_GAIN; wdata = 32'd90;
    @(negedge clk); addr = REG_THR_LOW; wdata = 32'd11;
    @(negedge clk); addr = REG_THR_HIGH; wdata = 32'd201;
    @(negedge clk); wr = 0;
    @(negedge clk);
    check(cfg.gain == 8'd90 && cfg.thr_low == 8'd11 && cfg.thr_high == 8'd201 && !busy,
          "back-to-back writes all applied");
    // last of two pending writes wins
    allow = 0;
    write(REG_GAIN, 32'd1); write(REG_GAIN, 32'd2);
    allow = 1; @(negedge clk); @(negedge clk);
    check(cfg.gain == 8'd2, "last pending write applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
