// tb_iir_shaper: checks the slow shaper against a floating-point evaluation
// of the same difference equation, for a step and for random input. The
// step-by-step reference uses the 16-bit coefficients as real numbers, so
// only the hardware's rounding of its state differs. A second, offline
// reference with the unrounded values b0 = 7.86560e-3, b1 = -7.86920e-3,
// a1 = 2.88372, a2 = -2.77450, a3 = 0.890625 must give a step-response peak
// within 10 % of the hardware's: the poles sit close to z = 1, and rounding
// the coefficients to 16 bits alone lowers the step gain by about 7 %. It also checks that the step response
// peaks about 4 us (31 decimated samples) after the step, that out_valid
// follows in_valid by one clock and that clear empties the history.
module tb_iir_shaper;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, out_valid;
  logic signed [16:0] x = '0;
  logic signed [31:0] y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  iir_shaper dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  real b0 = 16495.0 / 2097152.0, b1 = -16503.0 / 2097152.0;
  real a1 = 23623.0 / 8192.0, a2 = -22729.0 / 8192.0, a3 = 7296.0 / 8192.0;

  // peak of the step response with the unrounded coefficients
  function automatic real published_peak(input real h);
    real p0 = 7.86560e-3, p1 = -7.86920e-3, c1 = 2.88372, c2 = -2.77450, c3 = 0.890625;
    real u1 = 0, v1 = 0, v2 = 0, v3 = 0, v, pk = 0;
    for (int n = 0; n < 150; n++) begin
      v = p0 * h + p1 * u1 + c1 * v1 + c2 * v2 + c3 * v3;
      u1 = h; v3 = v2; v2 = v1; v1 = v;
      if (v > pk) pk = v;
    end
    return pk;
  endfunction
  real rx1, ry1, ry2, ry3;

  // push one sample and compare; returns the model output
  task automatic step_in(input int xv, input real tol, output real ym);
    ym = b0 * xv + b1 * rx1 + a1 * ry1 + a2 * ry2 + a3 * ry3;
    rx1 = xv; ry3 = ry2; ry2 = ry1; ry1 = ym;
    @(negedge clk); x = 17'(xv); in_valid = 1;
    @(negedge clk); in_valid = 0;
    check(out_valid, "out_valid one clock after in_valid");
    begin
      real yh; yh = real'(y) / 4096.0;
      if (yh - ym > tol || ym - yh > tol)
        begin checks++; failures++; $display("FAIL: y %f model %f", yh, ym); end
      else checks++;
    end
  endtask

  task automatic reset_model();
    rx1 = 0; ry1 = 0; ry2 = 0; ry3 = 0;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
  endtask

  initial begin
    real ym, pk; int pki;
    #22 rst_n = 1;
    // step of 1600 (a 100 LSB step in decimated-sum units)
    reset_model();
    pk = 0; pki = 0;
    for (int n = 0; n < 150; n++) begin
      step_in(1600, 1.0, ym);
      if (real'(y) / 4096.0 > pk) begin pk = real'(y) / 4096.0; pki = n; end
    end
    check(pki >= 29 && pki <= 33, $sformatf("step peak at sample %0d", pki));
    check(pk > 0.88 * 1600 && pk < 0.95 * 1600, $sformatf("step peak %f", pk));
    check(pk > 0.90 * published_peak(1600.0) && pk < 1.10 * published_peak(1600.0),
          $sformatf("step peak %f, unrounded coefficients %f", pk, published_peak(1600.0)));
    // random input, large amplitude
    reset_model();
    check(y == 0, "clear zeroes the output");
    for (int n = 0; n < 400; n++) begin
      int xv; xv = $signed($urandom % 20001) - 10000;
      step_in(xv, 4.0, ym);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
