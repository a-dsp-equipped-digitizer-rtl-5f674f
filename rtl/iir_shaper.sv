// iir_shaper: digital semi-Gaussian shaper, a constant-coefficient difference
// equation with one zero and three poles:
//
//   y[n] = b0*x[n] + b1*x[n-1] + a1*y[n-1] + a2*y[n-2] + a3*y[n-3]
//
// i.e. H(z) = (b0 + b1 z^-1) / (1 - a1 z^-1 - a2 z^-2 - a3 z^-3), evaluated at
// the decimated rate (128 ns period). The coefficients are 16-bit signed
// numbers, as in the original, held with fixed binary points: the b's with
// B_FRAC fraction bits and the a's with A_FRAC fraction bits (range +-4).
// The output and state are 32-bit words with Y_FRAC fraction bits, matching
// the 32-bit arithmetic used for stability and precision.
//
// Default coefficients: b0, b1, a1, a2 are the published values of the slow
// (about 6 us) shaper rounded to these formats (b0 = 7.86560e-3 -> 16495/2^21,
// b1 = -7.86920e-3 -> -16503/2^21, a1 = 2.88372 -> 23623/2^13,
// a2 = -2.77450 -> -22729/2^13). a3 is not available; 7296/2^13 = 0.890625
// was chosen as it keeps all poles inside the unit circle (a3 must lie
// below 1 - a1 - a2 = 0.89078 for that) with the real pole near 0.94.
//
// Arithmetic: all terms are aligned to A_FRAC+Y_FRAC fraction bits, summed
// exactly in a 64-bit accumulator, rounded (half up) to Y_FRAC bits and
// saturated to 32 bits. One output per input, registered: out_valid follows
// in_valid by one clock. clear zeroes the filter history.
module iir_shaper #(
  parameter int unsigned XW     = 17,
  parameter int unsigned B_FRAC = 21,
  parameter int unsigned A_FRAC = 13,
  parameter int unsigned Y_FRAC = 12,
  parameter logic signed [15:0] B0 = 16'sd16495,
  parameter logic signed [15:0] B1 = -16'sd16503,
  parameter logic signed [15:0] A1 = 16'sd23623,
  parameter logic signed [15:0] A2 = -16'sd22729,
  parameter logic signed [15:0] A3 = 16'sd7296
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 in_valid,
  input  logic signed [XW-1:0] x,
  output logic                 out_valid,
  output logic signed [31:0]   y
);
  localparam int unsigned F = A_FRAC + Y_FRAC;   // accumulator fraction bits
  localparam int unsigned BSHIFT = F - B_FRAC;

  initial assert (F >= B_FRAC) else $error("A_FRAC+Y_FRAC must cover B_FRAC");

  logic signed [XW-1:0] x1;
  logic signed [31:0]   y1, y2, y3;
  logic signed [63:0]   acc, rounded, y_new_w;
  logic signed [31:0]   y_new;

  always_comb begin
    acc = ((64'(B0) * 64'(x)) <<< BSHIFT)
        + ((64'(B1) * 64'(x1)) <<< BSHIFT)
        + 64'(A1) * 64'(y1)
        + 64'(A2) * 64'(y2)
        + 64'(A3) * 64'(y3);
    rounded = acc + (64'sd1 <<< (A_FRAC - 1));
    y_new_w = rounded >>> A_FRAC;
    if (y_new_w > 64'sd2147483647)       y_new = 32'sh7fffffff;
    else if (y_new_w < -64'sd2147483648) y_new = 32'sh80000000;
    else                                 y_new = y_new_w[31:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0; y1 <= '0; y2 <= '0; y3 <= '0;
      y  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (clear) begin
        x1 <= '0; y1 <= '0; y2 <= '0; y3 <= '0;
        y  <= '0;
      end else if (in_valid) begin
        x1 <= x;
        y3 <= y2;
        y2 <= y1;
        y1 <= y_new;
        y  <= y_new;
        out_valid <= 1'b1;
      end
    end
  end
endmodule
