// peak_finder: amplitude estimation on a filtered signal. Keeps the largest
// value seen since the last clear and the index (count of inputs since clear)
// at which it occurred. The amplitudes of the slow and fast shaper outputs
// are taken this way. The first input after clear is always taken.
// Timing: peak and peak_idx are updated the clock after an in_valid input.
module peak_finder #(
  parameter int unsigned W  = 32,
  parameter int unsigned IW = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic signed [W-1:0] peak,
  output logic [IW-1:0]       peak_idx
);
  logic [IW-1:0] idx;
  logic          first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      peak <= '0; peak_idx <= '0; idx <= '0; first <= 1'b1;
    end else if (clear) begin
      peak <= '0; peak_idx <= '0; idx <= '0; first <= 1'b1;
    end else if (in_valid) begin
      idx   <= idx + 1'b1;
      first <= 1'b0;
      if (first || in_data > peak) begin
        peak     <= in_data;
        peak_idx <= idx;
      end
    end
  end
endmodule
