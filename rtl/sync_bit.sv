// sync_bit: two-flip-flop synchronizer for a single level signal entering the
// clock domain of clk. The output follows the input two clock edges later.
// Used for every asynchronous input (triggers, validation) and for the toggle
// flags that carry commands between the ADC and DSP clock domains.
module sync_bit #(
  parameter logic RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
