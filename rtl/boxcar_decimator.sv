// boxcar_decimator: moving average followed by decimation by N.
//
// The shaping filters run on a signal whose sampling period is stretched from
// 8 ns to 128 ns: the samples are averaged and only every 16th average is
// kept. With the average taken over the same N samples that one output
// replaces, this is a sum over consecutive, non-overlapping blocks of N input
// samples; the output is that sum, i.e. the mean with log2(N) extra fraction
// bits, so no precision is lost. The averaging length equal to the decimation
// factor is this design's choice.
//
// Timing: one input per clock at most (in_valid). out_valid pulses for one
// clock, one clock after the N-th input of a block. clear restarts the block
// (a partial block is dropped).
module boxcar_decimator #(
  parameter int unsigned IW = 13,           // signed input width
  parameter int unsigned N  = 16,           // decimation factor, power of two
  parameter int unsigned OW = IW + $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_data,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_data
);
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  logic signed [OW-1:0] acc;
  logic [CW-1:0]        cnt;

  initial assert (N >= 2 && (N & (N - 1)) == 0) else $error("N must be a power of two");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (clear) begin
        acc <= '0;
        cnt <= '0;
      end else if (in_valid) begin
        if (cnt == CW'(N - 1)) begin
          out_data  <= acc + OW'(in_data);
          out_valid <= 1'b1;
          acc       <= '0;
        end else begin
          acc <= acc + OW'(in_data);
        end
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
