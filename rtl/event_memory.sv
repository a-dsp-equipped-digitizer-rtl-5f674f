// event_memory: the part of the DSP's internal data memory that holds the
// readout record of an event. The processing side writes the record; the
// mother-board reads it through the local bus without involving the
// processing side (the role of the DSP's direct memory access port).
// Simple dual-port RAM, one write port and one read port on the same clock;
// rd_data is valid the clock after rd_en. 32-bit words, 16384 deep by
// default (64 kB, within the 192 kB of on-chip RAM of the original DSP).
module event_memory #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 16384
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [DW-1:0]            wdata,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [DW-1:0]            rd_data
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[raddr];
  end
endmodule
