// multi_event_fifo: the mother-board's 32-bit multi-event FIFO used in FAIR
// mode. Whole event records from the channels are written into it and the
// readout bus pops them at its own pace, so several events can be buffered
// for event building. Synchronous FIFO, one clock; dout is valid the clock
// after a rd_en on a non-empty FIFO. Writes into a full FIFO and reads from
// an empty one are ignored (and flagged by assertions). The depth (4096
// words) is this design's choice.
module multi_event_fifo #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 4096
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [DW-1:0]              din,
  input  logic                       rd_en,
  output logic [DW-1:0]              dout,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= din;
    if (do_rd) dout <= mem[rptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      count <= count + ($clog2(DEPTH+1))'(do_wr) - ($clog2(DEPTH+1))'(do_rd);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full))
    else $error("multi_event_fifo: write while full");
  assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty))
    else $error("multi_event_fifo: read while empty");
endmodule
