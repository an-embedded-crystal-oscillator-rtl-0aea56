// sensor_fifo: the 512 x 8-bit FIFO of the wireless sensor node.
//
// It stores the sensed body-signal samples while the transmitter's power domain sleeps;
// "full" marks that the data storage is complete, which wakes the transmitter, and the
// transmitter then drains it. The FIFO sits in an always-on domain. Depth and width follow
// the node's specification; the organisation (one clock, circular buffer with read/write
// pointers one bit wider than the address, registered read data) is this design's choice.
//
// Interface / timing: a write with wr_en stores wr_data on the clk edge unless the FIFO is
// full; a read with rd_en presents the oldest word on rd_data after that edge unless it is
// empty. Reads and writes in the same cycle are both served. count is the fill level.
module sensor_fifo #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign count = wr_ptr - rd_ptr;
  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr  <= '0;
      rd_ptr  <= '0;
      rd_data <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) begin
        rd_ptr  <= rd_ptr + 1'b1;
        rd_data <= mem[rd_ptr[AW-1:0]];
      end
    end
  end

endmodule
