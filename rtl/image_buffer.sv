// image_buffer -- on-chip store for one INT8 input image of Conv1.
//
// A simple one-write, one-read memory of IMG_DIM*IMG_DIM signed 8-bit pixels,
// addressed row-major (addr = row*IMG_DIM + col). The host fills it through
// the write port before a frame is started; the Conv1 sequencer then reads
// one pixel per cycle. The read is synchronous: rd_data shows the pixel
// addressed at the previous rising edge on which rd_en was high, and holds
// its value while rd_en is low so that idle cycles cause no data toggles.
// The document only says the network runs on INT8 data; the memory shape,
// the row-major order and the ports are this design's choice.
module image_buffer
  import conv1_pkg::*;
#(
  parameter int unsigned IMG = IMG_DIM,
  parameter int unsigned AW  = $clog2(IMG * IMG)
) (
  input  logic          clk,
  // host write port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  act_t          wr_data,
  // sequencer read port, one cycle latency
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output act_t          rd_data
);

  localparam int unsigned DEPTH = IMG * IMG;

  act_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_addr) < DEPTH)) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
