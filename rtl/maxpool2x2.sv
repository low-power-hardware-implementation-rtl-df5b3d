// maxpool2x2 -- Pool1: reduces each window of WIN Conv1 outputs to one.
//
// The Conv1 sequencer delivers the outputs of one pooling window back to
// back (WIN = 4 for 2x2 pooling), so no line buffer is needed: the block
// keeps a running maximum and a position counter. When the last value of a
// window arrives, the maximum of the window is registered on out_data and
// out_valid pulses for one cycle, one clock after that input. clear
// restarts the window count (used at frame start).
// The document names a Pool1 stage after Conv1; max pooling over 2x2
// windows and the streaming order are this design's choice.
module maxpool2x2
  import conv1_pkg::*;
#(
  parameter int unsigned WIN = POOL * POOL
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic in_valid,
  input  act_t in_data,
  output logic out_valid,
  output act_t out_data
);

  localparam int unsigned PW = (WIN > 1) ? $clog2(WIN) : 1;

  logic [PW-1:0] pos;
  act_t          run_max, next_max;

  assign next_max = (pos == '0 || in_data > run_max) ? in_data : run_max;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos       <= '0;
      run_max   <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (clear) begin
      pos       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        run_max <= next_max;
        if (32'(pos) == WIN - 1) begin
          pos       <= '0;
          out_valid <= 1'b1;
          out_data  <= next_max;
        end else begin
          pos <= pos + 1'b1;
        end
      end
    end
  end

endmodule
