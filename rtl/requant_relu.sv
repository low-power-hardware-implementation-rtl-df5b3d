// requant_relu -- turns a Conv1 accumulator back into an INT8 activation.
//
// y = clamp((acc + bias) >>> shift, 0, 127): the channel bias is added in
// full 32-bit precision (one extra bit guards the sum), the sum is scaled
// down by an arithmetic right shift of 0..31 bits (rounding toward minus
// infinity), negative values become 0 (ReLU) and values above 127 saturate
// at 127. Purely combinational. Flags report which rule fired: relu when a
// negative value was zeroed, sat when a value was clipped to 127.
// The document states that the network is quantized to INT8 with
// integer-only inference; the power-of-two scale, the floor rounding and
// the ReLU placement are this design's choice.
module requant_relu
  import conv1_pkg::*;
(
  input  acc_t       acc,
  input  acc_t       bias,
  input  logic [4:0] shift,
  output act_t       y,
  output logic       relu,
  output logic       sat
);

  localparam int signed QMAX = (1 <<< (DATA_W - 1)) - 1;  // 127

  logic signed [ACC_W:0] sum, scaled;

  assign sum    = (ACC_W+1)'(acc) + (ACC_W+1)'(bias);
  assign scaled = sum >>> shift;

  always_comb begin
    relu = 1'b0;
    sat  = 1'b0;
    if (scaled < 0) begin
      y    = '0;
      relu = 1'b1;
    end else if (scaled > (ACC_W+1)'(QMAX)) begin
      y    = act_t'(QMAX);
      sat  = 1'b1;
    end else begin
      y    = act_t'(scaled);
    end
  end

endmodule
