// conv1_pkg -- shared numbers and types of the sparse Conv1/Pool1 engine.
//
// The engine computes the first convolution layer of a small MNIST CNN
// (Conv1 -> Pool1 -> Conv2 -> Pool2 -> FC) on INT8 data. Activations and
// weights are signed 8-bit integers, products and sums are kept in a 32-bit
// accumulator. The layer geometry follows the classic LeNet-5 first layer:
// a 28x28 single-channel image, six 5x5 kernels without padding (24x24 maps)
// and 2x2 pooling (12x12 maps). INT8 arithmetic is the network's stated
// precision; the geometry and the accumulator width are this design's choice.
package conv1_pkg;

  localparam int unsigned DATA_W  = 8;   // INT8 activations and weights
  localparam int unsigned ACC_W   = 32;  // accumulator / bias width
  localparam int unsigned IMG_DIM = 28;  // MNIST image side
  localparam int unsigned K_DIM   = 5;   // Conv1 kernel side
  localparam int unsigned N_CH    = 6;   // Conv1 output channels
  localparam int unsigned POOL    = 2;   // Pool1 window side (stride = side)

  typedef logic signed [DATA_W-1:0] act_t;
  typedef logic signed [DATA_W-1:0] wgt_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Operating modes compared in the evaluation: zero-skip alone, or
  // zero-skip plus the CE (write-enable) data gating.
  typedef enum logic {
    MODE_ZERO_SKIP    = 1'b0,
    MODE_ZERO_SKIP_CE = 1'b1
  } gate_mode_e;

endpackage
