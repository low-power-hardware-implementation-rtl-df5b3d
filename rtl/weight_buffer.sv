// weight_buffer -- pruned Conv1 weights with a non-zero bitmap, plus biases.
//
// Holds N_CH*K*K signed 8-bit weights, stored channel-major and then
// row-major inside a kernel (addr = ch*K*K + ky*K + kx), and one 32-bit
// bias per output channel. Next to the weight array sits a bitmap with one
// bit per weight that is set when the weight is non-zero; the bit is
// computed when the weight is written. Reading the bitmap is a single
// register lookup, so each cycle tells at once whether the MAC has work:
// this is the single-cycle zero detection that drives zero-skipping.
//
// Read port timing: rd_en/rd_addr at edge t give rd_nz and rd_wgt after
// edge t. The weight register is only loaded when the bitmap bit is set,
// so a pruned (zero) weight leaves rd_wgt unchanged and the multiplier
// operand does not toggle; consumers must qualify rd_wgt with rd_nz.
// The bitmap is cleared by reset, so weights never written read as zero.
// The bias is read combinationally by channel.
// The bitmap index and its use for zero detection come from the document;
// the layout, widths and port set are this design's choice.
module weight_buffer
  import conv1_pkg::*;
#(
  parameter int unsigned CH  = N_CH,
  parameter int unsigned K   = K_DIM,
  parameter int unsigned AW  = $clog2(CH * K * K),
  parameter int unsigned CW  = (CH > 1) ? $clog2(CH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // host write ports
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  wgt_t          wr_data,
  input  logic          bias_wr_en,
  input  logic [CW-1:0] bias_wr_ch,
  input  acc_t          bias_wr_data,
  // sequencer read port, one cycle latency
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output wgt_t          rd_wgt,
  output logic          rd_nz,
  // bias read, combinational
  input  logic [CW-1:0] bias_rd_ch,
  output acc_t          bias_rd_data,
  // number of non-zero weights currently stored (for sparsity readout)
  output logic [AW:0]   nz_count
);

  localparam int unsigned DEPTH = CH * K * K;

  wgt_t              mem [DEPTH];
  logic [DEPTH-1:0]  bitmap;
  acc_t              bias [CH];

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_addr) < DEPTH)) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitmap <= '0;
    end else if (wr_en && (32'(wr_addr) < DEPTH)) begin
      bitmap[wr_addr] <= (wr_data != '0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(CH); i++) bias[i] <= '0;
    end else if (bias_wr_en && (32'(bias_wr_ch) < CH)) begin
      bias[bias_wr_ch] <= bias_wr_data;
    end
  end

  // Bitmap lookup: the zero test costs one bit read, not an 8-bit compare.
  logic hit_nz;
  assign hit_nz = (32'(rd_addr) < DEPTH) ? bitmap[rd_addr] : 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rd_nz <= 1'b0;
    else if (rd_en) rd_nz <= hit_nz;
  end

  // Weight register loads only for non-zero weights (operand isolation).
  always_ff @(posedge clk) begin
    if (rd_en && hit_nz) rd_wgt <= mem[rd_addr];
  end

  assign bias_rd_data = (32'(bias_rd_ch) < CH) ? bias[bias_rd_ch] : '0;

  always_comb begin
    nz_count = '0;
    for (int i = 0; i < int'(DEPTH); i++) nz_count += (AW+1)'(bitmap[i]);
  end

endmodule
