// conv1_pool1_top -- sparse INT8 Conv1 + Pool1 engine for MNIST with
// zero-skipping and optional CE data gating.
//
// The host loads one image into the image buffer and the magnitude-pruned
// Conv1 weights and biases into the weight buffer, then pulses start. The
// sequencer issues one kernel tap per cycle; the buffers answer one cycle
// later. In that cycle the weight's bitmap bit decides whether the MAC has
// work (zero-skip), and the consecutive-zero detector decides whether the
// MAC registers may be written (CE, only in MODE_ZERO_SKIP_CE). Every
// finished dot product is requantized to INT8 with ReLU and passed to the
// 2x2 max pool, whose results leave on the out_* stream, channel by
// channel, row by row.
//
// Timing: frame_cycles (start to done) = CH*(IMG-K+1)^2*K*K + 4 cycles, the
// same for every sparsity and mode: 86 404 cycles for the default 6x5x5
// kernels on a 28x28 image. out_valid pulses once per pooled value
// (CH*12*12 = 864 values); done pulses together with the last one.
// mode and shift are sampled at start. Loads must not overlap a frame.
//
// Activity counters, cleared at start: skipped_cycles (taps with a zero
// weight), gated_cycles (taps blocked by CE), mac_cycles (taps multiplied).
// The structure Conv1 -> Pool1, INT8 data, bitmap zero detection and CE as
// a write enable follow the document; sizes, schedule, requantization and
// ports are this design's choice.
module conv1_pool1_top
  import conv1_pkg::*;
#(
  parameter int unsigned IMG  = IMG_DIM,
  parameter int unsigned K    = K_DIM,
  parameter int unsigned CH   = N_CH,
  parameter int unsigned P    = POOL,
  parameter int unsigned ZRUN = 2,
  parameter int unsigned IAW  = $clog2(IMG * IMG),
  parameter int unsigned WAW  = $clog2(CH * K * K),
  parameter int unsigned CW   = (CH > 1) ? $clog2(CH) : 1,
  parameter int unsigned PW   = $clog2((IMG - K + 1) / P)
) (
  input  logic           clk,
  input  logic           rst_n,
  // image load
  input  logic           img_wr_en,
  input  logic [IAW-1:0] img_wr_addr,
  input  act_t           img_wr_data,
  // weight and bias load
  input  logic           w_wr_en,
  input  logic [WAW-1:0] w_wr_addr,
  input  wgt_t           w_wr_data,
  input  logic           bias_wr_en,
  input  logic [CW-1:0]  bias_wr_ch,
  input  acc_t           bias_wr_data,
  // control and configuration
  input  logic           start,
  input  gate_mode_e     mode,
  input  logic [4:0]     shift,
  output logic           busy,
  output logic           done,
  // pooled output stream
  output logic           out_valid,
  output logic [CW-1:0]  out_ch,
  output logic [PW-1:0]  out_row,
  output logic [PW-1:0]  out_col,
  output act_t           out_data,
  // activity statistics of the last frame
  output logic [31:0]    skipped_cycles,
  output logic [31:0]    gated_cycles,
  output logic [31:0]    mac_cycles,
  output logic [31:0]    frame_cycles,
  output logic [WAW:0]   nz_weights
);

  localparam int unsigned PO = (IMG - K + 1) / P;

  // ---- frame control and configuration ------------------------------------
  logic       go;
  gate_mode_e mode_q;
  logic [4:0] shift_q;

  assign go = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      mode_q       <= MODE_ZERO_SKIP;
      shift_q      <= '0;
      frame_cycles <= '0;
    end else begin
      if (go) begin
        busy         <= 1'b1;
        mode_q       <= mode;
        shift_q      <= shift;
        frame_cycles <= '0;
      end else if (busy) begin
        frame_cycles <= frame_cycles + 1'b1;
        if (done) busy <= 1'b0;
      end
    end
  end

  // ---- sequencer ----------------------------------------------------------
  logic           iv, ifirst, ilast;
  logic [IAW-1:0] img_addr;
  logic [WAW-1:0] w_addr;

  conv1_ctrl #(.IMG(IMG), .K(K), .CH(CH), .P(P), .IAW(IAW), .WAW(WAW)) u_ctrl (
    .clk, .rst_n, .start(go), .busy(), .issue_valid(iv),
    .img_addr, .w_addr, .first(ifirst), .last(ilast), .frame_last()
  );

  // ---- buffers ------------------------------------------------------------
  act_t          act;
  wgt_t          wgt;
  logic          nz;
  acc_t          bias;
  logic [CW-1:0] out_ch_q;

  image_buffer #(.IMG(IMG), .AW(IAW)) u_img (
    .clk, .wr_en(img_wr_en), .wr_addr(img_wr_addr), .wr_data(img_wr_data),
    .rd_en(iv), .rd_addr(img_addr), .rd_data(act)
  );

  weight_buffer #(.CH(CH), .K(K), .AW(WAW), .CW(CW)) u_wgt (
    .clk, .rst_n,
    .wr_en(w_wr_en), .wr_addr(w_wr_addr), .wr_data(w_wr_data),
    .bias_wr_en, .bias_wr_ch, .bias_wr_data,
    .rd_en(iv), .rd_addr(w_addr), .rd_wgt(wgt), .rd_nz(nz),
    .bias_rd_ch(out_ch_q), .bias_rd_data(bias),
    .nz_count(nz_weights)
  );

  // tap flags aligned with the buffer outputs
  logic v_d, first_d, last_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {v_d, first_d, last_d} <= '0;
    else        {v_d, first_d, last_d} <= {iv, iv && ifirst, iv && ilast};
  end

  // ---- CE generation and zero-skip MAC ------------------------------------
  logic ce;

  zero_run_ce #(.ZRUN(ZRUN), .CNT_W(32)) u_ce (
    .clk, .rst_n, .clear(go), .mode(mode_q), .valid(v_d), .act,
    .ce, .gated_cycles
  );

  logic mac_valid;
  acc_t mac_result;

  zs_mac #(.CNT_W(32)) u_mac (
    .clk, .rst_n, .clear(go), .in_valid(v_d), .first(first_d), .last(last_d),
    .act, .wgt, .nz, .ce,
    .out_valid(mac_valid), .result(mac_result),
    .skip_cycles(skipped_cycles), .mac_cycles
  );

  // ---- requantization and Pool1 -------------------------------------------
  act_t q;

  requant_relu u_rq (
    .acc(mac_result), .bias, .shift(shift_q), .y(q), .relu(), .sat()
  );

  maxpool2x2 #(.WIN(P * P)) u_pool (
    .clk, .rst_n, .clear(go), .in_valid(mac_valid), .in_data(q),
    .out_valid, .out_data
  );

  // ---- output position ----------------------------------------------------
  logic [PW-1:0] row_q, col_q;
  logic          last_out;

  assign last_out = (32'(out_ch_q) == CH - 1) && (32'(row_q) == PO - 1) &&
                    (32'(col_q) == PO - 1);
  assign out_ch   = out_ch_q;
  assign out_row  = row_q;
  assign out_col  = col_q;
  assign done     = out_valid && last_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {out_ch_q, row_q, col_q} <= '0;
    end else if (go) begin
      {out_ch_q, row_q, col_q} <= '0;
    end else if (out_valid) begin
      if (32'(col_q) != PO - 1) col_q <= col_q + 1'b1;
      else begin
        col_q <= '0;
        if (32'(row_q) != PO - 1) row_q <= row_q + 1'b1;
        else begin
          row_q <= '0;
          out_ch_q <= (32'(out_ch_q) == CH - 1) ? '0 : out_ch_q + 1'b1;
        end
      end
    end
  end

  // ---- protocol checks ----------------------------------------------------
  // No host load may overlap a running frame.
  a_no_load_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !(img_wr_en || w_wr_en || bias_wr_en));
  // CE may only block a tap whose activation is zero.
  a_ce_only_on_zero: assert property (@(posedge clk) disable iff (!rst_n)
    (v_d && !ce) |-> (act == '0));

endmodule
