// zs_mac -- INT8 multiply-accumulate unit with zero-skipping and CE gating.
//
// One tap (activation, weight) enters per cycle with in_valid. The tap is
// worked on only if its weight is non-zero (nz, the bitmap bit) and CE is
// high; otherwise it is skipped: the operand registers keep their old
// values, so the multiplier inputs do not toggle, and the accumulator is
// not written. Skipping never changes the result, because a skipped tap
// has a zero weight or (under CE) a zero activation. first marks the first
// tap of a dot product (the accumulator restarts), last the final one.
//
// Pipeline, fixed latency whatever the sparsity:
//   edge 1: operand registers (loaded only for worked taps), flags
//   edge 2: accumulator update; on the last tap result/out_valid
// so result appears two cycles after the last tap was presented.
// skip_cycles counts taps skipped for a zero weight, mac_cycles the taps
// actually multiplied; clear resets both.
// Zero-skip through zero detection and data selection, and CE as a register
// write enable, follow the document; the two-stage pipeline, 32-bit
// accumulator and counters are this design's choice.
module zs_mac
  import conv1_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  logic             first,
  input  logic             last,
  input  act_t             act,
  input  wgt_t             wgt,
  input  logic             nz,
  input  logic             ce,
  output logic             out_valid,
  output acc_t             result,
  output logic [CNT_W-1:0] skip_cycles,
  output logic [CNT_W-1:0] mac_cycles
);

  // ---- stage 1: operand capture -------------------------------------------
  logic work;
  assign work = in_valid && nz && ce;

  act_t a_q;
  wgt_t w_q;
  logic v1, first1, last1, do1;

  always_ff @(posedge clk) begin
    if (work) begin
      a_q <= act;
      w_q <= wgt;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; first1 <= 1'b0; last1 <= 1'b0; do1 <= 1'b0;
    end else begin
      v1     <= in_valid;
      first1 <= in_valid && first;
      last1  <= in_valid && last;
      do1    <= work;
    end
  end

  // ---- stage 2: accumulate ------------------------------------------------
  acc_t acc, acc_next, prod;
  logic acc_we;

  assign prod = ACC_W'(a_q) * ACC_W'(w_q);

  always_comb begin
    acc_next = acc;
    if (first1) acc_next = do1 ? prod : '0;
    else if (do1) acc_next = acc + prod;
  end
  // The accumulator is written only when its value changes meaning.
  assign acc_we = v1 && (first1 || do1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      acc <= '0;
    else if (acc_we) acc <= acc_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
    end else begin
      out_valid <= v1 && last1;
      if (v1 && last1) result <= acc_next;
    end
  end

  // ---- activity counters --------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      skip_cycles <= '0;
      mac_cycles  <= '0;
    end else if (clear) begin
      skip_cycles <= '0;
      mac_cycles  <= '0;
    end else begin
      if (in_valid && !nz) skip_cycles <= skip_cycles + 1'b1;
      if (work)            mac_cycles  <= mac_cycles + 1'b1;
    end
  end

endmodule
