// zero_run_ce -- consecutive-zero detector that generates CE, the write
// enable of the MAC registers, and counts the gated cycles.
//
// The detector sits in front of the MAC and watches the activation stream.
// It counts how many zero activations have arrived back to back. Once a run
// of at least ZRUN zeros is seen (the current one included), the current
// cycle is treated as invalid and CE is dropped, so the MAC does not write
// its operand or accumulator registers. The clock keeps running: this is
// data gating, not clock gating. With mode = MODE_ZERO_SKIP the detector
// is idle (its run length stays at zero, so it adds no switching) and CE
// stays high. gated_cycles counts the valid cycles
// in which CE was low; clear (one cycle, at frame start) resets the run
// length and the counter.
//
// Timing: ce is combinational from act/valid and the registered run length,
// so it is valid in the same cycle as the activation it qualifies.
// The document defines CE this way (consecutive-zero detection before the
// MAC, write-enable semantics, a gated_cycles counter); the run threshold
// ZRUN and the counter width are this design's choice.
module zero_run_ce
  import conv1_pkg::*;
#(
  parameter int unsigned ZRUN  = 2,   // zeros in a row that make a cycle invalid
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  gate_mode_e       mode,
  input  logic             valid,
  input  act_t             act,
  output logic             ce,
  output logic [CNT_W-1:0] gated_cycles
);

  localparam int unsigned RW = $clog2(ZRUN + 1);

  logic [RW-1:0] run;     // zeros seen in a row before this cycle, saturating
  logic          is_zero;
  logic          invalid;

  assign is_zero = (act == '0);
  assign invalid = valid && is_zero && (32'(run) + 1 >= ZRUN);
  assign ce      = !(invalid && (mode == MODE_ZERO_SKIP_CE));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= '0;
    end else if (clear) begin
      run <= '0;
    end else if (valid && mode == MODE_ZERO_SKIP_CE) begin
      if (!is_zero)                run <= '0;
      else if (32'(run) < ZRUN)    run <= run + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 gated_cycles <= '0;
    else if (clear)             gated_cycles <= '0;
    else if (valid && !ce)      gated_cycles <= gated_cycles + 1'b1;
  end

endmodule
