// tb_conv1_ctrl -- self-checking test of the Conv1 sequencer at its
// default size. Compares every issued tap (pixel address, weight address,
// first/last flags, frame_last) with the nested-loop order, checks that the
// frame takes exactly 6*24*24*25 = 86400 gap-free issue cycles, that start
// is ignored while busy, and that a second frame repeats the first.
module tb_conv1_ctrl;
  import conv1_pkg::*;

  localparam int IMG = IMG_DIM, K = K_DIM, CH = N_CH, P = POOL;
  localparam int OUT = IMG - K + 1, PO = OUT / P;
  localparam int TOTAL = CH * OUT * OUT * K * K;
  localparam int IAW = $clog2(IMG * IMG), WAW = $clog2(CH * K * K);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic start = 1'b0, busy, issue_valid, first, last, frame_last;
  logic [IAW-1:0] img_addr;
  logic [WAW-1:0] w_addr;

  conv1_ctrl dut (.*);

  int checks = 0, failures = 0;
  int errs = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame();
    int n;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    n = 0;
    for (int ch = 0; ch < CH; ch++)
    for (int py = 0; py < PO; py++)
    for (int px = 0; px < PO; px++)
    for (int sy = 0; sy < P; sy++)
    for (int sx = 0; sx < P; sx++)
    for (int ky = 0; ky < K; ky++)
    for (int kx = 0; kx < K; kx++) begin
      int oy, ox;
      bit ok;
      oy = py * P + sy; ox = px * P + sx;
      ok = issue_valid && busy
        && int'(img_addr) == (oy + ky) * IMG + ox + kx
        && int'(w_addr) == ch * K * K + ky * K + kx
        && first == (ky == 0 && kx == 0)
        && last == (ky == K - 1 && kx == K - 1)
        && frame_last == (n == TOTAL - 1);
      check(ok, $sformatf("tap %0d: img %0d w %0d f%0d l%0d fl%0d", n, img_addr, w_addr, first, last, frame_last));
      // start pulses during a frame must be ignored
      start = (n == 1000);
      n++;
      @(negedge clk);
    end
    start = 1'b0;
    check(!issue_valid && !busy, "idle after exactly TOTAL issue cycles");
    check(n == TOTAL, "tap count");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(!busy && !issue_valid, "idle after reset");
    run_frame();
    repeat (3) @(negedge clk);
    check(!busy, "stays idle");
    run_frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
