// tb_conv1_pool1_top -- end-to-end test of the sparse Conv1/Pool1 engine at
// its default size (28x28 image, six 5x5 kernels, 2x2 pooling).
//
// One synthetic handwritten-digit-like image (strokes on a zero background)
// and one random INT8 kernel set are generated. The kernels are pruned by
// magnitude (the smallest |w| set to zero) at every sparsity from 0 % to
// 80 % in 5 % steps, and each pruned set is run in both modes, zero-skip
// alone and zero-skip with CE: 34 frames. For every frame the testbench
// compares all 864 pooled outputs and their coordinates with its own model
// of convolution, requantization and pooling, checks that the two modes give
// identical outputs, that the frame takes the same, fixed number of cycles
// at every sparsity, and that the skip, CE-gate and multiply counters match
// the model's count over the tap stream. It counts how often each mechanism
// occurred (zero-skip, CE gating, mode switch, ReLU clipping, saturation,
// pooling choosing a non-first value) and fails if one never did.
module tb_conv1_pool1_top;
  import conv1_pkg::*;

  localparam int IMG = IMG_DIM, K = K_DIM, CH = N_CH, P = POOL, ZRUN = 2;
  localparam int OUT = IMG - K + 1, PO = OUT / P;
  localparam int NW = CH * K * K;
  localparam int TOTAL = CH * OUT * OUT * K * K;
  localparam int FRAME_CYCLES = TOTAL + 4;
  localparam int IAW = $clog2(IMG * IMG), WAW = $clog2(NW), CW = $clog2(CH), PW = $clog2(PO);
  localparam int SHIFT = 6;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic img_wr_en = 0, w_wr_en = 0, bias_wr_en = 0, start = 0;
  logic [IAW-1:0] img_wr_addr = '0;
  act_t img_wr_data = '0;
  logic [WAW-1:0] w_wr_addr = '0;
  wgt_t w_wr_data = '0;
  logic [CW-1:0] bias_wr_ch = '0;
  acc_t bias_wr_data = '0;
  gate_mode_e mode = MODE_ZERO_SKIP;
  logic [4:0] shift = 5'(SHIFT);
  logic busy, done, out_valid;
  logic [CW-1:0] out_ch;
  logic [PW-1:0] out_row, out_col;
  act_t out_data;
  logic [31:0] skipped_cycles, gated_cycles, mac_cycles, frame_cycles;
  logic [WAW:0] nz_weights;

  conv1_pool1_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_skip_frames = 0, n_gate_frames = 0, n_mode_switch = 0;
  int n_relu = 0, n_sat = 0, n_pool_pick = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (40 * (TOTAL + 2000)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- data -------------------------------------------------------------
  int   img  [IMG][IMG];
  int   w0   [NW];        // unpruned kernels
  int   w    [NW];        // pruned kernels in use
  int   bias [CH];
  int   ref_pool [CH][PO][PO];
  int   prev_pool [CH][PO][PO];
  int   ref_gated, ref_mac, ref_skip;
  int   got [CH*PO*PO];
  int   got_n;

  // Loops below run over one flat index so that no simulator unrolls them.
  function automatic void make_image();
    for (int n = 0; n < IMG * IMG; n++) begin
      int y, x, dy, dx, r2;
      y = n / IMG; x = n % IMG;
      img[y][x] = 0;
      // a "0"-like ring and a slanted stroke, intensity 40..127
      dy = y - 14; dx = x - 13;
      r2 = dy * dy * 4 + dx * dx * 9;
      if (r2 >= 500 && r2 <= 900) img[y][x] = 60 + int'($urandom_range(67));
      if (x - y / 3 == 17 && y > 3 && y < 25) img[y][x] = 127;
      if (x - y / 3 == 18 && y > 3 && y < 25) img[y][x] = 40 + int'($urandom_range(30));
    end
  endfunction

  function automatic void prune(input int pct);
    int nzero;
    int order [NW];
    nzero = (NW * pct + 50) / 100;
    for (int i = 0; i < NW; i++) order[i] = i;
    // sort indices by |w0| ascending, index breaks ties
    for (int i = 1; i < NW; i++) begin
      int j, t;
      j = i;
      while (j > 0) begin
        int a, b;
        a = (w0[order[j-1]] < 0) ? -w0[order[j-1]] : w0[order[j-1]];
        b = (w0[order[j]]   < 0) ? -w0[order[j]]   : w0[order[j]];
        if (a > b || (a == b && order[j-1] > order[j])) begin
          t = order[j]; order[j] = order[j-1]; order[j-1] = t; j--;
        end else break;
      end
    end
    for (int i = 0; i < NW; i++) w[i] = w0[i];
    for (int i = 0; i < nzero; i++) w[order[i]] = 0;
  endfunction

  // Reference: walks the taps in the engine's order, modelling CE too.
  function automatic void reference(input bit ce_mode);
    int run, m;
    longint acc;
    run = 0; ref_gated = 0; ref_mac = 0; ref_skip = 0;
    m = 0; acc = 0;
    for (int n = 0; n < TOTAL; n++) begin
      int t, kx, ky, sx, sy, px, py, ch, a, wt;
      bit gate;
      t = n;
      kx = t % K; t /= K;   ky = t % K; t /= K;
      sx = t % P; t /= P;   sy = t % P; t /= P;
      px = t % PO; t /= PO; py = t % PO; t /= PO;
      ch = t;
      a  = img[py*P+sy+ky][px*P+sx+kx];
      wt = w[ch*K*K + ky*K + kx];
      gate = ce_mode && a == 0 && run + 1 >= ZRUN;
      run = (a == 0) ? ((run < ZRUN) ? run + 1 : run) : 0;
      if (gate) ref_gated++;
      if (wt == 0) ref_skip++;
      if (wt != 0 && !gate) ref_mac++;
      if (kx == 0 && ky == 0) acc = 0;
      acc += longint'(a) * longint'(wt);
      if (kx == K - 1 && ky == K - 1) begin
        longint s;
        int q;
        s = (acc + longint'(bias[ch])) >>> SHIFT;
        if (s < 0) begin q = 0; n_relu++; end
        else if (s > 127) begin q = 127; n_sat++; end
        else q = int'(s);
        if (sy + sx > 0 && q > m) n_pool_pick++;
        if (sy + sx == 0 || q > m) m = q;
        if (sy == P - 1 && sx == P - 1) ref_pool[ch][py][px] = m;
      end
    end
  endfunction

  // output collector
  always @(negedge clk) if (rst_n && out_valid) begin
    int idx;
    idx = (int'(out_ch) * PO + int'(out_row)) * PO + int'(out_col);
    check(idx == got_n, $sformatf("output %0d carries position ch%0d r%0d c%0d", got_n, out_ch, out_row, out_col));
    if (got_n < CH * PO * PO) got[got_n] = int'(out_data);
    got_n++;
  end

  task automatic load_weights();
    for (int i = 0; i < NW; i++) begin
      @(negedge clk);
      w_wr_en = 1; w_wr_addr = WAW'(i); w_wr_data = wgt_t'(w[i]);
    end
    @(negedge clk); w_wr_en = 0;
  endtask

  task automatic run_frame(input int pct, input bit ce_mode);
    int cycles, zeros;
    bit same;
    reference(ce_mode);
    @(negedge clk);
    mode = ce_mode ? MODE_ZERO_SKIP_CE : MODE_ZERO_SKIP;
    start = 1;
    got_n = 0;
    cycles = 0;
    @(negedge clk); start = 0;
    mode = ce_mode ? MODE_ZERO_SKIP : MODE_ZERO_SKIP_CE;  // mode is sampled at start only
    while (!done) begin
      @(negedge clk);
      cycles++;
      if (cycles > TOTAL + 100) begin
        check(0, "frame never finished");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
    @(negedge clk);
    check(got_n == CH * PO * PO, $sformatf("%0d outputs", got_n));
    same = 1;
    for (int n = 0; n < CH * PO * PO; n++) begin
      int ch, r, c, v;
      ch = n / (PO * PO); r = (n / PO) % PO; c = n % PO;
      v = got[n];
      check(v == ref_pool[ch][r][c], $sformatf("s%0d ce%0d ch%0d r%0d c%0d: %0d want %0d",
            pct, ce_mode, ch, r, c, v, ref_pool[ch][r][c]));
      if (ce_mode && v != prev_pool[ch][r][c]) same = 0;
      prev_pool[ch][r][c] = v;
    end
    if (ce_mode) begin
      check(same, "CE changes no output");
      n_mode_switch++;
    end
    zeros = 0;
    for (int i = 0; i < NW; i++) if (w[i] == 0) zeros++;
    check(int'(nz_weights) == NW - zeros, "non-zero weight count");
    check(int'(frame_cycles) == FRAME_CYCLES, $sformatf("frame_cycles %0d want %0d", frame_cycles, FRAME_CYCLES));
    check(int'(skipped_cycles) == ref_skip && ref_skip == zeros * OUT * OUT,
          $sformatf("skipped %0d want %0d", skipped_cycles, ref_skip));
    check(int'(gated_cycles) == ref_gated, $sformatf("gated %0d want %0d", gated_cycles, ref_gated));
    check(int'(mac_cycles) == ref_mac, $sformatf("mac %0d want %0d", mac_cycles, ref_mac));
    if (skipped_cycles > 0) n_skip_frames++;
    if (gated_cycles > 0) n_gate_frames++;
    $display("sparsity %2d%% %-12s: skipped %6d gated %6d multiplied %6d of %0d taps, %0d cycles",
             pct, ce_mode ? "zero-skip+CE" : "zero-skip", skipped_cycles, gated_cycles,
             mac_cycles, TOTAL, frame_cycles);
  endtask

  initial begin
    make_image();
    for (int i = 0; i < NW; i++) begin
      w0[i] = int'($urandom_range(200)) - 100 + int'($urandom_range(54)) - 27;
      if (w0[i] == 0) w0[i] = 1;
    end
    for (int c = 0; c < CH; c++) bias[c] = int'($urandom_range(8000)) - 4000;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < IMG * IMG; n++) begin
      @(negedge clk);
      img_wr_en = 1; img_wr_addr = IAW'(n); img_wr_data = act_t'(img[n / IMG][n % IMG]);
    end
    @(negedge clk); img_wr_en = 0;
    for (int c = 0; c < CH; c++) begin
      @(negedge clk);
      bias_wr_en = 1; bias_wr_ch = CW'(c); bias_wr_data = acc_t'(bias[c]);
    end
    @(negedge clk); bias_wr_en = 0;
    for (int pct = 0; pct <= 80; pct += 5) begin
      prune(pct);
      load_weights();
      run_frame(pct, 1'b0);
      run_frame(pct, 1'b1);
    end
    $display("mechanisms: zero-skip frames %0d, CE-gated frames %0d, mode switches %0d, relu %0d, saturation %0d, pool picks %0d",
             n_skip_frames, n_gate_frames, n_mode_switch, n_relu, n_sat, n_pool_pick);
    check(n_skip_frames > 0, "zero-skip happened");
    check(n_gate_frames > 0, "CE gating happened");
    check(n_mode_switch > 0, "mode switch happened");
    check(n_relu > 0, "ReLU clipping happened");
    check(n_sat > 0, "saturation happened");
    check(n_pool_pick > 0, "pool chose a later value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
