// tb_weight_buffer -- self-checking test of the weight buffer and its
// non-zero bitmap. Checks that unwritten weights read as zero after reset,
// that rd_nz equals (weight != 0), that rd_wgt carries non-zero weights and
// holds its previous value on a zero weight, the non-zero count and the
// per-channel biases.
module tb_weight_buffer;
  import conv1_pkg::*;

  localparam int unsigned CH = N_CH, K = K_DIM;
  localparam int unsigned DEPTH = CH * K * K;
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(CH);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic wr_en = 1'b0, bias_wr_en = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  wgt_t wr_data = '0, rd_wgt;
  logic [CW-1:0] bias_wr_ch = '0, bias_rd_ch = '0;
  acc_t bias_wr_data = '0, bias_rd_data;
  logic rd_nz;
  logic [AW:0] nz_count;

  weight_buffer dut (.*);

  int checks = 0, failures = 0;
  wgt_t model [DEPTH];
  acc_t bmodel [CH];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nz_ref;
    wgt_t last_nz_w;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(nz_count == 0, "nz_count after reset");
    for (int i = 0; i < int'(DEPTH); i += 7) begin
      rd_en = 1'b1; rd_addr = AW'(i);
      @(negedge clk);
      check(rd_nz == 1'b0, $sformatf("unwritten weight %0d reads non-zero", i));
    end
    rd_en = 1'b0;
    for (int ch = 0; ch < int'(CH); ch++) begin
      bias_rd_ch = CW'(ch);
      #1 check(bias_rd_data == 0, "bias after reset");
    end
    // write about half zeros (a 50% pruned kernel set)
    nz_ref = 0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = AW'(i);
      wr_data = ($urandom_range(1) == 0) ? '0 : wgt_t'($urandom_range(255));
      model[i] = wr_data;
      if (wr_data != 0) nz_ref++;
    end
    for (int ch = 0; ch < int'(CH); ch++) begin
      @(negedge clk);
      wr_en = 1'b0;
      bias_wr_en = 1'b1; bias_wr_ch = CW'(ch); bias_wr_data = acc_t'($urandom);
      bmodel[ch] = bias_wr_data;
    end
    @(negedge clk);
    bias_wr_en = 1'b0;
    check(32'(nz_count) == nz_ref, $sformatf("nz_count %0d want %0d", nz_count, nz_ref));
    for (int ch = 0; ch < int'(CH); ch++) begin
      bias_rd_ch = CW'(ch);
      #1 check(bias_rd_data == bmodel[ch], $sformatf("bias ch %0d", ch));
    end
    // read every weight twice in random order
    last_nz_w = '0;
    for (int n = 0; n < 2 * int'(DEPTH); n++) begin
      int a;
      a = (n < int'(DEPTH)) ? n : int'($urandom_range(DEPTH - 1));
      @(negedge clk);
      rd_en = 1'b1; rd_addr = AW'(a);
      @(negedge clk);
      rd_en = 1'b0;
      check(rd_nz == (model[a] != 0), $sformatf("bitmap bit %0d", a));
      if (n > 0 && model[a] == 0)
        check(rd_wgt == last_nz_w, $sformatf("weight register toggled on zero weight %0d", a));
      if (model[a] != 0) begin
        check(rd_wgt == model[a], $sformatf("weight %0d got %0d want %0d", a, rd_wgt, model[a]));
        last_nz_w = model[a];
      end
    end
    // zeroing a weight clears its bitmap bit
    for (int i = 0; i < int'(DEPTH); i++) if (model[i] != 0) begin
      @(negedge clk); wr_en = 1'b1; wr_addr = AW'(i); wr_data = '0;
      @(negedge clk); wr_en = 1'b0; rd_en = 1'b1; rd_addr = AW'(i);
      @(negedge clk); rd_en = 1'b0;
      check(rd_nz == 1'b0, "bitmap bit cleared by zero write");
      check(32'(nz_count) == nz_ref - 1, "nz_count after zero write");
      break;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
