// tb_zs_mac -- self-checking test of the zero-skip MAC.
// Feeds 25-tap dot products with random sparse weights, zero activations
// and random CE, and checks each result against a model that adds only the
// taps with a non-zero weight and CE high, the two-cycle latency from the
// last tap to out_valid, and the skip/multiply counters.
module tb_zs_mac;
  import conv1_pkg::*;

  localparam int TAPS = 25;
  localparam int NDOT = 400;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic clear = 1'b0, in_valid = 1'b0, first = 1'b0, last = 1'b0, nz = 1'b0, ce = 1'b1;
  act_t act = '0;
  wgt_t wgt = '0;
  logic out_valid;
  acc_t result;
  logic [31:0] skip_cycles, mac_cycles;

  zs_mac dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  longint exp_val[$];
  int     exp_cyc[$];
  int     outs = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(negedge clk) if (rst_n && out_valid) begin
    outs++;
    if (exp_val.size() == 0) check(1'b0, "unexpected result");
    else begin
      longint v; int c;
      v = exp_val.pop_front();
      c = exp_cyc.pop_front();
      check(longint'(result) == v, $sformatf("result %0d want %0d", result, v));
      check(cyc == c, $sformatf("latency: result at cycle %0d want %0d", cyc, c));
    end
  end

  initial begin
    int n_skip, n_mac;
    longint sum;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    n_skip = 0; n_mac = 0;
    for (int d = 0; d < NDOT; d++) begin
      int sparsity;
      sparsity = $urandom_range(100);
      sum = 0;
      for (int t = 0; t < TAPS; t++) begin
        in_valid = 1'b1;
        first = (t == 0);
        last  = (t == TAPS - 1);
        act = ($urandom_range(2) == 0) ? '0 : act_t'($urandom_range(255));
        if (int'($urandom_range(99)) < sparsity) begin
          nz = 1'b0;
          wgt = wgt_t'($urandom_range(255));   // stale register value, must be ignored
        end else begin
          wgt = wgt_t'($urandom_range(255));
          if (wgt == 0) wgt = 8'sd1;
          nz = 1'b1;
        end
        ce = (d % 3 == 2) ? 1'b1 : ($urandom_range(3) != 0);
        if (!nz) n_skip++;
        if (nz && ce) begin
          n_mac++;
          sum += longint'(act) * longint'(wgt);
        end
        if (last) begin
          exp_val.push_back(sum);
          exp_cyc.push_back(cyc + 2);
        end
        @(negedge clk);
        // occasional idle cycle inside or between dot products
        if ($urandom_range(7) == 0) begin
          in_valid = 1'b0;
          first = $urandom_range(1);
          last = $urandom_range(1);
          @(negedge clk);
        end
      end
    end
    in_valid = 1'b0; first = 1'b0; last = 1'b0;
    repeat (4) @(negedge clk);
    check(outs == NDOT, $sformatf("%0d results want %0d", outs, NDOT));
    check(32'(n_skip) == skip_cycles, $sformatf("skip_cycles %0d want %0d", skip_cycles, n_skip));
    check(32'(n_mac) == mac_cycles, $sformatf("mac_cycles %0d want %0d", mac_cycles, n_mac));
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    check(skip_cycles == 0 && mac_cycles == 0, "counters clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
