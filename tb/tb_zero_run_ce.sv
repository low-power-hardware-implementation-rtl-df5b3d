// tb_zero_run_ce -- self-checking test of the consecutive-zero CE detector.
// Drives a random activation stream with runs of zeros and invalid cycles,
// in both modes, and compares CE and the gated-cycle counter with a model
// that counts zeros in a row and gates from the ZRUN-th zero on; in
// zero-skip mode the detector must stay idle.
module tb_zero_run_ce;
  import conv1_pkg::*;

  localparam int unsigned ZRUN = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic clear = 1'b0, valid = 1'b0, ce;
  gate_mode_e mode = MODE_ZERO_SKIP;
  act_t act = '0;
  logic [31:0] gated_cycles;

  zero_run_ce #(.ZRUN(ZRUN)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int run, gated, gated_seen;
    bit exp_ce;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    gated_seen = 0;
    for (int m = 0; m < 2; m++) begin
      @(negedge clk);
      mode = (m == 0) ? MODE_ZERO_SKIP : MODE_ZERO_SKIP_CE;
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      run = 0; gated = 0;
      for (int n = 0; n < 5000; n++) begin
        valid = ($urandom_range(9) != 0);
        act = ($urandom_range(2) != 0) ? '0 : act_t'($urandom_range(255));
        #1;
        exp_ce = !(mode == MODE_ZERO_SKIP_CE && valid && act == 0 && run + 1 >= int'(ZRUN));
        check(ce == exp_ce, $sformatf("ce at step %0d mode %0d run %0d", n, m, run));
        if (valid && !exp_ce) gated++;
        if (valid && mode == MODE_ZERO_SKIP_CE) run = (act == 0) ? run + 1 : 0;
        @(negedge clk);
        check(32'(gated) == gated_cycles, $sformatf("gated_cycles %0d want %0d", gated_cycles, gated));
      end
      valid = 1'b0;
      if (m == 0) check(gated_cycles == 0, "no gating in zero-skip mode");
      else gated_seen = gated;
    end
    check(gated_seen > 0, "CE gated at least once");
    // a single isolated zero must not gate (ZRUN = 2)
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0; valid = 1'b1; act = 8'sd5;
    @(negedge clk); act = '0; #1 check(ce == 1'b1, "first zero of a run passes");
    @(negedge clk); act = '0; #1 check(ce == 1'b0, "second zero of a run is gated");
    @(negedge clk); valid = 1'b0;
    // zeros seen in zero-skip mode must not count toward a run: the
    // detector is idle until CE mode is selected
    @(negedge clk); clear = 1'b1; mode = MODE_ZERO_SKIP;
    @(negedge clk); clear = 1'b0; valid = 1'b1; act = '0;
    repeat (4) @(negedge clk);
    mode = MODE_ZERO_SKIP_CE;
    #1 check(ce == 1'b1, "zeros in zero-skip mode do not start a run");
    @(negedge clk); #1 check(ce == 1'b0, "run starts once CE mode is on");
    @(negedge clk); valid = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
