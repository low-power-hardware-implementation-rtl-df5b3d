// tb_maxpool2x2 -- self-checking test of the streaming 2x2 max pool.
// Sends groups of four values (with idle cycles in between) and checks
// each emitted maximum and that it appears one clock after the fourth value.
module tb_maxpool2x2;
  import conv1_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic clear = 1'b0, in_valid = 1'b0, out_valid;
  act_t in_data = '0, out_data;

  maxpool2x2 dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int exp_v[$], exp_c[$];
  int outs = 0;

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

  always @(negedge clk) if (rst_n && out_valid) begin
    outs++;
    if (exp_v.size() == 0) check(1'b0, "unexpected output");
    else begin
      int v, c;
      v = exp_v.pop_front(); c = exp_c.pop_front();
      check(int'(out_data) == v, $sformatf("max %0d want %0d", out_data, v));
      check(cyc == c, $sformatf("output at cycle %0d want %0d", cyc, c));
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    for (int g = 0; g < 1000; g++) begin
      int m;
      m = -1000;
      for (int i = 0; i < 4; i++) begin
        in_valid = 1'b1;
        // mostly small non-negative values, like ReLU outputs, some negative
        in_data = (g % 5 == 0) ? act_t'($urandom_range(255)) : act_t'($urandom_range(127));
        if (int'(in_data) > m) m = int'(in_data);
        if (i == 3) begin exp_v.push_back(m); exp_c.push_back(cyc + 1); end
        @(negedge clk);
        if ($urandom_range(5) == 0) begin in_valid = 1'b0; @(negedge clk); end
      end
    end
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    check(outs == 1000, $sformatf("%0d outputs want 1000", outs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
