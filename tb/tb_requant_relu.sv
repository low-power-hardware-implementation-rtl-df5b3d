// tb_requant_relu -- self-checking test of bias add, shift, ReLU and
// saturation, against a 64-bit integer model, including the edge cases
// of the largest and smallest accumulators and biases.
module tb_requant_relu;
  import conv1_pkg::*;

  acc_t acc, bias;
  logic [4:0] shift;
  act_t y;
  logic relu, sat;

  requant_relu dut (.*);

  int checks = 0, failures = 0;
  int n_relu = 0, n_sat = 0, n_pass = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic one(input acc_t a, input acc_t b, input int s);
    longint sum, sc, ey;
    bit er, es;
    acc = a; bias = b; shift = 5'(s);
    #1;
    sum = longint'(a) + longint'(b);
    sc  = sum >>> s;
    er = (sc < 0); es = (sc > 127);
    ey = er ? 0 : (es ? 127 : sc);
    check(longint'(y) == ey && relu == er && sat == es,
          $sformatf("acc %0d bias %0d shift %0d: y %0d want %0d", a, b, s, y, ey));
    if (er) n_relu++; else if (es) n_sat++; else n_pass++;
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int s;
      s = $urandom_range(31);
      one(acc_t'($urandom) >>> $urandom_range(31), acc_t'($urandom) >>> $urandom_range(31), s);
    end
    // small values around the clip points
    for (int v = -300; v <= 300; v++) one(acc_t'(v), '0, 1);
    one(32'sh7fffffff, 32'sh7fffffff, 0);
    one(32'sh80000000, 32'sh80000000, 31);
    one(32'sh7fffffff, 32'sh7fffffff, 31);
    one('0, '0, 0);
    check(n_relu > 0 && n_sat > 0 && n_pass > 0, "all three outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
