// tb_image_buffer -- self-checking test of the image buffer.
// Fills the whole 28x28 memory with random INT8 pixels, reads random and
// sequential addresses and checks each pixel one cycle after its address,
// and checks that the output holds while rd_en is low.
module tb_image_buffer;
  import conv1_pkg::*;

  localparam int unsigned IMG = IMG_DIM;
  localparam int unsigned AW  = $clog2(IMG * IMG);
  localparam int unsigned DEPTH = IMG * IMG;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  act_t wr_data = '0, rd_data;

  image_buffer dut (.*);

  int checks = 0, failures = 0;
  act_t model [DEPTH];

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
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = AW'(i); wr_data = act_t'($urandom);
      model[i] = wr_data;
    end
    @(negedge clk) wr_en = 1'b0;
    // sequential then random reads
    for (int n = 0; n < 2000; n++) begin
      int a;
      a = (n < int'(DEPTH)) ? n : int'($urandom_range(DEPTH - 1));
      @(negedge clk);
      rd_en = 1'b1; rd_addr = AW'(a);
      @(negedge clk);
      rd_en = 1'b0;
      check(rd_data == model[a], $sformatf("read addr %0d got %0d want %0d", a, rd_data, model[a]));
      // output must hold with rd_en low even if the address moves
      rd_addr = AW'($urandom_range(DEPTH - 1));
      @(negedge clk);
      check(rd_data == model[a], $sformatf("hold at addr %0d", a));
    end
    // overwrite one pixel and read it back
    @(negedge clk); wr_en = 1'b1; wr_addr = AW'(100); wr_data = 8'sd77;
    @(negedge clk); wr_en = 1'b0; rd_en = 1'b1; rd_addr = AW'(100);
    @(negedge clk); rd_en = 1'b0;
    check(rd_data == 8'sd77, "overwrite");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
