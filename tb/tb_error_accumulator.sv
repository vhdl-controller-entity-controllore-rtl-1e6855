// tb_error_accumulator: self-checking test of error_accumulator.
//
// Random enable, clear and data for 4000 cycles against a reference sum
// kept in the testbench, with a long run of large inputs so that the 16-bit
// sum wraps at least once, plus an asynchronous reset.
module tb_error_accumulator;
  logic clk = 1'b0;
  logic rst, clr, en;
  logic [7:0] din;
  logic [15:0] sum;
  int unsigned model;
  int wraps = 0;
  int checks = 0;
  int failures = 0;

  error_accumulator dut (.clk(clk), .rst(rst), .clr(clr), .en(en), .din(din), .sum(sum));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: sum=%0d model=%0d", what, $time, sum, model);
    end
  endtask

  initial begin
    rst = 1'b1; clr = 1'b0; en = 1'b0; din = '0; model = 0;
    #12 rst = 1'b0;
    chk(sum == 0, "after reset");
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // first 600 cycles: no clear, large values, to force a wrap
      clr = (i >= 600) && ($urandom_range(0, 60) == 0);
      en  = (i < 600) || ($urandom_range(0, 2) == 0);
      din = (i < 600) ? 8'($urandom_range(200, 255)) : 8'($urandom);
      @(posedge clk);
      if (clr) model = 0;
      else if (en) begin
        if (model + 32'(din) > 32'hFFFF) wraps++;
        model = (model + 32'(din)) & 32'hFFFF;
      end
      #1 chk(sum == 16'(model), "sum");
    end
    chk(wraps > 0, "sum wrapped");
    @(negedge clk); en = 1'b1; din = 8'd7;
    #1 rst = 1'b1;
    #1 chk(sum == 0, "asynchronous reset");
    @(negedge clk) rst = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
