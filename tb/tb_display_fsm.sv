// tb_display_fsm: self-checking test of display_fsm.
//
// Random button levels, clears and data for 3000 cycles. A reference
// state bit in the testbench flips on every edge with the button high and
// returns to "last error" on clear or reset; the output must be the
// zero-extended error in that state and the sum in the other, and it must
// follow data changes within the same cycle.
module tb_display_fsm;
  logic clk = 1'b0;
  logic rst, clr, button;
  logic [7:0] error_q;
  logic [15:0] sum, error_out;
  logic show_sum;
  bit model_sum;
  int toggles = 0;
  int checks = 0;
  int failures = 0;

  display_fsm dut (.clk(clk), .rst(rst), .clr(clr), .button(button),
                   .error_q(error_q), .sum(sum), .error_out(error_out),
                   .show_sum(show_sum));

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
      $display("FAIL %s at %0t: out=%0h show_sum=%b model=%b err=%0h sum=%0h",
               what, $time, error_out, show_sum, model_sum, error_q, sum);
    end
  endtask

  task automatic check_out();
    chk(show_sum == model_sum, "state");
    chk(error_out == (model_sum ? sum : {8'h00, error_q}), "output");
  endtask

  initial begin
    rst = 1'b1; clr = 1'b0; button = 1'b0; error_q = 8'h5A; sum = 16'h1234;
    model_sum = 1'b0;
    #12 rst = 1'b0;
    check_out();
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      button = ($urandom_range(0, 3) == 0);
      clr    = ($urandom_range(0, 30) == 0);
      error_q = 8'($urandom);
      sum     = 16'($urandom);
      #1 check_out();            // combinational output follows the data
      @(posedge clk);
      if (clr) model_sum = 1'b0;
      else if (button) begin
        model_sum = !model_sum;
        toggles++;
      end
      #1 check_out();
    end
    chk(toggles > 10, "display switched");
    // asynchronous reset from the sum view
    @(negedge clk); clr = 1'b0; button = 1'b1;
    @(posedge clk); if (!model_sum) model_sum = 1'b1; else model_sum = 1'b0;
    @(negedge clk); button = 1'b0;
    if (!model_sum) begin
      button = 1'b1;
      @(posedge clk); model_sum = 1'b1;
      @(negedge clk); button = 1'b0;
    end
    #1 check_out();
    rst = 1'b1;
    #1 model_sum = 1'b0;
    check_out();
    @(negedge clk) rst = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
