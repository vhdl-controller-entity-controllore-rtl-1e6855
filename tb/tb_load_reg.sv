// tb_load_reg: self-checking test of load_reg.
//
// Drives random load enables and data for 2000 cycles, with a few
// asynchronous resets in between, and compares q after every clock edge
// with a reference register kept in the testbench. Inputs change on the
// falling edge; outputs are checked just before the next falling edge.
module tb_load_reg;
  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  logic         rst;
  logic         en;
  logic [W-1:0] d;
  logic [W-1:0] q;
  logic [W-1:0] model;
  int           checks = 0;
  int           failures = 0;

  load_reg #(.W(W)) dut (.clk(clk), .rst(rst), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0h expected %0h at %0t", what, q, exp, $time);
    end
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; d = '0; model = '0;
    #12 rst = 1'b0;
    check('0, "after reset");
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 2) == 0);
      d  = W'($urandom);
      @(posedge clk);
      if (en) model = d;
      #1 check(model, "load/hold");
      if (i % 500 == 250) begin
        // asynchronous reset between edges
        @(negedge clk);
        en = 1'b1; d = 8'hA5;
        #1 rst = 1'b1;
        #1 check('0, "async reset");
        @(posedge clk);
        #1 check('0, "reset held over an edge");
        @(negedge clk);
        rst = 1'b0; en = 1'b0;
        model = '0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
