// tb_seconds_timer: self-checking test of seconds_timer.
//
// Two instances: TICKS_PER_SEC = 1 (one clock per second) and 3. Random
// enable and clear patterns run for 3000 cycles; a reference counter in the
// testbench gives the expected count and the expected secN flags
// (count == N*TICKS_PER_SEC - 1). A second phase counts continuously from a
// clear and checks that each flag first rises exactly N*TICKS_PER_SEC - 1
// cycles after the clear.
module tb_seconds_timer;
  localparam int unsigned CNT_W = 14;

  logic clk = 1'b0;
  logic rst, clr, en;
  logic [CNT_W-1:0] count_a, count_b;
  logic s10a, s8a, s6a, s4a, s10b, s8b, s6b, s4b;
  int unsigned ref_cnt;
  int checks = 0;
  int failures = 0;

  seconds_timer #(.CNT_W(CNT_W), .TICKS_PER_SEC(1)) dut_a (
    .clk(clk), .rst(rst), .clr(clr), .en(en), .count(count_a),
    .sec10(s10a), .sec8(s8a), .sec6(s6a), .sec4(s4a));
  seconds_timer #(.CNT_W(CNT_W), .TICKS_PER_SEC(3)) dut_b (
    .clk(clk), .rst(rst), .clr(clr), .en(en), .count(count_b),
    .sec10(s10b), .sec8(s8b), .sec6(s6b), .sec4(s4b));

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
      $display("FAIL %s at %0t (ref=%0d a=%0d b=%0d)", what, $time, ref_cnt, count_a, count_b);
    end
  endtask

  task automatic check_all();
    chk(count_a == CNT_W'(ref_cnt), "count a");
    chk(count_b == CNT_W'(ref_cnt), "count b");
    chk(s10a == (ref_cnt == 9) && s8a == (ref_cnt == 7) &&
        s6a == (ref_cnt == 5) && s4a == (ref_cnt == 3), "flags a");
    chk(s10b == (ref_cnt == 29) && s8b == (ref_cnt == 23) &&
        s6b == (ref_cnt == 17) && s4b == (ref_cnt == 11), "flags b");
  endtask

  initial begin
    int unsigned first10, first4, n;
    rst = 1'b1; clr = 1'b0; en = 1'b0; ref_cnt = 0;
    #12 rst = 1'b0;
    check_all();
    // random phase
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      clr = ($urandom_range(0, 40) == 0);
      en  = ($urandom_range(0, 5) != 0);
      @(posedge clk);
      if (clr) ref_cnt = 0;
      else if (en) ref_cnt = (ref_cnt + 1) % (1 << CNT_W);
      #1 check_all();
    end
    // interval phase: clear, then count continuously
    @(negedge clk); clr = 1'b1; en = 1'b0;
    @(negedge clk); clr = 1'b0; en = 1'b1;
    first10 = 0; first4 = 0; n = 0;
    while (first10 == 0) begin
      if (s4b && first4 == 0) first4 = n + 1;
      if (s10b) first10 = n + 1;
      @(negedge clk);
      n++;
    end
    chk(first4 == 12, "4 s flag after 4*3 counted cycles");
    chk(first10 == 30, "10 s flag after 10*3 counted cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
