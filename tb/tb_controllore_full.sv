// tb_controllore_full: one complete positioning run at the default size.
//
// The controller keeps all its default parameters (1000 clock cycles per
// second, so a 10 s motor period is 10000 cycles). The motor model moves
// one step per 4 s of motor time. The run programs target 200 from
// position 0 and follows it through all four motor times down to PRENDI
// (about 940,000 cycles), comparing ERROR, MON and PRENDI with the
// reference model on every cycle while BUTTON is pulsed at random; it then
// programs the same target again, which must finish at once. It also
// checks the length of the first motor period: exactly 10000 cycles.
module tb_controllore_full;
  localparam int unsigned T = 1000;

  logic        clk = 1'b0;
  logic        rst, progr, button;
  logic [7:0]  pos_ref, pos_corr;
  logic [15:0] error_o;
  logic        prendi, mon;
  logic [15:0] exp_error;
  logic        exp_mon, exp_prendi;
  int          m_st, m_secs, m_err_read;
  logic        plant_load;
  int checks = 0;
  int failures = 0;
  int n_motor [4];
  int n_prendi = 0;

  controllore dut (
    .CLK(clk), .RESET(rst), .PROGR(progr), .BUTTON(button),
    .POS_REF(pos_ref), .POS_CORR(pos_corr),
    .ERROR(error_o), .PRENDI(prendi), .MON(mon));

  ctrl_ref_model #(.TICKS_PER_SEC(T)) model (
    .clk(clk), .rst(rst), .progr(progr), .button(button),
    .pos_ref(pos_ref), .pos_corr(pos_corr), .exp_error(exp_error),
    .exp_mon(exp_mon), .exp_prendi(exp_prendi), .st(m_st), .secs(m_secs),
    .err_read(m_err_read));

  motor_plant #(.STEP_CYCLES(4 * T)) plant (
    .clk(clk), .mon(mon), .load(plant_load), .load_pos(8'd0), .pos(pos_corr));

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s at %0t: ERROR=%0d/%0d MON=%b/%b PRENDI=%b/%b",
                 what, $time, error_o, exp_error, mon, exp_mon, prendi, exp_prendi);
    end
  endtask

  bit mon_d = 1'b0;
  always @(negedge clk) begin
    #2;
    if (!rst) begin
      chk(error_o == exp_error && mon == exp_mon && prendi == exp_prendi, "outputs");
      if (mon && !mon_d) n_motor[(10 - m_secs) / 2]++;
      if (prendi) n_prendi++;
      mon_d = mon;
    end
  end

  always @(negedge clk) button <= ($urandom_range(0, 5000) == 0);

  initial begin
    int n;
    rst = 1'b1; progr = 1'b0; button = 1'b0; pos_ref = '0; plant_load = 1'b1;
    #12 rst = 1'b0;
    @(negedge clk) plant_load = 1'b0;
    @(negedge clk) begin pos_ref = 8'd200; progr = 1'b1; end
    @(negedge clk) progr = 1'b0;
    // first motor period: error 200 -> 10 s
    while (!mon) @(negedge clk);
    n = 0;
    while (mon) begin
      @(negedge clk);
      n++;
    end
    chk(n == 10 * T, $sformatf("first motor period %0d cycles", n));
    n = 0;
    while (!prendi && n < 2000000) begin
      @(negedge clk);
      n++;
    end
    chk(prendi && pos_corr == 8'd200, "position 200 reached");
    @(negedge clk);
    // same target again: zero error
    @(negedge clk) progr = 1'b1;
    @(negedge clk) progr = 1'b0;
    @(negedge clk);
    @(negedge clk);
    chk(prendi, "zero error finishes at once");
    foreach (n_motor[i]) chk(n_motor[i] > 0, "every motor time used");
    $display("motor periods 10/8/6/4 s: %0d %0d %0d %0d, PRENDI %0d",
             n_motor[0], n_motor[1], n_motor[2], n_motor[3], n_prendi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
