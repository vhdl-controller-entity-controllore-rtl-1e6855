// tb_controllore: end-to-end test of the position controller.
//
// The controller (with two clock cycles per second, to keep runs short)
// drives a motor model that advances the measured position while MON is
// high; a cycle-accurate reference model predicts ERROR, MON and PRENDI,
// which are compared on every cycle. BUTTON is pulsed at random throughout.
// Scenarios, in order: a run from position 0 to target 200 (uses all four
// motor times), programming the position already held (immediate PRENDI),
// a target behind the measured position (the unsigned error wraps),
// re-programming while the motor runs (clears the sum and the display),
// holding BUTTON high, and a reset in the middle of a run. Each of these
// mechanisms is counted, and one that never happened counts as a failure.
// A run must end with PRENDI within a cycle bound worked out from the
// motor times.
module tb_controllore;
  localparam int unsigned T = 2;

  logic        clk = 1'b0;
  logic        rst, progr, button;
  logic [7:0]  pos_ref, pos_corr;
  logic [15:0] error_o;
  logic        prendi, mon;
  logic [15:0] exp_error;
  logic        exp_mon, exp_prendi;
  int          m_st, m_secs, m_err_read;
  logic        plant_load;
  logic [7:0]  plant_load_pos;
  int checks = 0;
  int failures = 0;
  int cycle = 0;
  bit rand_button = 1'b1;
  bit mon_d = 1'b0;

  // mechanism counters
  int n_motor10 = 0, n_motor8 = 0, n_motor6 = 0, n_motor4 = 0;
  int n_prendi = 0, n_zero_error = 0, n_wrap = 0, n_show_sum = 0;
  int n_progr_busy = 0, n_sum_cleared = 0, n_button_held = 0, n_reset_busy = 0;

  controllore #(.TICKS_PER_SEC(T)) dut (
    .CLK(clk), .RESET(rst), .PROGR(progr), .BUTTON(button),
    .POS_REF(pos_ref), .POS_CORR(pos_corr),
    .ERROR(error_o), .PRENDI(prendi), .MON(mon));

  ctrl_ref_model #(.TICKS_PER_SEC(T)) model (
    .clk(clk), .rst(rst), .progr(progr), .button(button),
    .pos_ref(pos_ref), .pos_corr(pos_corr), .exp_error(exp_error),
    .exp_mon(exp_mon), .exp_prendi(exp_prendi), .st(m_st), .secs(m_secs),
    .err_read(m_err_read));

  motor_plant #(.STEP_CYCLES(4 * T)) plant (
    .clk(clk), .mon(mon), .load(plant_load), .load_pos(plant_load_pos),
    .pos(pos_corr));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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
        $display("FAIL %s at cycle %0d: ERROR=%0d/%0d MON=%b/%b PRENDI=%b/%b st=%0d",
                 what, cycle, error_o, exp_error, mon, exp_mon, prendi, exp_prendi, m_st);
    end
  endtask

  // Compare every cycle, after the inputs of the cycle have settled;
  // count mechanisms from the reference model's view.
  always @(negedge clk) begin
    #2;
    cycle++;
    if (!rst) begin
      chk(error_o == exp_error && mon == exp_mon && prendi == exp_prendi, "outputs");
      if (m_st == 3) begin
        // count each motor period once, at its first cycle
        if (!mon_d) begin
          case (m_secs)
            10: n_motor10++;
            8:  n_motor8++;
            6:  n_motor6++;
            4:  n_motor4++;
            default: ;
          endcase
        end
        if (progr) n_progr_busy++;
        if (progr && model.sum != 0) n_sum_cleared++;
      end
      if (prendi) n_prendi++;
      if (m_st == 1 && pos_corr > 8'(model.tgt)) n_wrap++;
      if (model.show_sum && error_o == 16'(model.sum)) n_show_sum++;
      mon_d = mon;
    end
  end

  // random one-cycle button presses
  always @(negedge clk) begin
    if (rand_button) button <= ($urandom_range(0, 40) == 0);
  end

  task automatic start_run(input logic [7:0] target);
    @(negedge clk);
    pos_ref = target;
    progr = 1'b1;
    @(negedge clk);
    progr = 1'b0;
  endtask

  // Wait for PRENDI; bound: one motor period of at most 10 s plus 2 cycles
  // per step still to go, one step per period in the worst case.
  task automatic wait_done(input int steps, input string what);
    int n;
    int bound;
    bound = (steps + 2) * (10 * T + 2) + 10;
    n = 0;
    while (!prendi && n < bound) begin
      @(negedge clk);
      n++;
    end
    chk(prendi, {what, ": PRENDI within the cycle bound"});
    chk(pos_corr == 8'(model.tgt), {what, ": position reached"});
    @(negedge clk);
  endtask

  initial begin
    rst = 1'b1; progr = 1'b0; button = 1'b0; pos_ref = '0;
    plant_load = 1'b1; plant_load_pos = 8'd0;
    #12 rst = 1'b0;
    @(negedge clk) plant_load = 1'b0;

    // 1: full run 0 -> 200
    start_run(8'd200);
    wait_done(200, "run to 200");

    // 2: already in position
    start_run(8'd200);
    @(negedge clk);                               // compare
    @(negedge clk);
    if (prendi) n_zero_error++;
    chk(prendi, "zero error goes straight to PRENDI");
    @(negedge clk);

    // 3: target behind the position: error wraps, motor goes round
    @(negedge clk) begin plant_load = 1'b1; plant_load_pos = 8'd40; end
    @(negedge clk) plant_load = 1'b0;
    start_run(8'd30);
    wait_done(246, "wrapped run");

    // 4: re-program while the motor runs
    start_run(8'd100);
    while (!mon || model.sum == 0) @(negedge clk);
    repeat (3) @(negedge clk);
    start_run(8'd120);
    chk(model.sum == 0 && !model.show_sum && error_o == 16'(model.err),
        "PROGR clears sum and display");
    wait_done(120, "re-programmed run");

    // 5: BUTTON held high toggles the display every cycle
    start_run(8'd140);
    rand_button = 1'b0;
    @(negedge clk) button = 1'b1;
    begin
      bit prev;
      @(negedge clk) prev = model.show_sum;
      repeat (6) begin
        @(negedge clk);
        #3;
        chk(model.show_sum != prev, "held button toggles");
        chk(error_o == (model.show_sum ? 16'(model.sum) : 16'(model.err)), "held button output");
        if (model.show_sum != prev) n_button_held++;
        prev = model.show_sum;
      end
    end
    button = 1'b0;
    rand_button = 1'b1;
    wait_done(40, "run to 140");

    // 6: reset in the middle of a run
    start_run(8'd200);
    while (!mon) @(negedge clk);
    repeat (5) @(negedge clk);
    rst = 1'b1;
    #1;
    chk(!mon && error_o == 0, "reset mid-run");
    n_reset_busy++;
    @(negedge clk) rst = 1'b0;
    repeat (3) @(negedge clk);
    chk(!mon && !prendi && error_o == 0, "idle after reset");

    // every mechanism must have happened
    chk(n_motor10 > 0, "10 s motor period");
    chk(n_motor8 > 0, "8 s motor period");
    chk(n_motor6 > 0, "6 s motor period");
    chk(n_motor4 > 0, "4 s motor period");
    chk(n_prendi > 0, "PRENDI");
    chk(n_zero_error > 0, "zero error");
    chk(n_wrap > 0, "error wrap");
    chk(n_show_sum > 0, "sum displayed");
    chk(n_progr_busy > 0, "PROGR while busy");
    chk(n_sum_cleared > 0, "sum cleared by PROGR");
    chk(n_button_held > 0, "button held");
    chk(n_reset_busy > 0, "reset while busy");
    $display("mechanisms: motor10=%0d motor8=%0d motor6=%0d motor4=%0d prendi=%0d zero=%0d wrap=%0d show_sum=%0d progr_busy=%0d sum_cleared=%0d button_held=%0d reset_busy=%0d",
             n_motor10, n_motor8, n_motor6, n_motor4, n_prendi, n_zero_error, n_wrap,
             n_show_sum, n_progr_busy, n_sum_cleared, n_button_held, n_reset_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
