// tb_position_fsm: self-checking test of the main controller FSM.
//
// The testbench plays the FSM's surroundings: an error register loaded on
// enable_reg and a one-clock-per-second timer (cleared by reset_timer,
// counting on en_timer, flags at 9/7/5/3). Each scenario sets a target and
// a measured position, pulses progr in IDLE and follows the run cycle by
// cycle: LEGGI must present target - measured (mod 256) with enable_reg,
// COMPARA must clear the timer, a non-zero error must keep MON high for
// exactly 10, 8, 6 or 4 cycles (chosen in the testbench from the error
// against 196/128/64), after which the FSM re-reads; the testbench then
// moves the measured position onto the target so the second read gives
// zero, and PRENDI must pulse for one cycle before IDLE. progr is also
// raised while the motor runs, which must not disturb the run.
module tb_position_fsm;
  import ctrl_pkg::*;

  logic clk = 1'b0;
  logic rst, progr;
  logic [7:0] pos_ref_q, pos_corr, error_q, error_int;
  logic sec10, sec8, sec6, sec4;
  logic enable_reg, reset_timer, en_timer, mon, prendi;
  pos_state_t state;
  int unsigned tcount;
  int checks = 0;
  int failures = 0;
  int runs_per_len [4];

  position_fsm dut (
    .clk(clk), .rst(rst), .progr(progr), .pos_ref_q(pos_ref_q),
    .pos_corr(pos_corr), .error_q(error_q), .sec10(sec10), .sec8(sec8),
    .sec6(sec6), .sec4(sec4), .error_int(error_int), .enable_reg(enable_reg),
    .reset_timer(reset_timer), .en_timer(en_timer), .mon(mon),
    .prendi(prendi), .state(state));

  always #5 clk = ~clk;

  // Surroundings: error register and timer.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      error_q <= '0;
      tcount  <= 0;
    end else begin
      if (enable_reg) error_q <= error_int;
      if (reset_timer) tcount <= 0;
      else if (en_timer) tcount <= tcount + 1;
    end
  end
  assign sec10 = (tcount == 9);
  assign sec8  = (tcount == 7);
  assign sec6  = (tcount == 5);
  assign sec4  = (tcount == 3);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: state=%s mon=%b prendi=%b en=%b rt=%b err_int=%0d",
               what, $time, state.name(), mon, prendi, enable_reg, reset_timer, error_int);
    end
  endtask

  function automatic int unsigned motor_secs(input logic [7:0] e);
    if (e >= 8'd196) return 10;
    if (e >= 8'd128) return 8;
    if (e >= 8'd64)  return 6;
    return 4;
  endfunction

  // One run from IDLE. Signals are checked just after each falling edge.
  task automatic run(input logic [7:0] target, input logic [7:0] measured);
    logic [7:0] e;
    int unsigned secs, mon_cycles;
    e = target - measured;
    @(negedge clk);
    pos_ref_q = target; pos_corr = measured;
    chk(state == ST_IDLE && !mon && !prendi && !enable_reg && !reset_timer, "idle outputs");
    progr = 1'b1;
    @(negedge clk);
    progr = 1'b0;
    chk(state == ST_LEGGI && enable_reg && error_int == e && !mon, "read error");
    @(negedge clk);
    chk(state == ST_COMPARA && reset_timer && !mon && !enable_reg && error_q == e, "compare");
    if (e != 0) begin
      secs = motor_secs(e);
      runs_per_len[(10 - secs) / 2]++;
      mon_cycles = 0;
      @(negedge clk);
      while (mon && mon_cycles < 20) begin
        // progr while the motor runs must be ignored
        progr = (mon_cycles == 1);
        chk(en_timer && !prendi, "motor state outputs");
        mon_cycles++;
        @(negedge clk);
      end
      progr = 1'b0;
      chk(mon_cycles == secs, $sformatf("motor time %0d for error %0d", mon_cycles, e));
      // plant reached the target; the re-read must find zero
      pos_corr = target;
      #1 chk(state == ST_LEGGI && enable_reg && error_int == 0, "re-read");
      @(negedge clk);
      chk(state == ST_COMPARA && reset_timer, "compare zero");
    end
    @(negedge clk);
    chk(state == ST_FINE && prendi && !mon, "done pulse");
    @(negedge clk);
    chk(state == ST_IDLE && !prendi, "back to idle");
  endtask

  initial begin
    rst = 1'b1; progr = 1'b0; pos_ref_q = '0; pos_corr = '0;
    #12 rst = 1'b0;
    // boundaries of the error classes
    run(8'd0,   8'd0);
    run(8'd1,   8'd0);
    run(8'd63,  8'd0);
    run(8'd64,  8'd0);
    run(8'd127, 8'd0);
    run(8'd128, 8'd0);
    run(8'd195, 8'd0);
    run(8'd196, 8'd0);
    run(8'd255, 8'd0);
    run(8'd10,  8'd20);   // measured past the target: error wraps to 246
    for (int i = 0; i < 200; i++) run(8'($urandom), 8'($urandom));
    // reset in the middle of a run
    @(negedge clk); pos_ref_q = 8'd200; pos_corr = 8'd0; progr = 1'b1;
    @(negedge clk); progr = 1'b0;
    repeat (4) @(negedge clk);
    chk(mon, "motor running before reset");
    rst = 1'b1;
    #1 chk(state == ST_IDLE && !mon, "asynchronous reset to idle");
    @(negedge clk) rst = 1'b0;
    foreach (runs_per_len[i]) chk(runs_per_len[i] > 0, "every motor time used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
