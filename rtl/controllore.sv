// controllore: position controller with error display and error sum.
//
// PROGR high stores the target POS_REF and starts a run. The controller then
// repeats a measure-and-move round: it takes the error POS_REF - POS_CORR
// (8-bit, modulo 256), stores it, and if it is non-zero switches the motor
// on (MON) for 10, 8, 6 or 4 seconds according to the error (>= 196, >= 128,
// >= 64, smaller), then measures again. When the stored error is zero it
// pulses PRENDI for one cycle and waits for the next PROGR. Every error it
// reads is also added into a 16-bit sum. ERROR shows the last stored error,
// or the sum after BUTTON has switched the display; PROGR clears the sum
// and returns the display to the last error.
//
// Structure, as in the original design: two load registers (target position
// and error), the seconds timer, the main FSM (position_fsm), the display
// FSM (display_fsm) and the error accumulator. RESET is an asynchronous,
// active-high reset of everything. TICKS_PER_SEC sets the clock cycles in
// one second: 1000 by default (10 s = 10000 cycles on a 14-bit counter);
// 1 gives the one-clock-per-second setting the original used in simulation.
// Timing: PROGR sampled in IDLE -> error read in the next cycle -> compare
// one cycle later -> motor for n*TICKS_PER_SEC cycles -> read again.
// The nets c_count, state and show_sum drive no port; they name the timer
// count, the main state and the display state for waveform viewing, and a
// linter reports them as unused.
module controllore
  import ctrl_pkg::*;
#(
  parameter int unsigned TICKS_PER_SEC = 1000,
  parameter int unsigned CNT_W         = 14,
  parameter int unsigned TH10          = 196,
  parameter int unsigned TH8           = 128,
  parameter int unsigned TH6           = 64
) (
  input  logic             CLK,
  input  logic             RESET,
  input  logic             PROGR,
  input  logic             BUTTON,
  input  logic [POS_W-1:0] POS_REF,
  input  logic [POS_W-1:0] POS_CORR,
  output logic [SUM_W-1:0] ERROR,
  output logic             PRENDI,
  output logic             MON
);

  logic [POS_W-1:0] pos_ref_ck, error_ck, error_int;
  logic             enable_reg, reset_timer, en_timer;
  logic             sec10, sec8, sec6, sec4;
  logic [CNT_W-1:0] c_count;
  logic [SUM_W-1:0] somma;
  pos_state_t       state;
  logic             show_sum;

  // First part: target register, error register, timer, main FSM.
  load_reg #(.W(POS_W)) u_pos_ref_reg (
    .clk (CLK), .rst (RESET), .en (PROGR), .d (POS_REF), .q (pos_ref_ck)
  );

  load_reg #(.W(POS_W)) u_error_reg (
    .clk (CLK), .rst (RESET), .en (enable_reg), .d (error_int), .q (error_ck)
  );

  seconds_timer #(.CNT_W(CNT_W), .TICKS_PER_SEC(TICKS_PER_SEC)) u_timer (
    .clk   (CLK),
    .rst   (RESET),
    .clr   (reset_timer),
    .en    (en_timer),
    .count (c_count),
    .sec10 (sec10),
    .sec8  (sec8),
    .sec6  (sec6),
    .sec4  (sec4)
  );

  position_fsm #(.TH10(TH10), .TH8(TH8), .TH6(TH6)) u_fsm (
    .clk         (CLK),
    .rst         (RESET),
    .progr       (PROGR),
    .pos_ref_q   (pos_ref_ck),
    .pos_corr    (POS_CORR),
    .error_q     (error_ck),
    .sec10       (sec10),
    .sec8        (sec8),
    .sec6        (sec6),
    .sec4        (sec4),
    .error_int   (error_int),
    .enable_reg  (enable_reg),
    .reset_timer (reset_timer),
    .en_timer    (en_timer),
    .mon         (MON),
    .prendi      (PRENDI),
    .state       (state)
  );

  // Second part: error sum and display selection, both cleared by PROGR.
  error_accumulator #(.IN_W(POS_W), .SUM_W(SUM_W)) u_acc (
    .clk (CLK), .rst (RESET), .clr (PROGR), .en (enable_reg),
    .din (error_int), .sum (somma)
  );

  display_fsm #(.ERR_W(POS_W), .OUT_W(SUM_W)) u_display (
    .clk       (CLK),
    .rst       (RESET),
    .clr       (PROGR),
    .button    (BUTTON),
    .error_q   (error_ck),
    .sum       (somma),
    .error_out (ERROR),
    .show_sum  (show_sum)
  );

endmodule
