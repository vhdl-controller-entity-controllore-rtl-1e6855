// position_fsm: main controller of the positioning loop.
//
// States and what they do (Moore outputs):
//   IDLE      waits; PROGR high moves to LEGGI.
//   LEGGI     forms the position error pos_ref_q - pos_corr on error_int
//             (8-bit, modulo 256) and raises enable_reg, which stores it in
//             the error register and adds it to the error sum. Next: COMPARA.
//   COMPARA   clears the timer (reset_timer). A stored error of zero goes to
//             FINE; otherwise error >= TH10 goes to ATTIVA10, >= TH8 to
//             ATTIVA8, >= TH6 to ATTIVA6, anything smaller to ATTIVA4.
//   ATTIVAn   motor on (MON) with the timer counting (en_timer) until the
//             timer's n-second flag, then back to LEGGI to measure again.
//   FINE      PRENDI high for one cycle ("position reached"), then IDLE.
// LEGGI and COMPARA last one cycle each, so one measurement round with a
// non-zero error takes 2 + n*TICKS_PER_SEC cycles.
//
// The state sequence, the thresholds 196/128/64 and the output of each state
// follow the original design. The error is the unsigned difference as the
// original writes it, so a measured position past the target wraps to a
// large error. rst is asynchronous and returns to IDLE.
module position_fsm
  import ctrl_pkg::*;
#(
  parameter int unsigned TH10 = 196,
  parameter int unsigned TH8  = 128,
  parameter int unsigned TH6  = 64
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             progr,
  input  logic [POS_W-1:0] pos_ref_q,
  input  logic [POS_W-1:0] pos_corr,
  input  logic [POS_W-1:0] error_q,
  input  logic             sec10,
  input  logic             sec8,
  input  logic             sec6,
  input  logic             sec4,
  output logic [POS_W-1:0] error_int,
  output logic             enable_reg,
  output logic             reset_timer,
  output logic             en_timer,
  output logic             mon,
  output logic             prendi,
  output pos_state_t       state
);

  pos_state_t cs, ns;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) cs <= ST_IDLE;
    else     cs <= ns;
  end

  always_comb begin
    ns          = cs;
    error_int   = '0;
    enable_reg  = 1'b0;
    reset_timer = 1'b0;
    en_timer    = 1'b0;
    mon         = 1'b0;
    prendi      = 1'b0;
    unique case (cs)
      ST_IDLE: if (progr) ns = ST_LEGGI;
      ST_LEGGI: begin
        error_int  = pos_ref_q - pos_corr;
        enable_reg = 1'b1;
        ns         = ST_COMPARA;
      end
      ST_COMPARA: begin
        reset_timer = 1'b1;
        if (error_q == '0)                  ns = ST_FINE;
        else if (error_q >= POS_W'(TH10))   ns = ST_ATTIVA10;
        else if (error_q >= POS_W'(TH8))    ns = ST_ATTIVA8;
        else if (error_q >= POS_W'(TH6))    ns = ST_ATTIVA6;
        else                                ns = ST_ATTIVA4;
      end
      ST_ATTIVA10: begin
        en_timer = 1'b1;
        mon      = 1'b1;
        if (sec10) ns = ST_LEGGI;
      end
      ST_ATTIVA8: begin
        en_timer = 1'b1;
        mon      = 1'b1;
        if (sec8) ns = ST_LEGGI;
      end
      ST_ATTIVA6: begin
        en_timer = 1'b1;
        mon      = 1'b1;
        if (sec6) ns = ST_LEGGI;
      end
      ST_ATTIVA4: begin
        en_timer = 1'b1;
        mon      = 1'b1;
        if (sec4) ns = ST_LEGGI;
      end
      ST_FINE: begin
        prendi = 1'b1;
        ns     = ST_IDLE;
      end
      default: ns = ST_IDLE;
    endcase
  end

  assign state = cs;

  // Exactly one of: motor running, timer cleared, error sampled, done.
  a_outputs_exclusive: assert property (@(posedge clk) disable iff (rst)
    $onehot0({mon, reset_timer, enable_reg, prendi}));
  a_timer_with_motor: assert property (@(posedge clk) disable iff (rst)
    en_timer == mon);

endmodule
