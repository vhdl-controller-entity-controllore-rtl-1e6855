// display_fsm: selects what the ERROR output shows.
//
// Two states. USCITA1 drives error_out with the stored position error,
// zero-extended to OUT_W bits; USCITA2 drives it with the accumulated error
// sum. While button is high the state flips on every rising clock edge
// (the button is sampled as a level, as in the original design, which has
// no edge detector or debouncer). rst (asynchronous) and clr (the PROGR
// input, synchronous, priority over button) return to USCITA1.
// error_out is combinational from the state and the data inputs;
// show_sum is high in USCITA2.
//
// The original resets this machine asynchronously from RESET or PROGR;
// taking PROGR as a synchronous clear is this design's choice.
module display_fsm
  import ctrl_pkg::*;
#(
  parameter int unsigned ERR_W = 8,
  parameter int unsigned OUT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             button,
  input  logic [ERR_W-1:0] error_q,
  input  logic [OUT_W-1:0] sum,
  output logic [OUT_W-1:0] error_out,
  output logic             show_sum
);

  disp_state_t cs, ns;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)      cs <= ST_USCITA1;
    else if (clr) cs <= ST_USCITA1;
    else          cs <= ns;
  end

  always_comb begin
    ns = cs;
    unique case (cs)
      ST_USCITA1: begin
        error_out = OUT_W'(error_q);
        if (button) ns = ST_USCITA2;
      end
      ST_USCITA2: begin
        error_out = sum;
        if (button) ns = ST_USCITA1;
      end
      default: error_out = OUT_W'(error_q);
    endcase
  end

  assign show_sum = (cs == ST_USCITA2);

endmodule
