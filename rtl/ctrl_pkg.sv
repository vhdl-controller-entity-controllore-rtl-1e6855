// ctrl_pkg: types and constants shared by the position controller.
//
// The controller reads an 8-bit target position and an 8-bit measured
// position, runs a motor for a time chosen from the size of their
// difference, and keeps a 16-bit running sum of the errors it has read.
// This package holds the data widths and the state types of its two
// finite-state machines so that the blocks and the testbenches agree on them.
package ctrl_pkg;

  // Width of a position and of a position error.
  localparam int unsigned POS_W = 8;
  // Width of the error sum and of the ERROR output.
  localparam int unsigned SUM_W = 16;

  // Main controller states. The names follow the original design:
  // IDLE waits for PROGR, LEGGI ("read") samples the error, COMPARA
  // ("compare") classes it, ATTIVAn ("activate") runs the motor for n
  // seconds, FINE ("end") signals that the target has been reached.
  typedef enum logic [2:0] {
    ST_IDLE     = 3'd0,
    ST_LEGGI    = 3'd1,
    ST_COMPARA  = 3'd2,
    ST_ATTIVA10 = 3'd3,
    ST_ATTIVA8  = 3'd4,
    ST_ATTIVA6  = 3'd5,
    ST_ATTIVA4  = 3'd6,
    ST_FINE     = 3'd7
  } pos_state_t;

  // Output selector states: USCITA1 shows the last error, USCITA2 the sum.
  typedef enum logic {
    ST_USCITA1 = 1'b0,
    ST_USCITA2 = 1'b1
  } disp_state_t;

endpackage
