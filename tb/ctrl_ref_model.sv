// ctrl_ref_model: cycle-accurate reference of the position controller,
// used by the end-to-end testbenches to predict ERROR, MON and PRENDI.
//
// It is written from the controller's specification as one clocked process
// on plain integers, with no code shared with the RTL: a state number
// (0 idle, 1 read, 2 compare, 3 motor, 4 done), the motor time in seconds,
// the timer count, the stored target, the stored error, the error sum and
// the display selection. Every register updates from the values before the
// clock edge. Outputs are valid between edges, like the design's.
module ctrl_ref_model #(
  parameter int unsigned TICKS_PER_SEC = 1000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        progr,
  input  logic        button,
  input  logic [7:0]  pos_ref,
  input  logic [7:0]  pos_corr,
  output logic [15:0] exp_error,
  output logic        exp_mon,
  output logic        exp_prendi,
  output int          st,         // 0 idle, 1 read, 2 compare, 3 motor, 4 done
  output int          secs,       // motor time of the current motor state
  output int          err_read    // error formed in the read state, else 0
);
  int tgt, err, cnt, sum;
  bit show_sum;

  assign exp_mon    = (st == 3);
  assign exp_prendi = (st == 4);
  assign exp_error  = show_sum ? 16'(sum) : 16'(err);
  assign err_read   = (st == 1) ? ((tgt - int'(pos_corr)) & 255) : 0;

  always @(posedge clk or posedge rst) begin
    if (rst) begin
      st = 0; secs = 0; tgt = 0; err = 0; cnt = 0; sum = 0; show_sum = 0;
    end else begin
      int nst, nsecs, ncnt, nerr, nsum;
      nst = st; nsecs = secs; ncnt = cnt; nerr = err; nsum = sum;
      case (st)
        0: if (progr) nst = 1;
        1: begin
          nerr = err_read;
          nsum = (sum + err_read) & 16'hFFFF;
          nst  = 2;
        end
        2: begin
          ncnt = 0;
          if (err == 0) nst = 4;
          else begin
            nst = 3;
            nsecs = (err >= 196) ? 10 : (err >= 128) ? 8 : (err >= 64) ? 6 : 4;
          end
        end
        3: begin
          ncnt = cnt + 1;
          if (cnt == secs * int'(TICKS_PER_SEC) - 1) nst = 1;
        end
        default: nst = 0;
      endcase
      if (progr) begin
        tgt = int'(pos_ref);
        nsum = 0;
        show_sum = 0;
      end else if (button) begin
        show_sum = !show_sum;
      end
      st = nst; secs = nsecs; cnt = ncnt; err = nerr; sum = nsum;
    end
  end
endmodule
