// load_reg: register with load enable and asynchronous reset.
//
// On a rising clock edge with en high, q takes d; otherwise q holds. rst
// (active high, asynchronous) clears q to zero. The controller uses two of
// these, as in the original design: one stores the target position while
// PROGR is high, the other stores the position error in the read state.
// Timing: q shows d from the edge at which en was sampled high (one cycle
// latency).
module load_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     q <= '0;
    else if (en) q <= d;
  end

endmodule
