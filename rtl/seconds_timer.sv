// seconds_timer: interval counter of the position controller.
//
// A CNT_W-bit counter that counts clock cycles while en is high. clr (the
// controller's reset_timer, high in the compare state) sets it back to zero
// synchronously and has priority over en; rst clears it asynchronously.
// Four flags decode the last cycle of a 10, 8, 6 and 4 second interval:
// secN is high while count == N*TICKS_PER_SEC - 1, so a motor state that
// starts with count 0 and leaves on secN lasts exactly N*TICKS_PER_SEC
// cycles.
//
// The 14-bit width and the 1000 cycles per second (10 s = 10000 cycles)
// follow the original design; with TICKS_PER_SEC = 1 one second is one
// clock, which the original used for simulation. Making reset_timer a
// synchronous clear rather than part of an asynchronous reset is this
// design's choice; it gives the same count in every motor state.
module seconds_timer #(
  parameter int unsigned CNT_W         = 14,
  parameter int unsigned TICKS_PER_SEC = 1000
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             en,
  output logic [CNT_W-1:0] count,
  output logic             sec10,
  output logic             sec8,
  output logic             sec6,
  output logic             sec4
);

  localparam logic [CNT_W-1:0] LAST10 = CNT_W'(10 * TICKS_PER_SEC - 1);
  localparam logic [CNT_W-1:0] LAST8  = CNT_W'(8 * TICKS_PER_SEC - 1);
  localparam logic [CNT_W-1:0] LAST6  = CNT_W'(6 * TICKS_PER_SEC - 1);
  localparam logic [CNT_W-1:0] LAST4  = CNT_W'(4 * TICKS_PER_SEC - 1);

  // The longest interval must fit in the counter.
  initial assert (10 * TICKS_PER_SEC - 1 < (1 << CNT_W))
    else $error("seconds_timer: 10 s does not fit in %0d bits", CNT_W);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)      count <= '0;
    else if (clr) count <= '0;
    else if (en)  count <= count + 1'b1;
  end

  assign sec10 = (count == LAST10);
  assign sec8  = (count == LAST8);
  assign sec6  = (count == LAST6);
  assign sec4  = (count == LAST4);

endmodule
