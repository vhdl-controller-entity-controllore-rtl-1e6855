// error_accumulator: running sum of the position errors.
//
// On each rising clock edge with en high (the controller's enable_reg, high
// in its read state) the IN_W-bit error din, zero-extended, is added to the
// SUM_W-bit sum, which wraps modulo 2^SUM_W. clr (the PROGR input) clears
// the sum synchronously and has priority over en; rst clears it
// asynchronously. One cycle latency from en to sum.
//
// Widths (8-bit error, 16-bit sum) and the clear on PROGR follow the
// original design; the original clears asynchronously on PROGR, here the
// clear is synchronous.
module error_accumulator #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned SUM_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             en,
  input  logic [IN_W-1:0]  din,
  output logic [SUM_W-1:0] sum
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)      sum <= '0;
    else if (clr) sum <= '0;
    else if (en)  sum <= sum + SUM_W'(din);
  end

endmodule
