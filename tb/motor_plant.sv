// motor_plant: testbench model of the positioned mechanism.
//
// While mon is high the position advances by one step every
// STEP_CYCLES clock cycles of motor time, counted from the start of each
// motor period, and wraps from 255 to 0. With STEP_CYCLES equal to four
// seconds of clock cycles, a 4 s or 6 s motor period moves one step and an
// 8 s or 10 s period two, so the controller's unsigned error never
// overshoots past zero. load/load_pos set the position directly.
module motor_plant #(
  parameter int unsigned STEP_CYCLES = 4
) (
  input  logic       clk,
  input  logic       mon,
  input  logic       load,
  input  logic [7:0] load_pos,
  output logic [7:0] pos
);
  int unsigned phase = 0;
  initial pos = '0;

  always @(posedge clk) begin
    if (load) begin
      pos   <= load_pos;
      phase <= 0;
    end else if (mon) begin
      if (phase == STEP_CYCLES - 1) begin
        pos   <= pos + 8'd1;
        phase <= 0;
      end else begin
        phase <= phase + 1;
      end
    end else begin
      phase <= 0;
    end
  end
endmodule
