// motor_buffer: one motor's output buffer in the FPGA buffer chip.
//
// A WIDTH-bit register on the system clock. While `load` is high it copies
// the shared PWM bus `d` at every rising clock edge, so the motor's inverter
// follows the PWM unit; while `load` is low it keeps the last value it took.
// Output `q` changes one clock edge after `d`. Reset (asynchronous, active
// low) clears all lines, which turns every inverter switch off.
// Following the reference design: the register per motor, the load-by-select
// and hold-otherwise behaviour, the 6-bit width. This design's own choices:
// the reset, which the reference leaves undefined, and its all-off value.
module motor_buffer #(
  parameter int unsigned WIDTH = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

endmodule
