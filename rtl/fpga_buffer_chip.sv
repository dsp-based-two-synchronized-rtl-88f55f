// fpga_buffer_chip: the external buffering chip that lets one three-phase
// PWM generation unit drive N_MOTORS inverters.
//
// The PWM unit's six lines arrive on `datain`. The select input `cs` names
// the motor whose task currently owns the PWM unit; that motor's buffer loads
// `datain` at each rising edge of `clk`, and every other buffer holds what it
// last took, so every inverter is driven at all times. For the two-motor
// configuration `cs` is one bit: 0 selects buffer 1 (dato[0], called datol),
// 1 selects buffer 2 (dato[1], called dator). For more motors `cs` is the
// binary buffer index; an index past the last buffer loads none.
// Timing: dato[k] equals the datain value of the previous clock edge at which
// cs was k.
// Following the reference design: the ports cs, clk, datain(5:0), two 6-bit
// outputs, the select polarity and the clocked load/hold behaviour. This
// design's own choices: the asynchronous active-low reset to all-off, and the
// binary select code for more than two motors.
module fpga_buffer_chip #(
  parameter int unsigned N_MOTORS = 2,
  parameter int unsigned WIDTH    = 6,
  localparam int unsigned SEL_W   = (N_MOTORS > 1) ? $clog2(N_MOTORS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SEL_W-1:0] cs,
  input  logic [WIDTH-1:0] datain,
  output logic [WIDTH-1:0] dato [N_MOTORS]
);

  logic [N_MOTORS-1:0] load;

  // CS decode: exactly one buffer is loaded for an in-range select.
  always_comb begin
    for (int unsigned k = 0; k < N_MOTORS; k++)
      load[k] = (32'(cs) == k);
  end

  for (genvar k = 0; k < N_MOTORS; k++) begin : g_buf
    motor_buffer #(.WIDTH(WIDTH)) u_buf (
      .clk   (clk),
      .rst_n (rst_n),
      .load  (load[k]),
      .d     (datain),
      .q     (dato[k])
    );
  end

  // The decode never selects two buffers at once.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(load));

endmodule
