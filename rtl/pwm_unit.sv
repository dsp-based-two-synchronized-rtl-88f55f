// pwm_unit: the single three-phase PWM generation unit shared by all motors.
//
// A CW-bit counter runs from 0 to PERIOD-1 and wraps (edge-aligned PWM). The
// PWM level is high while the counter is below `duty`; a duty of PERIOD or
// more gives 100 %, 0 gives 0 %. The six outputs are the switch enables from
// commutation with the high-side switches chopped by the PWM level and the
// low-side switches left on for the whole sector, so the three low-side
// outputs are the enables passed straight through.
// Timing: the counter is a register; `pwm` is decoded from it and from the
// present `duty` and `en`, so a new duty or sector shows in the same cycle.
// Following the reference design: one three-phase unit with a 16-bit counter
// and six outputs AH, AL, BH, BL, CH, CL. This design's own choices: the
// edge-aligned mode, the period and high-side-only chopping.
module pwm_unit
  import tmcs_pkg::*;
#(
  parameter int unsigned CW     = 16,
  parameter int unsigned PERIOD = 1600
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] duty,
  input  pwm_sig_t      en,
  output pwm_sig_t      pwm
);

  logic [CW-1:0] cnt;
  logic          on;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        cnt <= '0;
    else if (cnt == CW'(PERIOD - 1))   cnt <= '0;
    else                               cnt <= cnt + 1'b1;
  end

  assign on = (cnt < duty);

  always_comb begin
    pwm    = en;
    pwm.ah = en.ah & on;
    pwm.bh = en.bh & on;
    pwm.ch = en.ch & on;
  end

endmodule
