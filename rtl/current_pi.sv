// current_pi: discrete current (torque) PI controller in incremental form.
//
//   e(n) = i_ref - i_fb
//   u(n) = u(n-1) + K0*e(n) + K1*e(n-1),  K0 = Kp + Ki*T/2,  K1 = -Kp + Ki*T/2
//
// The controller recomputes once per `sample` strobe (one clock wide). The
// gains are signed fixed point with KFRAC fraction bits (Q3.12 by default),
// the currents are signed DW-bit integers in the units of the current ADC.
// u(n-1) is kept in full precision (KFRAC fraction bits) so that small
// corrections are not lost to rounding, and it is clamped to 0..U_MAX, the
// range of the PWM duty it drives; clamping the stored value also stops the
// integral part from winding up while the output is saturated.
// Timing: `u` and `valid` update on the clock edge that ends the sample
// cycle, so the new output is visible one cycle after `sample`.
// Following the reference design: the difference equation and the meaning of
// K0 and K1. This design's own choices: the number formats, the 0..U_MAX
// clamp (a limiter sits after the PI block in the control diagram, but its
// limits are not given) and the reset of u and e(n-1) to zero.
module current_pi #(
  parameter int unsigned DW    = 16,
  parameter int unsigned KFRAC = 12,
  parameter int unsigned U_MAX = 1600
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sample,
  input  logic signed [DW-1:0] i_ref,
  input  logic signed [DW-1:0] i_fb,
  input  logic signed [DW-1:0] k0,
  input  logic signed [DW-1:0] k1,
  output logic        [DW-1:0] u,
  output logic                 valid
);

  localparam int unsigned EW   = DW + 1;           // error width
  localparam int unsigned ACCW = 2 * DW + KFRAC + 4; // accumulator width
  localparam logic signed [ACCW-1:0] ACC_MAX = ACCW'(U_MAX) <<< KFRAC;

  logic signed [EW-1:0]   e, e_prev;
  logic signed [ACCW-1:0] acc, sum;

  assign e   = EW'(i_ref) - EW'(i_fb);
  assign sum = acc + ACCW'(k0 * e) + ACCW'(k1 * e_prev);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= '0;
      e_prev <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= sample;
      if (sample) begin
        e_prev <= e;
        if (sum < 0)            acc <= '0;
        else if (sum > ACC_MAX) acc <= ACC_MAX;
        else                    acc <= sum;
      end
    end
  end

  assign u = acc[KFRAC +: DW];

endmodule
