// tmcs_top: torque control of several BLDC motors with one shared PWM
// generation unit and an external buffer chip; two motors by default.
//
// Each motor has its own current loop (a PI controller and a six-step
// commutation stage), as each core of a dual-core controller runs one motor's
// task. Only one three-phase PWM unit exists, so the motors take turns: the
// task scheduler gives the PWM unit to motor 1 for TASK_CYCLES clocks with
// cs = 0, then to motor 2 with cs = 1, and so on round-robin. At the first
// cycle of its slot a motor's PI controller samples its current set point
// and feedback; from the next cycle to the end of the slot the PWM unit runs
// with that motor's new duty and commutation sector. The buffer chip copies
// the PWM bus into the buffer selected by cs; every other buffer holds the
// last state it took, so all inverters are driven at all times.
// Interface: per-motor arrays, index 0 = motor 1. datain is the shared PWM
// bus; dato[k] feeds inverter k+1 (for two motors dato[0] is the buffer
// chip's datol output, lines AH1..CL1, and dato[1] its dator output, AH2..CL2).
// Line order on every bus is {AH, AL, BH, BL, CH, CL}. u and u_valid show each
// PI controller's output and its update strobe; hall_fault flags an illegal
// hall code per motor.
// Timing: dato[k] follows datain with one clock of delay while cs = k; a slot
// is TASK_CYCLES clocks, a full round N_MOTORS * TASK_CYCLES.
// Following the reference design: the structure (per-motor tasks, one shared
// PWM unit, a select line, one buffer per motor), two motors and the
// 8000-cycle task slot. This design's own choices: the control loops built in
// hardware rather than as processor software, the PWM period, the number
// formats, the moment a task hands its result to the PWM unit, and the reset.
module tmcs_top
  import tmcs_pkg::*;
#(
  parameter int unsigned N_MOTORS    = NUM_MOTORS,
  parameter int unsigned TASK_CYCLES = DEF_TASK_CYCLES,
  parameter int unsigned PWM_PERIOD  = DEF_PWM_PERIOD,
  parameter int unsigned KFRAC       = DEF_KFRAC,
  localparam int unsigned SEL_W      = (N_MOTORS > 1) ? $clog2(N_MOTORS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0]         i_ref   [N_MOTORS],
  input  logic signed [15:0]         i_fb    [N_MOTORS],
  input  logic        [2:0]          hall    [N_MOTORS],
  input  logic signed [15:0]         k0      [N_MOTORS],
  input  logic signed [15:0]         k1      [N_MOTORS],
  output logic        [SEL_W-1:0]    cs,
  output pwm_sig_t                   datain,
  output pwm_sig_t                   dato    [N_MOTORS],
  output logic        [15:0]         u       [N_MOTORS],
  output logic                       u_valid [N_MOTORS],
  output logic        [N_MOTORS-1:0] hall_fault
);

  localparam int unsigned NM = N_MOTORS;

  logic       slot_start;
  logic       sample [NM];
  pwm_sig_t   sw_en [NM];
  logic [PWM_W-1:0] buf_q [NM];

  cs_task_scheduler #(
    .N_MOTORS    (NM),
    .TASK_CYCLES (TASK_CYCLES)
  ) u_sched (
    .clk        (clk),
    .rst_n      (rst_n),
    .cs         (cs),
    .slot_start (slot_start)
  );

  for (genvar k = 0; k < NM; k++) begin : g_loop
    assign sample[k] = slot_start && (cs == SEL_W'(k));

    current_pi #(
      .DW    (16),
      .KFRAC (KFRAC),
      .U_MAX (PWM_PERIOD)
    ) u_pi (
      .clk   (clk),
      .rst_n (rst_n),
      .sample(sample[k]),
      .i_ref (i_ref[k]),
      .i_fb  (i_fb[k]),
      .k0    (k0[k]),
      .k1    (k1[k]),
      .u     (u[k]),
      .valid (u_valid[k])
    );

    six_step_commutation u_comm (
      .clk        (clk),
      .rst_n      (rst_n),
      .hall       (hall[k]),
      .en         (sw_en[k]),
      .hall_fault (hall_fault[k])
    );
  end

  // The shared PWM unit works for the motor that owns the current slot.
  pwm_unit #(
    .CW     (16),
    .PERIOD (PWM_PERIOD)
  ) u_pwm (
    .clk          (clk),
    .rst_n        (rst_n),
    .duty         (u[cs]),
    .en           (sw_en[cs]),
    .pwm          (datain)
  );

  fpga_buffer_chip #(
    .N_MOTORS (NM),
    .WIDTH    (PWM_W)
  ) u_chip (
    .clk    (clk),
    .rst_n  (rst_n),
    .cs     (cs),
    .datain (datain),
    .dato   (buf_q)
  );

  for (genvar k = 0; k < NM; k++) begin : g_out
    assign dato[k] = pwm_sig_t'(buf_q[k]);
  end

endmodule
