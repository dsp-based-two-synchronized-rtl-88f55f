// tmcs_pkg: types and constants shared by the two-motor control system.
//
// The six PWM lines of a three-phase inverter are carried as one packed
// struct, in the order the system diagram lists them: AH, AL, BH, BL, CH, CL.
// AH sits in bit 5 and CL in bit 0, so the struct maps one-to-one onto the
// 6-bit buses datain(5:0), datol(5:0) and dator(5:0) of the buffer chip.
// This bit order is this design's choice; only the signal names are given.
// The numeric defaults are the figures of the reference system: a 160 MHz
// clock, 8000 clock cycles per motor task, two motors.
package tmcs_pkg;

  // One inverter's six switch signals; 1 turns the switch on.
  typedef struct packed {
    logic ah;  // phase A high side
    logic al;  // phase A low side
    logic bh;
    logic bl;
    logic ch;
    logic cl;
  } pwm_sig_t;

  localparam int unsigned PWM_W           = 6;     // lines per motor
  localparam int unsigned NUM_MOTORS      = 2;     // motors in the main configuration
  localparam int unsigned DEF_TASK_CYCLES = 8000;  // clock cycles per motor task
  localparam int unsigned DEF_PWM_PERIOD  = 1600;  // PWM counter period (10 us at 160 MHz)
  localparam int unsigned DEF_KFRAC       = 12;    // fraction bits of the PI gains

endpackage
