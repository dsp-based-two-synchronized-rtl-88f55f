// cs_task_scheduler: hands the shared PWM unit to each motor task in turn and
// drives the buffer select line CS.
//
// Time is cut into slots of TASK_CYCLES clock cycles, the time one motor's
// control task takes. Slot after slot, `cs` counts 0, 1, ..., N_MOTORS-1 and
// wraps; for two motors it is the toggling select line of the reference
// system, low for motor 1 and high for motor 2. `slot_start` is high in the
// first cycle of every slot. After reset the first slot belongs to motor 1
// (cs = 0) and starts at once.
// Following the reference design: one slot per task, 8000 cycles per task,
// CS toggling between the tasks. This design's own choices: generating the
// select in hardware from a counter (the reference toggles a processor I/O
// pin from software) and the start-up order.
module cs_task_scheduler #(
  parameter int unsigned N_MOTORS    = 2,
  parameter int unsigned TASK_CYCLES = 8000,
  localparam int unsigned SEL_W      = (N_MOTORS > 1) ? $clog2(N_MOTORS) : 1,
  localparam int unsigned CNT_W      = (TASK_CYCLES > 1) ? $clog2(TASK_CYCLES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [SEL_W-1:0] cs,
  output logic             slot_start
);

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      cs  <= '0;
    end else if (cnt == CNT_W'(TASK_CYCLES - 1)) begin
      cnt <= '0;
      cs  <= (cs == SEL_W'(N_MOTORS - 1)) ? '0 : cs + 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  assign slot_start = (cnt == '0);

endmodule
