// tb_tmcs_ten_motors: the ten-motor configuration of the scaling argument.
//
// With a 160 MHz clock and 8000 cycles per motor task, ten tasks fill a
// 0.5 ms update period (80000 cycles). This testbench builds the system with
// N_MOTORS = 10 at the default slot length and PWM period, closes all ten
// current loops with first-order current plants (set point 300*(k+1) for
// motor k+1) and rotating hall patterns, and runs 40 rounds (3.2 million
// clocks). It checks at every clock that the select counts 0..9 in 8000-cycle
// slots, that each buffer follows the PWM bus exactly while selected and
// holds otherwise, and that the low-side lines on the bus match the selected
// motor's commutation sector. It checks that every controller updates exactly
// once per 80000 cycles and that every motor current settles within 15
// counts of its set point.
module tb_tmcs_ten_motors;
  import tmcs_pkg::*;
  localparam int NM     = 10;
  localparam int TASK   = 8000;
  localparam int ROUNDS = 40;
  localparam logic [2:0] SEQ [6] = '{3'b100, 3'b110, 3'b010, 3'b011, 3'b001, 3'b101};

  logic               clk = 1'b0;
  logic               rst_n;
  logic signed [15:0] i_ref [NM];
  logic signed [15:0] i_fb  [NM];
  logic        [2:0]  hall  [NM];
  logic signed [15:0] k0    [NM];
  logic signed [15:0] k1    [NM];
  logic        [3:0]  cs;
  pwm_sig_t           datain;
  pwm_sig_t           dato  [NM];
  logic        [15:0] u     [NM];
  logic               u_valid [NM];
  logic        [NM-1:0] hall_fault;

  tmcs_top #(.N_MOTORS(NM)) dut (
    .clk(clk), .rst_n(rst_n), .i_ref(i_ref), .i_fb(i_fb), .hall(hall), .k0(k0), .k1(k1),
    .cs(cs), .datain(datain), .dato(dato), .u(u), .u_valid(u_valid), .hall_fault(hall_fault));

  always #3 clk = ~clk;

  int checks = 0, failures = 0;
  int last_valid [NM];
  int n_valid [NM];
  int sector [NM];
  longint plant [NM];
  logic [2:0] hist [NM][3];
  pwm_sig_t buf_m [NM];

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%s", what);
    end
  endtask

  function automatic logic [2:0] low_lines(input logic [2:0] h);
    // low-side switch per phase {A, B, C} for a hall code
    for (int s = 0; s < 6; s++)
      if (SEQ[s] == h) return 3'b100 >> (((s + 1) / 2 + 1) % 3);
    return 3'b000;
  endfunction

  initial begin
    int kc;
    rst_n = 1'b0;
    for (int k = 0; k < NM; k++) begin
      i_ref[k] = 16'(300 * (k + 1)); i_fb[k] = '0; hall[k] = SEQ[k % 6];
      k0[k] = 16'sd2560; k1[k] = -16'sd1536;
      plant[k] = 0; sector[k] = k % 6; last_valid[k] = -1; n_valid[k] = 0;
      for (int j = 0; j < 3; j++) hist[k][j] = 3'b000;
      buf_m[k] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < ROUNDS * NM * TASK; t++) begin
      if (t > 0) @(negedge clk);
      kc = (t / TASK) % NM;
      check(cs == 4'(kc), $sformatf("t=%0d cs=%0d expected %0d", t, cs, kc));
      for (int k = 0; k < NM; k++)
        check(dato[k] == buf_m[k], $sformatf("t=%0d buffer %0d=%b expected %b", t, k, dato[k], buf_m[k]));
      check({datain.al, datain.bl, datain.cl} == low_lines(hist[kc][2]),
            $sformatf("t=%0d low-side lines %b for motor %0d", t, {datain.al, datain.bl, datain.cl}, kc + 1));
      buf_m[kc] = datain;
      for (int k = 0; k < NM; k++)
        if (u_valid[k]) begin
          if (last_valid[k] >= 0)
            check(t - last_valid[k] == NM * TASK,
                  $sformatf("motor %0d update interval %0d", k + 1, t - last_valid[k]));
          last_valid[k] = t;
          n_valid[k]++;
        end
      // hall patterns rotate at different speeds
      for (int k = 0; k < NM; k++) begin
        if (t > 0 && t % (2000 + 250 * k) == 0) sector[k] = (sector[k] + 1) % 6;
        hall[k] = SEQ[sector[k]];
        hist[k][2] = hist[k][1]; hist[k][1] = hist[k][0]; hist[k][0] = hall[k];
      end
      // plant advances just before its motor samples
      if (t % TASK == 0) begin
        plant[kc] = plant[kc] + (longint'(u[kc]) * 4 - plant[kc]) / 8;
        i_fb[kc] = 16'(plant[kc]);
      end
    end
    for (int k = 0; k < NM; k++) begin
      check(n_valid[k] >= ROUNDS - 1, $sformatf("motor %0d updated %0d times", k + 1, n_valid[k]));
      check(plant[k] >= longint'(300 * (k + 1) - 15) && plant[k] <= longint'(300 * (k + 1) + 15),
            $sformatf("motor %0d current %0d, set point %0d", k + 1, plant[k], 300 * (k + 1)));
    end
    $display("ten motors: %0d controller updates each, update period %0d cycles", n_valid[0], NM * TASK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
