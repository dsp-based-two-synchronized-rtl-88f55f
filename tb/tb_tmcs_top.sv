// tb_tmcs_top: end-to-end test of the two-motor system at its default sizes
// (8000-cycle task slots, 1600-cycle PWM period), run for 70 frames of two
// slots (1.12 million clocks).
//
// The testbench closes both current loops with a behavioural motor model: per
// motor a first-order current plant i <- i + (4*u - i)/8, advanced once per
// frame just before that motor's controller samples, and a hall sensor
// pattern that steps through the six sectors at a fixed rate per motor.
// An independent cycle-level reference model predicts, at every clock, the
// select line, each PI output (incremental PI with clamp), each commutation
// pattern (three-edge latency from the hall code), the shared PWM bus and the
// two buffer outputs, and every output is compared with it.
// Set-point steps, a load disturbance, a saturating set point, a step to
// zero and an illegal hall code exercise the mechanisms; each is counted and
// the test fails if one never happened. At the end both currents must sit
// within 15 counts of their set points.
module tb_tmcs_top;
  import tmcs_pkg::*;
  localparam int TASK = 8000;
  localparam int PER  = 1600;
  localparam int KF   = 12;
  localparam int FRAMES = 70;
  localparam logic [2:0] SEQ [6] = '{3'b100, 3'b110, 3'b010, 3'b011, 3'b001, 3'b101};

  logic               clk = 1'b0;
  logic               rst_n;
  logic signed [15:0] i_ref [2];
  logic signed [15:0] i_fb  [2];
  logic        [2:0]  hall  [2];
  logic signed [15:0] k0    [2];
  logic signed [15:0] k1    [2];
  logic               cs;
  pwm_sig_t           datain;
  pwm_sig_t           dato  [2];
  logic        [15:0] u     [2];
  logic               u_valid [2];
  logic        [1:0]  hall_fault;

  tmcs_top dut (
    .clk(clk), .rst_n(rst_n), .i_ref(i_ref), .i_fb(i_fb), .hall(hall), .k0(k0), .k1(k1),
    .cs(cs), .datain(datain), .dato(dato), .u(u), .u_valid(u_valid),
    .hall_fault(hall_fault));

  always #3 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_cs_toggle = 0, n_hold = 0, n_sample [2] = '{0, 0}, n_clamp_hi = 0, n_clamp_lo = 0;
  int n_sector = 0, n_chop = 0, n_fault = 0, n_disturb = 0;

  // reference model state
  longint   acc [2], e_prev [2], plant [2];
  logic [2:0] hist [2][4];          // hall history, [0] = newest
  int       sector [2];
  pwm_sig_t buf_m [2];
  pwm_sig_t prev_datain;
  logic     prev_cs;
  logic     fault_inj;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pwm_sig_t comm(input logic [2:0] h);
    logic [5:0] v = '0;
    for (int s = 0; s < 6; s++)
      if (SEQ[s] == h) begin
        v[5 - 2 * (s / 2)]             = 1'b1;
        v[4 - 2 * (((s + 1) / 2 + 1) % 3)] = 1'b1;
      end
    return pwm_sig_t'(v);
  endfunction

  function automatic pwm_sig_t chop(input pwm_sig_t e, input longint duty, input longint cnt);
    pwm_sig_t p = e;
    p.ah = e.ah && (cnt < duty);
    p.bh = e.bh && (cnt < duty);
    p.ch = e.ch && (cnt < duty);
    return p;
  endfunction

  function automatic int ref_of(input int k, input int f);
    if (k == 0) return (f < 2) ? 0 : (f < 30) ? 2000 : (f < 35) ? 7000 : (f < 45) ? 0 : 1500;
    else        return (f < 3) ? 0 : 1000;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%s", what);
    end
  endtask

  initial begin
    int f, kc, cnt;
    pwm_sig_t en_m [2];
    pwm_sig_t din_m;
    longint e, s;
    rst_n = 1'b0;
    for (int k = 0; k < 2; k++) begin
      i_ref[k] = '0; i_fb[k] = '0; hall[k] = 3'b000;
      k0[k] = 16'sd2560;   // Kp + Ki*T/2 = 0.625
      k1[k] = -16'sd1536;  // -Kp + Ki*T/2 = -0.375
      acc[k] = 0; e_prev[k] = 0; plant[k] = 0; sector[k] = 0;
      for (int j = 0; j < 4; j++) hist[k][j] = 3'b000;
      buf_m[k] = '0;
    end
    prev_datain = '0; prev_cs = 1'b0; fault_inj = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int t = 0; t < FRAMES * 2 * TASK; t++) begin
      if (t > 0) @(negedge clk);
      f   = t / (2 * TASK);
      kc  = (t / TASK) % 2;
      cnt = t % PER;

      // (1) compare the design with the model state
      for (int k = 0; k < 2; k++) en_m[k] = comm(hist[k][2]);   // set three edges ago
      din_m = chop(en_m[kc], acc[kc] >>> KF, longint'(cnt));
      check(cs == 1'(kc), $sformatf("t=%0d cs=%b expected %0d", t, cs, kc));
      for (int k = 0; k < 2; k++)
        check(longint'(u[k]) == (acc[k] >>> KF), $sformatf("t=%0d u%0d=%0d expected %0d", t, k, u[k], acc[k] >>> KF));
      check(datain == din_m, $sformatf("t=%0d datain=%b expected %b", t, datain, din_m));
      check(dato[0] == buf_m[0], $sformatf("t=%0d datol=%b expected %b", t, dato[0], buf_m[0]));
      check(dato[1] == buf_m[1], $sformatf("t=%0d dator=%b expected %b", t, dato[1], buf_m[1]));
      if (hist[1][2] == 3'b111 && hist[1][0] == 3'b111) begin
        check(hall_fault[1] == 1'b1, $sformatf("t=%0d hall fault not flagged", t));
        if (hall_fault[1]) n_fault++;
      end

      // mechanism counters
      if (t > 0 && cs != prev_cs) n_cs_toggle++;
      if (datain != buf_m[1 - kc] && datain != prev_datain) n_hold++;
      if (datain.ah != prev_datain.ah && en_m[kc].ah) n_chop++;
      prev_cs = cs; prev_datain = datain;

      // buffer model: the selected buffer takes the bus at the next edge
      buf_m[kc] = din_m;

      // (2) drive the motor models
      for (int k = 0; k < 2; k++) begin
        automatic int rate = (k == 0) ? 3000 : 5000;
        automatic logic [2:0] h;
        if (t > 0 && t % rate == 0) begin sector[k] = (sector[k] + 1) % 6; n_sector++; end
        h = SEQ[sector[k]];
        if (k == 1 && f == 25 && (t % (2 * TASK)) >= 100 && (t % (2 * TASK)) < 150) h = 3'b111;
        hall[k] = h;
        for (int j = 3; j > 0; j--) hist[k][j] = hist[k][j - 1];
        hist[k][0] = h;
      end

      // (3) a motor's task samples at the first cycle of its slot
      if (t % TASK == 0) begin
        plant[kc] = plant[kc] + (longint'(u[kc]) * 4 - plant[kc]) / 8;
        if (kc == 1 && f == 20) begin plant[kc] += 1500; n_disturb++; end
        i_ref[kc] = 16'(ref_of(kc, f));
        i_fb[kc]  = 16'(plant[kc]);
        e = longint'(i_ref[kc]) - longint'(i_fb[kc]);
        s = acc[kc] + longint'(k0[kc]) * e + longint'(k1[kc]) * e_prev[kc];
        e_prev[kc] = e;
        if (s < 0) begin acc[kc] = 0; n_clamp_lo++; end
        else if (s > (longint'(PER) << KF)) begin acc[kc] = longint'(PER) << KF; n_clamp_hi++; end
        else acc[kc] = s;
        n_sample[kc]++;
      end
    end

    for (int k = 0; k < 2; k++) begin
      automatic longint r = longint'(ref_of(k, FRAMES - 1));
      check(plant[k] >= r - 15 && plant[k] <= r + 15,
            $sformatf("motor %0d current %0d did not settle on %0d", k + 1, plant[k], r));
    end
    $display("cs toggles %0d, holds %0d, samples %0d/%0d, clamp high %0d low %0d",
             n_cs_toggle, n_hold, n_sample[0], n_sample[1], n_clamp_hi, n_clamp_lo);
    $display("sector steps %0d, PWM chops %0d, hall fault cycles %0d, disturbances %0d",
             n_sector, n_chop, n_fault, n_disturb);
    $display("final currents %0d %0d", plant[0], plant[1]);
    check(n_cs_toggle == 2 * FRAMES - 1, "wrong number of cs toggles");
    check(n_hold > 0, "no buffer ever held while the other was updated");
    check(n_sample[0] == FRAMES && n_sample[1] == FRAMES, "wrong number of controller samples");
    check(n_clamp_hi > 0, "upper clamp never reached");
    check(n_clamp_lo > 0, "lower clamp never reached");
    check(n_sector > 0, "no commutation step");
    check(n_chop > 0, "no PWM chopping");
    check(n_fault > 0, "hall fault never flagged");
    check(n_disturb > 0, "no disturbance applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
