// tb_pwm_unit: self-checking test of the shared PWM unit.
// For each of a set of duty values (0, full, beyond full, random) and random
// switch enables, runs three whole PWM periods and compares every output bit
// in every cycle with a model: the testbench counts cycles since reset
// modulo PERIOD itself; a high-side line is on while its enable is set and
// the count is below the duty; a low-side line equals its enable. It also
// counts the on-cycles of each period and checks they equal min(duty, PERIOD).
module tb_pwm_unit;
  import tmcs_pkg::*;
  localparam int unsigned PER = 1600;
  logic        clk = 1'b0;
  logic        rst_n;
  logic [15:0] duty;
  pwm_sig_t    en, pwm, exp_pwm;
  int          checks = 0, failures = 0;
  int          phase, on_cnt;

  pwm_unit #(.CW(16), .PERIOD(PER)) dut (.clk(clk), .rst_n(rst_n), .duty(duty), .en(en), .pwm(pwm));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int duties [6];
    duties = '{0, PER, PER + 100, 1, 800, 1599};
    rst_n = 1'b0; duty = '0; en = '0;
    #22 rst_n = 1'b1;
    phase = 0;                    // counter value seen in the current cycle
    for (int t = 0; t < 12; t++) begin
      // change settings only at a period boundary
      while (phase != 0) begin @(negedge clk); phase = (phase + 1) % PER; end
      duty = (t < 6) ? 16'(duties[t]) : 16'($urandom_range(0, PER));
      en   = pwm_sig_t'(6'b101010 | 6'($urandom_range(0, 63) & 6'b010101));
      for (int p = 0; p < 3; p++) begin
        on_cnt = 0;
        for (int c = 0; c < PER; c++) begin
          #1;
          exp_pwm    = en;
          exp_pwm.ah = en.ah && (phase < int'(duty));
          exp_pwm.bh = en.bh && (phase < int'(duty));
          exp_pwm.ch = en.ch && (phase < int'(duty));
          checks++;
          if (pwm !== exp_pwm) begin
            failures++;
            if (failures < 10) $display("duty %0d count %0d: pwm=%b expected %b", duty, phase, pwm, exp_pwm);
          end
          if (pwm.ah) on_cnt++;
          @(negedge clk);
          phase = (phase + 1) % PER;
        end
        checks++;
        if (on_cnt != ((int'(duty) < PER) ? int'(duty) : PER)) begin
          failures++;
          $display("duty %0d: %0d on-cycles in a period", duty, on_cnt);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
